// tb_fpccm_prbg: the cascade generator (logistic -> Lozi -> tent, fed back)
// from the default key and from random keys, compared every enabled cycle
// with the integer cascade model. The enable is dropped at random to check
// that the state holds; a reset in the middle must restart the sequence.
module tb_fpccm_prbg;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, start;
  key_t key;
  fix_t x_out;
  logic [7:0] kbyte;
  int checks = 0, failures = 0;

  fpccm_prbg dut (.clk, .rst_n, .en, .key, .x_out, .kbyte, .start);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic key_t to_key(rkey_t k);
    return '{log_r: k.r, log_x0: k.lx0, lozi_a: k.a, lozi_b: k.b, lozi_x0: k.zx0,
             lozi_y0: k.zy0, tent_mu: k.mu, tent_x0: k.tx0, pn_seed: k.seed};
  endfunction

  task automatic run(rkey_t k, int steps);
    gen_t g;
    int exp_v;
    byte unsigned pnb;
    g = '{fb: 0, y: 0, pn: 0, started: 0, tent_low: 0, lozi_neg: 0};
    key = to_key(k);
    rst_n = 0; en = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(start == 1, "start pulse after reset");
    for (int n = 0; n < steps; n++) begin
      en = ($urandom_range(9) != 0);
      #1;
      if (en) begin
        exp_v = ref_cascade_step(g, k, pnb);
        check(x_out == exp_v, $sformatf("step %0d got %h want %h", n, x_out, exp_v));
        check(kbyte == exp_v[7:0], "key byte is the low byte");
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rkey_t k;
    run(REF_DEFAULT_KEY, 3000);
    // first byte must be tent(x0_tent)
    repeat (5) begin
      k = REF_DEFAULT_KEY;
      // random keys: parameters near the published ones, random initial values in [0,1)
      k.lx0 = int'($urandom_range(32'h0FFF_FFFF));
      k.zx0 = int'($urandom_range(32'h0FFF_FFFF));
      k.zy0 = int'($urandom_range(32'h0FFF_FFFF));
      k.tx0 = int'($urandom_range(32'h0FFF_FFFF));
      k.r   = k.r  - int'($urandom_range(32'h00FF_FFFF));
      k.mu  = k.mu - int'($urandom_range(32'h00FF_FFFF));
      run(k, 1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
