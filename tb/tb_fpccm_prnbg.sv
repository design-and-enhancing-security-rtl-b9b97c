// tb_fpccm_prnbg: the proposed key byte generator (cascade XOR LFSR low byte)
// against the integer model, for the default key and random keys, with random
// enable gaps. Also checks the byte stream's balance: over 8000 bytes each bit
// position must be 1 in 45..55 % of the bytes. On the same stream, read as a
// bit sequence (MSB of each byte first), it runs the NIST SP 800-22 frequency
// (monobit) and runs tests; p > 0.01 is checked through the equivalent bounds
// on the statistics: |S|/sqrt(n) < 2.5758 and the runs statistic < 1.8214
// (erfc of each bound is 0.01).
module tb_fpccm_prnbg;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  key_t key;
  logic [7:0] kbyte;
  int checks = 0, failures = 0;
  int ones[8];
  int nbytes = 0;
  longint nbits = 0, nones = 0, nruns = 0;
  bit prev_bit;

  fpccm_prnbg dut (.clk, .rst_n, .en, .key, .kbyte);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic key_t to_key(rkey_t k);
    return '{log_r: k.r, log_x0: k.lx0, lozi_a: k.a, lozi_b: k.b, lozi_x0: k.zx0,
             lozi_y0: k.zy0, tent_mu: k.mu, tent_x0: k.tx0, pn_seed: k.seed};
  endfunction

  task automatic run(rkey_t k, int steps, bit count);
    gen_t g;
    int xt;
    byte unsigned pnb, exp_b;
    g = '{fb: 0, y: 0, pn: 0, started: 0, tent_low: 0, lozi_neg: 0};
    key = to_key(k);
    rst_n = 0; en = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < steps; n++) begin
      en = ($urandom_range(7) != 0);
      #1;
      if (en) begin
        xt = ref_cascade_step(g, k, pnb);
        exp_b = xt[7:0] ^ pnb;
        check(kbyte == exp_b, $sformatf("byte %0d got %h want %h", n, kbyte, exp_b));
        if (count) begin
          nbytes++;
          for (int b = 0; b < 8; b++) ones[b] += kbyte[b];
          for (int b = 7; b >= 0; b--) begin
            if (nbits == 0 || kbyte[b] != prev_bit) nruns++;
            prev_bit = kbyte[b];
            nones += kbyte[b];
            nbits++;
          end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rkey_t k;
    run(REF_DEFAULT_KEY, 9143, 1);   // about 8000 enabled cycles
    foreach (ones[b])
      check(ones[b] * 100 > nbytes * 45 && ones[b] * 100 < nbytes * 55,
            $sformatf("bit %0d balance %0d of %0d", b, ones[b], nbytes));
    begin
      real n, pi_, s_obs, v_obs;
      n = real'(nbits);
      pi_ = real'(nones) / n;
      s_obs = (2.0 * real'(nones) - n) / $sqrt(n);
      if (s_obs < 0) s_obs = -s_obs;
      v_obs = (real'(nruns) - 2.0 * n * pi_ * (1.0 - pi_)) / (2.0 * $sqrt(2.0 * n) * pi_ * (1.0 - pi_));
      if (v_obs < 0) v_obs = -v_obs;
      $display("NIST on %0d bits: monobit |S|/sqrt(n)=%f, runs: pi=%f V=%0d stat=%f", nbits, s_obs, pi_, nruns, v_obs);
      check(s_obs < 2.5758, "frequency (monobit) test passes, p > 0.01");
      check((pi_ - 0.5 < 2.0 / $sqrt(n)) && (0.5 - pi_ < 2.0 / $sqrt(n)), "runs test prerequisite");
      check(v_obs < 1.8214, "runs test passes, p > 0.01");
    end
    repeat (4) begin
      k = REF_DEFAULT_KEY;
      k.seed = $urandom;
      k.lx0  = int'($urandom_range(32'h0FFF_FFFF));
      k.tx0  = int'($urandom_range(32'h0FFF_FFFF));
      run(k, 1000, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
