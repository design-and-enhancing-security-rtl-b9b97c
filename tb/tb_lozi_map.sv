// tb_lozi_map: runs the Lozi map stand-alone (x fed back through a testbench
// register, y inside the block) from the default key. Checks each step bit
// for bit against the integer model, against the real-valued Lozi equations
// within tolerance, that the start cycle loads x0/y0, that y holds beta*x of
// the previous step, and that negative x (the |x| path) occurs.
module tb_lozi_map;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, start = 1;
  fix_t alpha, beta, x0, y0, x_in, x_out;
  int checks = 0, failures = 0, n_neg = 0;

  lozi_map dut (.clk, .rst_n, .en, .start, .alpha, .beta, .x0, .y0, .x_in, .x_out);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int xr, yr, exp_v;
    real err;
    alpha = DEFAULT_KEY.lozi_a; beta = DEFAULT_KEY.lozi_b;
    x0 = DEFAULT_KEY.lozi_x0;   y0 = DEFAULT_KEY.lozi_y0;
    x_in = 32'h0555_5555;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // start cycle
    exp_v = ref_lozi_x(x0, y0, alpha);
    check(x_out == exp_v, "start cycle uses x0, y0");
    err = to_real(x_out) - (1.0 - 1.3999999985098839 * 0.52713999897241592 + 0.42743000015616417);
    check(err < 1.0e-7 && err > -1.0e-7, "first iterate matches real arithmetic");
    yr = rmul(x0, beta);
    xr = x_out;
    en = 1;
    @(negedge clk);
    start = 0;
    for (int n = 0; n < 2000; n++) begin
      // hold the enable low now and then: state must not move
      if (n % 97 == 5) begin
        en = 0; @(negedge clk); en = 1;
      end
      x_in = xr; #1;
      exp_v = ref_lozi_x(xr, yr, alpha);
      check(x_out == exp_v, $sformatf("step %0d bit exact", n));
      err = to_real(x_out) - real_lozi_x(to_real(xr), to_real(yr), to_real(alpha));
      check(err < 1.0e-8 && err > -1.0e-8, "within tolerance");
      if (xr < 0) n_neg++;
      yr = rmul(xr, beta);
      xr = x_out;
      @(negedge clk);
    end
    check(n_neg > 10, "negative x exercised");
    $display("negative x steps=%0d", n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
