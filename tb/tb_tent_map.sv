// tb_tent_map: runs the tent map stand-alone from the default key (mu = 1.8)
// and also over random inputs in [-1, 2). Checks every output bit for bit
// against the integer model and within tolerance against the real-valued map,
// and counts both branches (x <= 0.5 and x > 0.5), including x = 0.5 exactly.
module tb_tent_map;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  logic start;
  fix_t mu, x0, x_in, x_out;
  int checks = 0, failures = 0, n_low = 0, n_high = 0;

  tent_map dut (.start, .mu, .x0, .x_in, .x_out);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(int x);
    int exp_v; real err;
    x_in = x; #1;
    exp_v = ref_tent(x, mu);
    check(x_out == exp_v, $sformatf("x=%h bit exact (got %h want %h)", x, x_out, exp_v));
    err = to_real(x_out) - real_tent(to_real(x), to_real(mu));
    check(err < 1.0e-8 && err > -1.0e-8, "within tolerance");
    if (to_real(x) <= 0.5) n_low++; else n_high++;
  endtask

  initial begin
    int xr;
    mu = DEFAULT_KEY.tent_mu;
    x0 = DEFAULT_KEY.tent_x0;
    start = 1; x_in = 0; #1;
    check(x_out == ref_tent(x0, mu), "start cycle uses x0");
    // 0.52714560 > 0.5, so 1.8*(1-x0)
    check(to_real(x_out) > 0.85 && to_real(x_out) < 0.86, "first iterate 1.8*(1-x0)");
    start = 0;
    xr = x_out;
    for (int n = 0; n < 500; n++) begin step(xr); xr = x_out; end
    step(32'sh0800_0000);   // exactly 0.5: low branch
    step(32'sh0800_0001);   // just above: high branch
    for (int n = 0; n < 500; n++) step(int'($urandom_range(32'h3000_0000)) - 32'sh1000_0000);
    check(n_low > 10 && n_high > 10, "both branches exercised");
    $display("low=%0d high=%0d", n_low, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
