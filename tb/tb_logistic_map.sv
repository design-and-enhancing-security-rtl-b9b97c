// tb_logistic_map: runs the logistic map as a stand-alone generator (output
// fed back through a testbench register) from the default key. Every step is
// compared bit for bit with the integer model and, within 2^-24, with the
// real-valued map applied to the same input. Also checks the start mux.
module tb_logistic_map;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  logic start;
  fix_t r, x0, x_in, x_out;
  int checks = 0, failures = 0;

  logistic_map dut (.start, .r, .x0, .x_in, .x_out);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int xr, exp_v;
    real err;
    r  = DEFAULT_KEY.log_r;
    x0 = DEFAULT_KEY.log_x0;
    x_in = 32'h0123_4567;
    start = 1;
    #1;
    exp_v = ref_logistic(x0, r);
    check(x_out == exp_v, "start cycle uses x0");
    // first value from the exact formula: 3.99*0.939243*(1-0.939243)
    err = to_real(x_out) - 3.9899999983608723 * 0.93924300000071526 * (1.0 - 0.93924300000071526);
    check(err < 1.0e-7 && err > -1.0e-7, "first iterate matches real arithmetic");
    xr = x_out;
    start = 0;
    for (int n = 0; n < 2000; n++) begin
      x_in = xr;
      #1;
      exp_v = ref_logistic(xr, r);
      check(x_out == exp_v, $sformatf("step %0d bit exact", n));
      err = to_real(x_out) - real_logistic(to_real(xr), to_real(r));
      check(err < 6.0e-8 && err > -6.0e-8, $sformatf("step %0d within tolerance", n));
      check(x_out >= 0 && x_out <= 32'sh1000_0000, "orbit stays in [0,1]");
      xr = x_out;
    end
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
