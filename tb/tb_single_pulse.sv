// tb_single_pulse: checks that the start pulse is high after reset, holds
// while the enable is low, and drops for good after the first enabled cycle.
module tb_single_pulse;
  logic clk = 0, rst_n = 0, en = 0, pulse;
  int checks = 0, failures = 0;

  single_pulse dut (.clk, .rst_n, .en, .pulse);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(pulse == 1, "pulse high in reset");
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1 check(pulse == 1, "pulse holds while en low");
    en = 1;
    @(posedge clk); #1 check(pulse == 0, "pulse drops after first enabled edge");
    repeat (20) begin
      en = 1'($urandom);
      @(posedge clk); #1 check(pulse == 0, "pulse stays low");
    end
    rst_n = 0; #1 check(pulse == 1, "pulse returns on reset");
    rst_n = 1; en = 1;
    @(posedge clk); #1 check(pulse == 0, "second pulse is one cycle long");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
