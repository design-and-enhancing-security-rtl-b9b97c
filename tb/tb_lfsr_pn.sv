// tb_lfsr_pn: checks the 32-bit Fibonacci LFSR against a bit-serial model
// computed here from the tap list (bits 30, 20, 13, 0), the seed load in the
// start cycle, the enable, and that dout is the low byte of the state.
module tb_lfsr_pn;
  logic clk = 0, rst_n = 0, en = 0, start = 1;
  logic [31:0] seed, state;
  logic [7:0]  dout;
  int checks = 0, failures = 0;

  lfsr_pn dut (.clk, .rst_n, .en, .start, .seed, .dout, .state);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] m;
    seed = 32'h0BFD_97C8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 32'h0BFD_97C8 && dout == 8'hC8, "start cycle shows the seed");
    m = seed;
    en = 1;
    @(negedge clk);
    start = 0;
    #1;
    for (int n = 0; n < 3000; n++) begin
      logic fb;
      fb = m[30] ^ m[20] ^ m[13] ^ m[0];
      m  = {m[30:0], fb};
      check(state == m, $sformatf("step %0d state %h want %h", n, state, m));
      check(dout == m[7:0], "dout is the low byte");
      en = (n % 13 != 7);
      @(negedge clk);
      if (!en) begin
        check(state == m, "state holds with en low");
        en = 1;
        @(negedge clk);
        // the step after a held cycle is checked in the next iteration
      end
    end
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
