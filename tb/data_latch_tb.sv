// data_latch_tb: self-checking test of the 16-bit data latch.
//
// Checks the reset value, that q takes d at a clock edge with en high, and
// that q holds its value over many clocks while d changes and en is low.
module data_latch_tb;
  import fkp_pkg::*;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   en = 1'b0;
  fix16_t d = '0, q, held;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_latch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    d = 16'sh1234;
    repeat (2) @(negedge clk);
    check(q == 0, "reset value");
    rst = 1'b0;
    held = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d  = fix16_t'($urandom);
      en = ($urandom % 3) == 0;
      if (en) held = d;
      @(negedge clk);
      check(q == held, $sformatf("q = %h exp %h", q, held));
      en = 1'b0;
      d = ~d;
      @(negedge clk);
      check(q == held, "q changed with en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
