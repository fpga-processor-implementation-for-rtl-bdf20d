// reg_file_tb: self-checking test of the 32 x 16 register file.
//
// After reset every word must read 0.0 except word 1 (1.0). All 32 words are
// then written with distinct values and read back on both ports, in opposite
// orders on A and B; words 0 and 1 must keep 0.0 and 1.0. Also checks the
// one-clock read latency, that a write without c_latch is ignored, and that
// a second reset clears the written words.
module reg_file_tb;
  import fkp_pkg::*;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  fix16_t c_bus = '0, a_bus, b_bus;
  logic   c_latch = 1'b0;
  raddr_t c_addr = '0, a_addr = '0, b_addr = '0;
  fix16_t model [NREGS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_file dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic read_all(input string phase);
    for (int i = 0; i < NREGS; i++) begin
      @(negedge clk);
      a_addr = raddr_t'(i);
      b_addr = raddr_t'(NREGS - 1 - i);
      @(negedge clk);
      check(a_bus == model[i], $sformatf("%s: A r%0d = %h exp %h", phase, i, a_bus, model[i]));
      check(b_bus == model[NREGS-1-i],
            $sformatf("%s: B r%0d = %h exp %h", phase, NREGS-1-i, b_bus, model[NREGS-1-i]));
    end
  endtask

  task automatic reset_model();
    foreach (model[i]) model[i] = FIX_ZERO;
    model[1] = FIX_ONE;
  endtask

  initial begin
    reset_model();
    repeat (3) @(negedge clk);
    rst = 1'b0;
    read_all("after reset");
    for (int i = 0; i < NREGS; i++) begin
      @(negedge clk);
      c_addr = raddr_t'(i);
      c_bus = fix16_t'(16'(16'h1111 * (i % 15 + 1)) ^ 16'(i));
      c_latch = 1'b1;
      if (i > 1) model[i] = c_bus;
    end
    @(negedge clk);
    c_latch = 1'b0;
    read_all("after writes");
    // write without latch is ignored
    @(negedge clk);
    c_addr = 5'd9; c_bus = 16'sh7777;
    @(negedge clk);
    // one-clock read latency: the bus shows the old address until the edge
    a_addr = 5'd9;
    #1 check(a_bus != model[9] || model[8] == model[9], "read port is not registered");
    @(negedge clk);
    check(a_bus == model[9], "write without c_latch changed the word");
    // reset again
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    reset_model();
    read_all("after second reset");
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
