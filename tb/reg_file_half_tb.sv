// reg_file_half_tb: the register file at half size (16 words), driven with
// the functional test pattern used when that size was first built in
// hardware.
//
// Sequence: reset, then read all 16 words with the A port counting up and the
// B port counting down, expecting 0.0 everywhere except word 1 (1.0). Then
// write word i with a single set bit, 1 << i, and read them back the same way.
// Words 0 and 1 must keep 0.0 and 1.0, and every other word its own bit.
// Addresses 16..31 do not exist at this size: they must read 0.0 and must not
// disturb words 0..15 when written. The clock is 97 ns, the fastest period
// at which the hardware version still passed this pattern. The watchdog
// stops the run after 2000 clocks.
module reg_file_half_tb;
  import fkp_pkg::*;

  localparam int unsigned N = 16;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  fix16_t c_bus = '0, a_bus, b_bus;
  logic   c_latch = 1'b0;
  raddr_t c_addr = '0, a_addr = '0, b_addr = '0;
  fix16_t model [N];
  int checks = 0, failures = 0;

  always #48.5 clk = ~clk;

  reg_file #(.NWORDS(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic read_opposite(input string phase);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      a_addr = raddr_t'(i);
      b_addr = raddr_t'(N - 1 - i);
      @(negedge clk);
      check(a_bus == model[i], $sformatf("%s: A r%0d = %h exp %h", phase, i, a_bus, model[i]));
      check(b_bus == model[N-1-i],
            $sformatf("%s: B r%0d = %h exp %h", phase, N-1-i, b_bus, model[N-1-i]));
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = (i == 1) ? FIX_ONE : FIX_ZERO;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    read_opposite("after reset");

    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      c_addr  = raddr_t'(i);
      c_bus   = fix16_t'(16'h0001 << i);
      c_latch = 1'b1;
      if (i >= 2) model[i] = c_bus;
    end
    @(negedge clk);
    c_latch = 1'b0;
    read_opposite("after walking-one writes");

    // addresses beyond the half-size file
    for (int i = N; i < NREGS; i++) begin
      @(negedge clk);
      c_addr  = raddr_t'(i);
      c_bus   = 16'sh7FFF;
      c_latch = 1'b1;
    end
    @(negedge clk);
    c_latch = 1'b0;
    for (int i = N; i < NREGS; i++) begin
      @(negedge clk);
      a_addr = raddr_t'(i);
      b_addr = raddr_t'(i);
      @(negedge clk);
      check(a_bus == FIX_ZERO && b_bus == FIX_ZERO,
            $sformatf("absent r%0d reads %h/%h", i, a_bus, b_bus));
    end
    read_opposite("after writes to absent words");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
