// mult_unit_tb: self-checking test of the 8.8 fixed-point multiplier.
//
// Compares each result with the exact signed product truncated to 8.8
// (bits 23..8 of the 32-bit product), over corner cases (zero, one, minus
// one, the most negative word, mixed signs) and random operands of the size
// seen in the kinematics and of any size. Checks that done arrives after the
// fixed latency of 16 partial-product additions (16*36+2 clocks from the
// drive of go), holds while go is high and clears when go is released.
module mult_unit_tb;
  import fkp_pkg::*;
  import fkp_tb_pkg::*;

  localparam int LATENCY = 16 * 36 + 2;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  fix16_t a_bus = '0, b_bus = '0, c_bus;
  logic   go = 1'b0, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mult_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic mul(input fix16_t a, input fix16_t b);
    int cyc;
    fix16_t exp;
    logic signed [31:0] p;
    @(negedge clk);
    a_bus = a; b_bus = b; go = 1'b1;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done && cyc < 2000);
    p = 32'(a) * 32'(b);
    exp = fix16_t'(p >>> 8);
    check(c_bus == exp, $sformatf("%f * %f = %h exp %h", to_real(a), to_real(b), c_bus, exp));
    check(cyc == LATENCY, $sformatf("done after %0d clocks, exp %0d", cyc, LATENCY));
    a_bus = ~a;
    @(negedge clk);
    check(done && c_bus == exp, "result not held while go high");
    go = 1'b0;
    @(negedge clk);
    check(!done, "done not cleared after go released");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    mul(16'sh0000, 16'sh0123);
    mul(16'sh0100, 16'sh0100);
    mul(16'sh0100, -16'sh0100);
    mul(-16'sh0100, -16'sh0100);
    mul(16'sh01B3, 16'sh00DE);          // 1.7 * 0.866
    mul(16'sh014D, -16'sh00B5);         // 1.3 * -0.707
    mul(-16'sh00C0, 16'sh0180);         // -0.75 * 1.5
    mul(-16'sh8000, 16'sh0001);
    mul(16'sh0001, -16'sh8000);
    for (int i = 0; i < 15; i++) begin
      mul(fix16_t'($signed(11'($urandom))), fix16_t'($signed(10'($urandom))));
      mul(fix16_t'($urandom), fix16_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
