// add_sub_unit_tb: self-checking test of the bit-serial adder/subtractor.
//
// Runs the 16-bit unit (the processor's adder) and a 32-bit instance (the
// multiplier's accumulator) through random and corner-case additions and
// subtractions, compares each result with the two's complement sum or
// difference, checks that done rises WIDTH+2 clock edges after go and stays
// high while go is held, and that releasing go clears done.
module add_sub_unit_tb;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] a16 = '0, b16 = '0, c16;
  logic [31:0] a32 = '0, b32 = '0, c32;
  logic        go16 = 1'b0, go32 = 1'b0, sel16 = 1'b0, sel32 = 1'b0, done16, done32;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  add_sub_unit dut16 (.clk, .rst, .a_bus(a16), .b_bus(b16), .go(go16), .sel(sel16),
                      .done(done16), .c_bus(c16));
  add_sub_unit #(.WIDTH(32)) dut32 (.clk, .rst, .a_bus(a32), .b_bus(b32), .go(go32),
                                    .sel(sel32), .done(done32), .c_bus(c32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic op16(input logic [15:0] a, input logic [15:0] b, input logic s);
    int cyc;
    logic [15:0] exp;
    @(negedge clk);
    a16 = a; b16 = b; sel16 = s; go16 = 1'b1;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done16 && cyc < 100);
    exp = s ? a - b : a + b;
    check(c16 == exp, $sformatf("16: %h %s %h = %h exp %h", a, s ? "-" : "+", b, c16, exp));
    check(cyc == 18, $sformatf("16: done after %0d clocks, exp 18", cyc));
    // inputs may change once the operands are taken; done must hold
    a16 = ~a; b16 = ~b;
    repeat (2) @(negedge clk);
    check(done16 && c16 == exp, "16: done/result not held while go high");
    go16 = 1'b0;
    @(negedge clk);
    check(!done16, "16: done not cleared after go released");
  endtask

  task automatic op32(input logic [31:0] a, input logic [31:0] b, input logic s);
    int cyc;
    logic [31:0] exp;
    @(negedge clk);
    a32 = a; b32 = b; sel32 = s; go32 = 1'b1;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done32 && cyc < 100);
    exp = s ? a - b : a + b;
    check(c32 == exp, $sformatf("32: %h %s %h = %h exp %h", a, s ? "-" : "+", b, c32, exp));
    check(cyc == 34, $sformatf("32: done after %0d clocks, exp 34", cyc));
    go32 = 1'b0;
    @(negedge clk);
    check(!done32, "32: done not cleared after go released");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    op16(16'h0000, 16'h0000, 1'b0);
    op16(16'h0000, 16'h0000, 1'b1);
    op16(16'hFFFF, 16'h0001, 1'b0);
    op16(16'h0000, 16'h0100, 1'b1);   // 0 - 1.0
    op16(16'h0540, 16'h0213, 1'b1);
    op16(16'h7FFF, 16'h7FFF, 1'b0);
    op16(16'h8000, 16'h0001, 1'b1);
    for (int i = 0; i < 30; i++) begin
      op16(16'($urandom), 16'($urandom), 1'b0);
      op16(16'($urandom), 16'($urandom), 1'b1);
    end
    op32(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    op32(32'h0000_0000, 32'h0001_0000, 1'b1);
    for (int i = 0; i < 10; i++) begin
      op32($urandom, $urandom, 1'b0);
      op32($urandom, $urandom, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
