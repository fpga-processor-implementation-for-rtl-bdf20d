// mux4_tb: self-checking test of the clocked 4:1 result multiplexor.
//
// For random inputs and every select value checks that the output, one clock
// after the edge, is the selected input, and that it does not change prev_o
// the clock edge.
module mux4_tb;
  import fkp_pkg::*;

  logic     clk = 1'b0;
  mux_sel_e sel = MUX_COS_SIN;
  fix16_t   a_bus = '0, b_bus = '0, c_bus = '0, d_bus = '0, o_bus, prev_o;
  fix16_t   exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mux4 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      prev_o = o_bus;
      a_bus = fix16_t'($urandom); b_bus = fix16_t'($urandom);
      c_bus = fix16_t'($urandom); d_bus = fix16_t'($urandom);
      sel = mux_sel_e'(i % 4);
      #1 check(o_bus == prev_o, "output changed without a clock edge");
      case (sel)
        MUX_COS_SIN: exp = a_bus;
        MUX_ADDER:   exp = b_bus;
        MUX_MULT:    exp = c_bus;
        default:     exp = d_bus;
      endcase
      @(negedge clk);
      check(o_bus == exp, $sformatf("sel %0d: %h exp %h", sel, o_bus, exp));
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
