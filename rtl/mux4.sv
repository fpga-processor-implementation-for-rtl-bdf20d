// mux4: clocked four-to-one 16-bit multiplexor in front of the register file.
//
// At every rising clock edge the input chosen by sel is copied to o_bus:
// MUX_COS_SIN (00) the cosine/sine unit, MUX_ADDER (01) the adder/subtractor,
// MUX_MULT (10) the multiplier, MUX_DATA_IN (11) the input data latch. The
// output is registered, so it follows sel and the inputs one clock later, as
// in the original design.
module mux4
  import fkp_pkg::*;
(
  input  logic     clk,
  input  mux_sel_e sel,
  input  fix16_t   a_bus,
  input  fix16_t   b_bus,
  input  fix16_t   c_bus,
  input  fix16_t   d_bus,
  output fix16_t   o_bus
);

  always_ff @(posedge clk) begin
    unique case (sel)
      MUX_COS_SIN: o_bus <= a_bus;
      MUX_ADDER:   o_bus <= b_bus;
      MUX_MULT:    o_bus <= c_bus;
      MUX_DATA_IN: o_bus <= d_bus;
      default:     o_bus <= a_bus;
    endcase
  end

endmodule
