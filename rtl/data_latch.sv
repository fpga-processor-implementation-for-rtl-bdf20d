// data_latch: 16-bit holding register for the processor's data buses.
//
// When en is high at a rising clock edge, d is copied to q; q then holds that
// value until the next time en is asserted. Two of them sit in the core: one
// between the external data-in bus and the result multiplexor, one between
// the register file's B bus and the external data-out bus.
//
// The original element is a level-sensitive latch; here it is an edge-
// triggered register with enable, which suits an FPGA and a single clock.
// The control unit allows one extra clock for it. Synchronous reset to zero.
module data_latch
  import fkp_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  fix16_t d,
  output fix16_t q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= FIX_ZERO;
    else if (en) q <= d;
  end

endmodule
