// fkp_core: datapath of the Forward Kinematic Processor.
//
// Holds the register file, the three functional units (cosine/sine,
// adder/subtractor, multiplier), the result multiplexor and the two data
// latches, and wires them as one unit whose control signals are all ports.
// It sequences nothing by itself; fkp_control drives it.
//
// Data flow: data_in -> input latch -> mux (MUX_DATA_IN) -> register file.
// The register file's A bus feeds the cosine/sine unit and the first operand
// of the adder and multiplier; its B bus feeds their second operand and the
// output latch, whose output is data_out. Each unit's result returns to the
// register file through the clocked mux. The cosine/sine unit reaches its
// lookup table through the rom_addr/rom_data port.
//
// The set of units and their connections follow the original design.
module fkp_core
  import fkp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  fix16_t            data_in,
  output fix16_t            data_out,
  input  logic              data_in_latch,
  input  logic              data_out_latch,
  input  logic              c_reg_latch,
  input  raddr_t            c_reg_addr,
  input  raddr_t            a_reg_addr,
  input  raddr_t            b_reg_addr,
  output logic              cos_sin_ready,
  input  logic              cos_sin_go,
  input  logic              cos_sin_sel,
  input  logic [WAIT_W-1:0] cos_sin_wait,
  output logic [ROM_AW-1:0] rom_addr,
  input  fix16_t            rom_data,
  input  logic              adder_go,
  input  logic              adder_sel,
  output logic              adder_done,
  input  logic              mult_go,
  output logic              mult_done,
  input  mux_sel_e          mux_sel
);

  fix16_t a_bus, b_bus, mux_to_regs;
  fix16_t cos_sin_to_mux, adder_to_mux, mult_to_mux, data_in_to_mux;

  reg_file u_reg_file (
    .clk     (clk),
    .rst     (rst),
    .c_bus   (mux_to_regs),
    .c_latch (c_reg_latch),
    .c_addr  (c_reg_addr),
    .a_addr  (a_reg_addr),
    .a_bus   (a_bus),
    .b_addr  (b_reg_addr),
    .b_bus   (b_bus)
  );

  cos_sin_unit u_cos_sin (
    .clk         (clk),
    .rst         (rst),
    .a_bus       (a_bus),
    .go          (cos_sin_go),
    .sel         (cos_sin_sel),
    .wait_states (cos_sin_wait),
    .ready       (cos_sin_ready),
    .c_bus       (cos_sin_to_mux),
    .rom_addr    (rom_addr),
    .rom_data    (rom_data)
  );

  add_sub_unit #(.WIDTH(WORD_W)) u_adder (
    .clk   (clk),
    .rst   (rst),
    .a_bus (a_bus),
    .b_bus (b_bus),
    .go    (adder_go),
    .sel   (adder_sel),
    .done  (adder_done),
    .c_bus (adder_to_mux)
  );

  mult_unit u_mult (
    .clk   (clk),
    .rst   (rst),
    .a_bus (a_bus),
    .b_bus (b_bus),
    .go    (mult_go),
    .done  (mult_done),
    .c_bus (mult_to_mux)
  );

  mux4 u_mux (
    .clk   (clk),
    .sel   (mux_sel),
    .a_bus (cos_sin_to_mux),
    .b_bus (adder_to_mux),
    .c_bus (mult_to_mux),
    .d_bus (data_in_to_mux),
    .o_bus (mux_to_regs)
  );

  data_latch u_latch_in (
    .clk (clk),
    .rst (rst),
    .en  (data_in_latch),
    .d   (data_in),
    .q   (data_in_to_mux)
  );

  data_latch u_latch_out (
    .clk (clk),
    .rst (rst),
    .en  (data_out_latch),
    .d   (b_bus),
    .q   (data_out)
  );

endmodule
