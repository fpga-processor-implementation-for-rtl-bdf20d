// fkp: Forward Kinematic Processor for the thumb of the Utah/MIT Dexterous
// Hand.
//
// A small application-specific processor that turns four joint angles into
// the 12 terms of the thumb's homogeneous transform (orientation vectors N, S,
// A and position P). The host loads the five DH constants once (r2..r6: a0,
// a1, a2, a3, d1) and the joint angles in radians (r7..r10) with set
// commands, issues run, and reads the results from r20..r31 with get
// commands. All words are 16-bit 8.8 fixed point.
//
// Structure: fkp_control (host handshake and program sequencing, with the
// program in fkp_microstore) drives fkp_core (register file, cosine/sine,
// adder/subtractor, multiplier, mux, data latches). Cosine and sine come from
// an external 8K x 16 ROM on rom_addr/rom_data; rom_wait sets how many extra
// clocks the ROM is given (0..7).
//
// Ports: clk, rst (synchronous, active high); control port strobe, ready,
// data_get_valid, data_get_ack; command port cmd = {CMD1, CMD0, A4..A0};
// 16-bit data_in and data_out buses. The port list follows the original
// design; rom_wait as a port is this design's choice.
module fkp
  import fkp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              strobe,
  output logic              ready,
  output logic              data_get_valid,
  input  logic              data_get_ack,
  input  cmd_port_t         cmd,
  input  fix16_t            data_in,
  output fix16_t            data_out,
  input  logic [WAIT_W-1:0] rom_wait,
  output logic [ROM_AW-1:0] rom_addr,
  input  fix16_t            rom_data
);

  logic     data_in_latch, data_out_latch, c_reg_latch;
  raddr_t   c_reg_addr, a_reg_addr, b_reg_addr;
  logic     cos_sin_ready, cos_sin_go, cos_sin_sel;
  logic     adder_go, adder_sel, adder_done, mult_go, mult_done;
  mux_sel_e mux_sel;

  fkp_control u_control (
    .clk            (clk),
    .rst            (rst),
    .strobe         (strobe),
    .ready          (ready),
    .data_get_valid (data_get_valid),
    .data_get_ack   (data_get_ack),
    .cmd            (cmd),
    .data_in_latch  (data_in_latch),
    .data_out_latch (data_out_latch),
    .c_reg_latch    (c_reg_latch),
    .c_reg_addr     (c_reg_addr),
    .a_reg_addr     (a_reg_addr),
    .b_reg_addr     (b_reg_addr),
    .cos_sin_ready  (cos_sin_ready),
    .cos_sin_go     (cos_sin_go),
    .cos_sin_sel    (cos_sin_sel),
    .adder_go       (adder_go),
    .adder_sel      (adder_sel),
    .adder_done     (adder_done),
    .mult_go        (mult_go),
    .mult_done      (mult_done),
    .mux_sel        (mux_sel)
  );

  fkp_core u_core (
    .clk            (clk),
    .rst            (rst),
    .data_in        (data_in),
    .data_out       (data_out),
    .data_in_latch  (data_in_latch),
    .data_out_latch (data_out_latch),
    .c_reg_latch    (c_reg_latch),
    .c_reg_addr     (c_reg_addr),
    .a_reg_addr     (a_reg_addr),
    .b_reg_addr     (b_reg_addr),
    .cos_sin_ready  (cos_sin_ready),
    .cos_sin_go     (cos_sin_go),
    .cos_sin_sel    (cos_sin_sel),
    .cos_sin_wait   (rom_wait),
    .rom_addr       (rom_addr),
    .rom_data       (rom_data),
    .adder_go       (adder_go),
    .adder_sel      (adder_sel),
    .adder_done     (adder_done),
    .mult_go        (mult_go),
    .mult_done      (mult_done),
    .mux_sel        (mux_sel)
  );

endmodule
