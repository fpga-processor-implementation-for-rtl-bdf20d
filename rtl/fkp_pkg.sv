// fkp_pkg: types and constants shared by the Forward Kinematic Processor (FKP).
//
// Every number in the processor is a 16-bit two's complement fixed-point word
// with 8 integer and 8 fraction bits (range -128.0 .. +127.99609375, one LSB is
// 1/256). Angles are radians in the same format. The register file has 32
// words; word 0 always reads 0.0 and word 1 always reads 1.0.
//
// The opcodes are the instruction set of the processor (move in, move out,
// add, subtract, multiply, cosine, sine). The run program is a list of
// three-address instructions {op, destination, source 1, source 2}.
// The mux select encodings (00 cos/sin, 01 add/sub, 10 multiply, 11 data in)
// and the command encodings (00 set, 01 get, 10 run) follow the original
// design; the command code 11 is unused and is ignored by the control unit.
package fkp_pkg;

  localparam int unsigned WORD_W    = 16;
  localparam int unsigned FRAC_W    = 8;
  localparam int unsigned NREGS     = 32;
  localparam int unsigned RADDR_W   = 5;
  localparam int unsigned ROM_AW    = 13;
  localparam int unsigned WAIT_W    = 3;

  typedef logic signed [WORD_W-1:0] fix16_t;
  typedef logic [RADDR_W-1:0]        raddr_t;

  localparam fix16_t FIX_ZERO = 16'sh0000;
  localparam fix16_t FIX_ONE  = 16'sh0100;

  // Instruction set of the processor.
  typedef enum logic [2:0] {
    OP_MOVE_IN  = 3'd0,
    OP_MOVE_OUT = 3'd1,
    OP_ADD      = 3'd2,
    OP_SUB      = 3'd3,
    OP_MULT     = 3'd4,
    OP_COS      = 3'd5,
    OP_SIN      = 3'd6
  } opcode_e;

  // One instruction: rd <= rs1 (op) rs2.
  typedef struct packed {
    opcode_e op;
    raddr_t  rd;
    raddr_t  rs1;
    raddr_t  rs2;
  } instr_t;

  // Source selection of the result multiplexor in front of the register file.
  typedef enum logic [1:0] {
    MUX_COS_SIN = 2'b00,
    MUX_ADDER   = 2'b01,
    MUX_MULT    = 2'b10,
    MUX_DATA_IN = 2'b11
  } mux_sel_e;

  // CMD1:CMD0 field of the command port.
  typedef enum logic [1:0] {
    CMD_SET = 2'b00,
    CMD_GET = 2'b01,
    CMD_RUN = 2'b10,
    CMD_NOP = 2'b11
  } cmd_e;

  // Command port: {CMD1, CMD0, A4..A0}.
  typedef struct packed {
    cmd_e   cmd;
    raddr_t addr;
  } cmd_port_t;

  // Fixed register map used by the run program.
  localparam raddr_t R_ZERO  = 5'd0;
  localparam raddr_t R_ONE   = 5'd1;
  localparam raddr_t R_A0    = 5'd2;
  localparam raddr_t R_A1    = 5'd3;
  localparam raddr_t R_A2    = 5'd4;
  localparam raddr_t R_A3    = 5'd5;
  localparam raddr_t R_D1    = 5'd6;
  localparam raddr_t R_TH1   = 5'd7;
  localparam raddr_t R_TH2   = 5'd8;
  localparam raddr_t R_TH3   = 5'd9;
  localparam raddr_t R_TH4   = 5'd10;
  // Results: N in 20..22, S in 23..25, A in 26..28, P in 29..31.
  localparam raddr_t R_NX = 5'd20, R_NY = 5'd21, R_NZ = 5'd22;
  localparam raddr_t R_SX = 5'd23, R_SY = 5'd24, R_SZ = 5'd25;
  localparam raddr_t R_AX = 5'd26, R_AY = 5'd27, R_AZ = 5'd28;
  localparam raddr_t R_PX = 5'd29, R_PY = 5'd30, R_PZ = 5'd31;

  localparam int unsigned PROG_LEN = 29;

endpackage
