// fkp_control: control unit of the Forward Kinematic Processor.
//
// Talks to the host through a control port (strobe, ready, data-get-valid,
// data-get-ack) and a 7-bit command port {CMD1, CMD0, A4..A0}, and drives
// every control input of fkp_core.
//
// Host protocol. While ready is high the host puts a command on cmd (and, for
// a set, the word on data_in) and raises strobe. The unit drops ready and:
//   set (00): copies data_in through the input latch and the mux into
//             register A4..A0 (writes to r0 and r1 are ignored by the file);
//   get (01): copies register A4..A0 through the output latch to data_out,
//             raises data_get_valid, waits for data_get_ack, drops
//             data_get_valid;
//   run (10): executes the 29-instruction program of fkp_microstore.
// It then waits for strobe to fall and raises ready again. Command 11 is
// ignored. cmd and data_in must stay stable while strobe is high.
//
// Instruction sequencing. Each program instruction takes three phases:
// SETUP drives the register addresses (A = rs1, B = rs2, C = rd), the mux
// select and the add/subtract or cosine/sine select, giving the registered
// read ports one clock; GO raises the go of the unit and holds it until the
// unit reports done (ready for cosine/sine); LATCH drops go and pulses the
// register write, storing the result the clocked mux captured. A set takes
// three clocks (latch, mux, write); a get takes two clocks before
// data_get_valid rises.
//
// The ports, the three commands, the handshake and the per-instruction
// sequence follow the original design; the one-clock mux stage in a set
// accounts for the edge-triggered data latch, which is this design's choice.
// Synchronous active-high reset; ready is high after reset.
module fkp_control
  import fkp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // control port
  input  logic              strobe,
  output logic              ready,
  output logic              data_get_valid,
  input  logic              data_get_ack,
  // command port
  input  cmd_port_t         cmd,
  // core control
  output logic              data_in_latch,
  output logic              data_out_latch,
  output logic              c_reg_latch,
  output raddr_t            c_reg_addr,
  output raddr_t            a_reg_addr,
  output raddr_t            b_reg_addr,
  input  logic              cos_sin_ready,
  output logic              cos_sin_go,
  output logic              cos_sin_sel,
  output logic              adder_go,
  output logic              adder_sel,
  input  logic              adder_done,
  output logic              mult_go,
  input  logic              mult_done,
  output mux_sel_e          mux_sel
);

  typedef enum logic [3:0] {
    C_IDLE, C_SET_LATCH, C_SET_MUX, C_SET_WRITE,
    C_GET_ADDR, C_GET_LATCH, C_GET_VALID,
    C_EX_SETUP, C_EX_GO, C_EX_LATCH, C_WAIT_STROBE
  } state_e;

  state_e     state;
  raddr_t     io_addr;
  logic [4:0] step;
  instr_t     instr;
  logic       last;
  logic       unit_done;

  fkp_microstore u_microstore (
    .step  (step),
    .instr (instr),
    .last  (last)
  );

  always_comb begin
    unique case (instr.op)
      OP_COS, OP_SIN: unit_done = cos_sin_ready;
      OP_ADD, OP_SUB: unit_done = adder_done;
      OP_MULT:        unit_done = mult_done;
      default:        unit_done = 1'b1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= C_IDLE;
      io_addr <= R_ZERO;
      step    <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (strobe) begin
          io_addr <= cmd.addr;
          step    <= '0;
          unique case (cmd.cmd)
            CMD_SET: state <= C_SET_LATCH;
            CMD_GET: state <= C_GET_ADDR;
            CMD_RUN: state <= C_EX_SETUP;
            default: state <= C_IDLE;
          endcase
        end
        C_SET_LATCH: state <= C_SET_MUX;
        C_SET_MUX:   state <= C_SET_WRITE;
        C_SET_WRITE: state <= C_WAIT_STROBE;
        C_GET_ADDR:  state <= C_GET_LATCH;
        C_GET_LATCH: state <= C_GET_VALID;
        C_GET_VALID: if (data_get_ack) state <= C_WAIT_STROBE;
        C_EX_SETUP:  state <= C_EX_GO;
        C_EX_GO:     if (unit_done) state <= C_EX_LATCH;
        C_EX_LATCH: begin
          if (last) state <= C_WAIT_STROBE;
          else begin
            step  <= step + 1'b1;
            state <= C_EX_SETUP;
          end
        end
        C_WAIT_STROBE: if (!strobe) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  logic executing;
  assign executing = (state == C_EX_SETUP) || (state == C_EX_GO) || (state == C_EX_LATCH);

  always_comb begin
    ready          = (state == C_IDLE);
    data_get_valid = (state == C_GET_VALID);
    data_in_latch  = (state == C_SET_LATCH);
    data_out_latch = (state == C_GET_LATCH);
    c_reg_latch    = (state == C_SET_WRITE) || (state == C_EX_LATCH);
    cos_sin_go     = 1'b0;
    adder_go       = 1'b0;
    mult_go        = 1'b0;
    cos_sin_sel    = (instr.op == OP_SIN);
    adder_sel      = (instr.op == OP_SUB);
    if (executing) begin
      c_reg_addr = instr.rd;
      a_reg_addr = instr.rs1;
      b_reg_addr = instr.rs2;
      unique case (instr.op)
        OP_COS, OP_SIN: mux_sel = MUX_COS_SIN;
        OP_MULT:        mux_sel = MUX_MULT;
        default:        mux_sel = MUX_ADDER;
      endcase
      if (state == C_EX_GO) begin
        cos_sin_go = (instr.op == OP_COS) || (instr.op == OP_SIN);
        adder_go   = (instr.op == OP_ADD) || (instr.op == OP_SUB);
        mult_go    = (instr.op == OP_MULT);
      end
    end else begin
      c_reg_addr = io_addr;
      a_reg_addr = io_addr;
      b_reg_addr = io_addr;
      mux_sel    = MUX_DATA_IN;
    end
  end

  // At most one functional unit is started at a time.
  a_one_go: assert property (@(posedge clk) disable iff (rst)
    $onehot0({cos_sin_go, adder_go, mult_go}));
  // data_get_valid is only released after the host acknowledged it.
  a_dgv_ack: assert property (@(posedge clk) disable iff (rst)
    data_get_valid && !data_get_ack |=> data_get_valid);

endmodule
