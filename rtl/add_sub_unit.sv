// add_sub_unit: bit-serial ripple adder/subtractor.
//
// Computes c_bus = a_bus + b_bus (sel = 0) or a_bus - b_bus (sel = 1) in two's
// complement, one bit per clock, using the full-adder equations
//   carry = ab + c(a + b),  sum = abc + (a + b + c)·not(carry).
// Subtraction inverts the B operand and feeds sel in as the first carry.
// Overflow is not detected: the operands of the kinematics never overflow
// the word.
//
// Handshake (level): the caller raises go and holds it. The first clock with
// go in IDLE captures both operands (B already inverted for a subtraction);
// WIDTH clocks then produce one sum bit each; the next clock writes the sum to
// c_bus and raises done. done stays high until go is released, which returns
// the unit to IDLE. done therefore rises WIDTH+2 clocks after the clock edge
// that first samples go. WIDTH is 16 for the processor's adder and 32 for the
// accumulator inside the multiplier.
//
// The bit-per-clock state machine and the go/done handshake follow the
// original design. Capturing A with B at the start (rather than reading the
// A bus during the whole addition) is this implementation's choice.
module add_sub_unit #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] a_bus,
  input  logic [WIDTH-1:0] b_bus,
  input  logic             go,
  input  logic             sel,     // 0 = add, 1 = subtract
  output logic             done,
  output logic [WIDTH-1:0] c_bus
);

  localparam int unsigned IDX_W = $clog2(WIDTH);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN, S_DONE} state_e;
  state_e           state;
  logic [WIDTH-1:0] a_q, bx_q, sum_q;
  logic             carry_q;
  logic [IDX_W-1:0] idx;
  logic             abit, bbit, cout, sbit;

  assign abit = a_q[idx];
  assign bbit = bx_q[idx];
  assign cout = (abit & bbit) | (carry_q & (abit | bbit));
  assign sbit = (abit & bbit & carry_q) | ((abit | bbit | carry_q) & ~cout);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      a_q     <= '0;
      bx_q    <= '0;
      sum_q   <= '0;
      carry_q <= 1'b0;
      idx     <= '0;
      c_bus   <= '0;
    end else if (!go) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: begin
          a_q     <= a_bus;
          bx_q    <= b_bus ^ {WIDTH{sel}};
          carry_q <= sel;
          idx     <= '0;
          state   <= S_RUN;
        end
        S_RUN: begin
          sum_q[idx] <= sbit;
          carry_q    <= cout;
          idx        <= idx + 1'b1;
          if (idx == IDX_W'(WIDTH-1)) state <= S_FIN;
        end
        S_FIN: begin
          c_bus <= sum_q;
          state <= S_DONE;
        end
        S_DONE: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = (state == S_DONE);

endmodule
