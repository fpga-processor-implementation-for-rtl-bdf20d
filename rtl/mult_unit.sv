// mult_unit: 8.8 fixed-point multiplier built from a 32-bit serial adder.
//
// The product of two 16-bit words is formed as the sum of 16 partial products,
// partial product i being A shifted left by i when bit i of B is set and zero
// otherwise. The partial products are accumulated one at a time in a 32-bit
// register through an add_sub_unit of width 32, the same bit-serial adder as
// the processor's adder/subtractor. A is sign-extended to 32 bits and the
// partial product of the sign bit B[15] is subtracted instead of added, so the
// 32-bit accumulator ends up holding the exact signed product. The 8.8 result
// is accumulator bits 23..8 (truncation toward minus infinity); bits above 23
// are dropped, as the operands of the kinematics never overflow the word.
//
// Handshake (level, like the adder): raise go and hold it; the first clock
// with go captures the operands; done rises once all 16 partial products are
// summed and stays high until go is released. Each partial-product addition
// takes 36 clocks (34 in the 32-bit adder, one to take its sum, one to
// release it), so done rises 16*36+1 clock edges after go is first sampled.
//
// Building the multiplier around a 32-bit copy of the serial adder and adding
// all 16 partial products follows the original design. Sign extension of A and
// subtraction of the last partial product are this implementation's choice:
// they make negative operands (sines and cosines of many joint angles) give
// the right product.
module mult_unit
  import fkp_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  fix16_t a_bus,
  input  fix16_t b_bus,
  input  logic   go,
  output logic   done,
  output fix16_t c_bus
);

  typedef enum logic [2:0] {S_IDLE, S_ADD, S_NEXT, S_FIN, S_DONE} state_e;
  state_e             state;
  logic signed [31:0] a_ext, acc;
  fix16_t             b_q;
  logic [3:0]         pp_idx;
  logic [31:0]        pp;
  logic               add_go, add_sel, add_done;
  logic [31:0]        add_sum;

  assign pp      = b_q[pp_idx] ? (a_ext <<< pp_idx) : 32'd0;
  assign add_go  = (state == S_ADD);
  assign add_sel = (pp_idx == 4'd15);

  add_sub_unit #(.WIDTH(32)) u_acc_adder (
    .clk   (clk),
    .rst   (rst),
    .a_bus (acc),
    .b_bus (pp),
    .go    (add_go),
    .sel   (add_sel),
    .done  (add_done),
    .c_bus (add_sum)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      a_ext  <= '0;
      b_q    <= FIX_ZERO;
      acc    <= '0;
      pp_idx <= '0;
      c_bus  <= FIX_ZERO;
    end else if (!go) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: begin
          a_ext  <= 32'(a_bus);
          b_q    <= b_bus;
          acc    <= '0;
          pp_idx <= '0;
          state  <= S_ADD;
        end
        S_ADD: if (add_done) begin
          acc   <= add_sum;
          state <= S_NEXT;
        end
        S_NEXT: begin
          // adder sees go low here and returns to idle
          if (pp_idx == 4'd15) state <= S_FIN;
          else begin
            pp_idx <= pp_idx + 1'b1;
            state  <= S_ADD;
          end
        end
        S_FIN: begin
          c_bus <= acc[23:8];
          state <= S_DONE;
        end
        S_DONE: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = (state == S_DONE);

endmodule
