// cos_sin_unit: cosine and sine of a fixed-point angle by lookup in an
// external ROM.
//
// The angle on a_bus is an 8.8 fixed-point number of radians. The ROM address
// is formed from 13 bits: {sel, sign bit a_bus[15], a_bus[10:0]}, that is the
// function select (0 = cosine, 1 = sine), the sign, the three least significant
// integer bits and the eight fraction bits. For angles inside +/-8 rad the
// low 12 address bits are simply the angle in 12-bit two's complement. The ROM
// word returned is the 8.8 fixed-point cosine or sine.
//
// States: IDLE registers the address and the wait-state count every clock and
// waits for go; WAIT holds the address for wait_states+1 clocks so that a slow
// ROM can settle; LATCH copies rom_data into c_bus; DONE raises ready for one
// clock and returns to IDLE. The ready pulse appears wait_states+2 clocks
// after the clock edge that first samples go high. The caller is expected to
// drop go once it has seen ready, otherwise a new lookup starts.
//
// The address format, the wait-state mechanism and the four-state sequence
// follow the original design. Synchronous active-high reset returns to IDLE.
module cos_sin_unit
  import fkp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  fix16_t            a_bus,
  input  logic              go,
  input  logic              sel,          // 0 = cosine, 1 = sine
  input  logic [WAIT_W-1:0] wait_states,  // extra ROM access clocks, 0..7
  output logic              ready,
  output fix16_t            c_bus,
  output logic [ROM_AW-1:0] rom_addr,
  input  fix16_t            rom_data
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_LATCH, S_DONE} state_e;
  state_e            state;
  logic [WAIT_W-1:0] wait_count, wait_counter;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      wait_count   <= '0;
      wait_counter <= '0;
      rom_addr     <= '0;
      c_bus        <= FIX_ZERO;
    end else begin
      unique case (state)
        S_IDLE: begin
          wait_count   <= wait_states;
          wait_counter <= '0;
          rom_addr     <= {sel, a_bus[WORD_W-1], a_bus[10:0]};
          if (go) state <= S_WAIT;
        end
        S_WAIT: begin
          if (wait_counter == wait_count) state <= S_LATCH;
          else wait_counter <= wait_counter + 1'b1;
        end
        S_LATCH: begin
          c_bus <= rom_data;
          state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_DONE);

endmodule
