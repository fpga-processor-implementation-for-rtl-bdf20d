// reg_file: 32-word by 16-bit register file of the processor.
//
// One write port (C bus) and two read ports (A bus and B bus). Word 0 always
// reads 0.0 and word 1 always reads 1.0 (16'h0100 in 8.8 format); writes to
// them are ignored. These two constants let the adder/subtractor move or
// negate a value (x + 0, 0 - x). The other 30 words hold the DH constants,
// the joint angles, intermediate terms and the 12 results.
//
// Timing: a write with c_latch high takes effect at the clock edge. Both read
// ports are registered: a_bus and b_bus show the word addressed before a
// clock edge after that edge (one clock of read latency), as in the original
// design. Synchronous active-high reset clears words 2..31.
//
// NWORDS sets the number of words; the default is the full 32 of the
// processor. NWORDS = 16 gives the half-size file that was built on its own
// as the first hardware test of the design: addresses at or above NWORDS
// then read 0.0 and ignore writes. The address ports stay 5 bits wide.
module reg_file
  import fkp_pkg::*;
#(
  parameter int unsigned NWORDS = NREGS
)
(
  input  logic   clk,
  input  logic   rst,
  input  fix16_t c_bus,
  input  logic   c_latch,
  input  raddr_t c_addr,
  input  raddr_t a_addr,
  output fix16_t a_bus,
  input  raddr_t b_addr,
  output fix16_t b_bus
);

  localparam int unsigned IW = $clog2(NWORDS);

  fix16_t regs [NWORDS];

  function automatic logic in_range(input raddr_t ad);
    return 32'(ad) < NWORDS;
  endfunction

  function automatic fix16_t rd(input raddr_t ad, input fix16_t w);
    if (ad == R_ZERO)     return FIX_ZERO;
    else if (ad == R_ONE) return FIX_ONE;
    else if (!in_range(ad)) return FIX_ZERO;
    else                  return w;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NWORDS; i++) regs[i] <= FIX_ZERO;
      a_bus <= FIX_ZERO;
      b_bus <= FIX_ZERO;
    end else begin
      if (c_latch && c_addr != R_ZERO && c_addr != R_ONE && in_range(c_addr))
        regs[c_addr[IW-1:0]] <= c_bus;
      a_bus <= rd(a_addr, regs[a_addr[IW-1:0]]);
      b_bus <= rd(b_addr, regs[b_addr[IW-1:0]]);
    end
  end

endmodule
