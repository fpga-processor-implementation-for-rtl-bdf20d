// cos_sin_rom_model: behavioural model of the external cosine/sine ROM
// (8K x 16), for simulation only.
//
// Contents: see fkp_tb_pkg::rom_word (cosine for addr[12] = 0, sine for
// addr[12] = 1, of the 12-bit two's complement 4.8 angle in addr[11:0]).
// Access time: data is only valid once the address has been stable for
// ACCESS_CYCLES rising clock edges; before that the model drives the marker
// word 16'h5A5A. With a 40 ns clock a 150 ns part needs ACCESS_CYCLES = 4.
module cos_sin_rom_model
  import fkp_pkg::*;
  import fkp_tb_pkg::*;
#(
  parameter int unsigned ACCESS_CYCLES = 4
) (
  input  logic              clk,
  input  logic [ROM_AW-1:0] addr,
  output fix16_t            data
);

  fix16_t            mem [2**ROM_AW];
  logic [ROM_AW-1:0] prev_addr = '0;
  int unsigned       stable = 0;

  initial for (int i = 0; i < 2**ROM_AW; i++) mem[i] = rom_word(ROM_AW'(i));

  always @(posedge clk) begin
    if (addr != prev_addr) begin
      prev_addr <= addr;
      stable    <= 1;
    end else if (stable < 1000) begin
      stable <= stable + 1;
    end
  end

  assign data = (addr == prev_addr && stable >= ACCESS_CYCLES) ? mem[addr] : 16'sh5A5A;

endmodule
