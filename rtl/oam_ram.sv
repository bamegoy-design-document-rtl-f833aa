// Object Attribute Memory: 40 sprite entries of 4 bytes ($FE00-$FE9F).
// The byte port serves the CPU bus and OAM DMA (read data one clock after
// the enable). The PPU port returns a whole entry (Y, X, tile, flags) one
// clock after ppu_idx is presented, so the OAM scan checks one sprite per
// two dots. The entry-wide PPU port is this design's choice.
module oam_ram
  import gb_pkg::*;
#(
  parameter int N_SPRITES = 40
) (
  input  logic        clk,
  input  logic        cpu_en,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_addr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  input  logic [5:0]  ppu_idx,
  output sprite_t     ppu_entry
);
  localparam int NB = 4 * N_SPRITES;
  logic [7:0] mem [NB];

  initial begin
    for (int i = 0; i < NB; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (cpu_en && int'(cpu_addr) < NB) begin
      if (cpu_we) mem[cpu_addr] <= cpu_wdata;
      cpu_rdata <= mem[cpu_addr];
    end else if (cpu_en) begin
      cpu_rdata <= 8'hFF;
    end
    if (int'(ppu_idx) < N_SPRITES)
      ppu_entry <= {mem[4*ppu_idx+3], mem[4*ppu_idx+2], mem[4*ppu_idx+1], mem[4*ppu_idx]};
    else
      ppu_entry <= '0;
  end
endmodule
