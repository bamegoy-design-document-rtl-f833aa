// Memory map of the 16-bit Game Boy address space. It decodes each access
// of the CPU (or of OAM DMA, which owns the bus while active) into one
// region, drives the shared memory-side address, data and strobes, and
// returns the region's data one clock after the read strobe:
//   $0000-$7FFF cartridge ROM (writes ignored, no bank controller)
//   $8000-$9FFF VRAM      $A000-$BFFF external RAM   $C000-$DFFF WRAM
//   $E000-$FDFF echo, not emulated: reads $FF     $FE00-$FE9F OAM
//   $FF00 joypad  $FF01 SB  $FF02 SC  $FF04-$FF07 timer  $FF0F IF
//   $FF40-$FF4B LCD registers ($FF46 starts OAM DMA)  $FF50 boot ROM control
//   $FF80-$FFFE HRAM      $FFFF IE
// Unmapped addresses read $FF. SB, SC and $FF50 are plain registers here
// (no serial link, no boot ROM). During DMA the CPU reaches HRAM only; its
// other accesses are dropped and read $FF. Strobes (cpu_rd, cpu_wr,
// dma_rd) last one clock per access. I/O devices read combinationally;
// their value is registered here so every region has the same latency.
module bus_ctrl
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU
  input  logic [15:0] cpu_addr,
  input  logic        cpu_rd,
  input  logic        cpu_wr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  // OAM DMA master
  input  logic        dma_active,
  input  logic [15:0] dma_addr,
  input  logic        dma_rd,
  output logic [7:0]  dma_rdata,
  // memories (port A), shared address/data
  output logic [15:0] m_addr,
  output logic [7:0]  m_wdata,
  output logic        rom_en,  output logic vram_en, output logic vram_we,
  output logic        eram_en, output logic eram_we,
  output logic        wram_en, output logic wram_we,
  output logic        oam_en,  output logic oam_we,
  output logic        hram_en, output logic hram_we,
  output logic [6:0]  hram_addr,
  input  logic [7:0]  rom_rdata, input logic [7:0] vram_rdata,
  input  logic [7:0]  eram_rdata, input logic [7:0] wram_rdata,
  input  logic [7:0]  oam_rdata, input logic [7:0] hram_rdata,
  // I/O registers: shared write strobe per device, offsets from m_addr
  output logic        joy_we, output logic timer_we, output logic if_we,
  output logic        ie_we,  output logic ppu_we,   output logic dma_start,
  input  logic [7:0]  joy_rdata, input logic [7:0] timer_rdata,
  input  logic [7:0]  if_rdata,  input logic [7:0] ie_rdata,
  input  logic [7:0]  ppu_rdata
);
  logic        cpu_hram, cpu_ok;
  logic [15:0] a;
  logic        rd, wr;
  region_t     reg_sel, cpu_sel_q, dma_sel_q;
  logic [7:0]  io_val, cpu_io_q, dma_io_q;
  logic [7:0]  sb_q, sc_q, boot_q;
  logic        cpu_hram_q;

  assign cpu_hram = (decode_region(cpu_addr) == REG_HRAM);
  assign cpu_ok   = !dma_active;

  // bus master selection
  assign a  = dma_active ? dma_addr : cpu_addr;
  assign rd = dma_active ? dma_rd   : cpu_rd;
  assign wr = dma_active ? 1'b0     : cpu_wr;
  assign reg_sel = decode_region(a);
  assign m_addr  = a;
  assign m_wdata = cpu_wdata;

  assign rom_en  = (rd) && reg_sel == REG_ROM;
  assign vram_en = (rd || wr) && reg_sel == REG_VRAM;  assign vram_we = wr && reg_sel == REG_VRAM;
  assign eram_en = (rd || wr) && reg_sel == REG_ERAM;  assign eram_we = wr && reg_sel == REG_ERAM;
  assign wram_en = (rd || wr) && reg_sel == REG_WRAM;  assign wram_we = wr && reg_sel == REG_WRAM;
  assign oam_en  = (rd || wr) && reg_sel == REG_OAM;   assign oam_we  = wr && reg_sel == REG_OAM;
  // HRAM always listens to the CPU, even during DMA
  assign hram_addr = cpu_addr[6:0];
  assign hram_en   = (cpu_rd || cpu_wr) && cpu_hram;
  assign hram_we   = cpu_wr && cpu_hram;

  logic io_wr;
  assign io_wr     = wr && reg_sel == REG_IO;
  assign joy_we    = io_wr && a[6:0] == 7'h00;
  assign timer_we  = io_wr && a[6:2] == 5'b00001;          // $FF04-$FF07
  assign if_we     = io_wr && a[6:0] == 7'h0F;
  assign ppu_we    = io_wr && a[6:4] == 3'b100 && a[3:0] <= 4'hB && a[3:0] != 4'h6;
  assign dma_start = io_wr && a[6:0] == 7'h46;
  assign ie_we     = wr && reg_sel == REG_IE;

  always_comb begin
    io_val = 8'hFF;
    if (reg_sel == REG_IE) io_val = ie_rdata;
    else if (reg_sel == REG_IO) begin
      if (a[6:0] == 7'h00)                               io_val = joy_rdata;
      else if (a[6:0] == 7'h01)                          io_val = sb_q;
      else if (a[6:0] == 7'h02)                          io_val = sc_q;
      else if (a[6:2] == 5'b00001)                       io_val = timer_rdata;
      else if (a[6:0] == 7'h0F)                          io_val = if_rdata;
      else if (a[6:4] == 3'b100 && a[3:0] <= 4'hB)       io_val = ppu_rdata;
      else if (a[6:0] == 7'h50)                          io_val = boot_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_sel_q <= REG_NONE; dma_sel_q <= REG_NONE; cpu_hram_q <= 1'b0;
      cpu_io_q <= 8'hFF; dma_io_q <= 8'hFF;
      sb_q <= '0; sc_q <= '0; boot_q <= '0;
    end else begin
      if (cpu_rd) begin
        cpu_hram_q <= cpu_hram;
        cpu_sel_q  <= cpu_ok ? reg_sel : REG_NONE;
        cpu_io_q   <= cpu_ok ? io_val  : 8'hFF;
      end
      if (dma_active && dma_rd) begin
        dma_sel_q <= reg_sel;
        dma_io_q  <= io_val;
      end
      if (io_wr && a[6:0] == 7'h01) sb_q   <= cpu_wdata;
      if (io_wr && a[6:0] == 7'h02) sc_q   <= cpu_wdata;
      if (io_wr && a[6:0] == 7'h50) boot_q <= cpu_wdata;
    end
  end

  function automatic logic [7:0] pick(input region_t s, input logic [7:0] io);
    unique case (s)
      REG_ROM:  return rom_rdata;
      REG_VRAM: return vram_rdata;
      REG_ERAM: return eram_rdata;
      REG_WRAM: return wram_rdata;
      REG_OAM:  return oam_rdata;
      REG_HRAM: return hram_rdata;
      REG_IO, REG_IE: return io;
      default:  return 8'hFF;
    endcase
  endfunction

  assign cpu_rdata = cpu_hram_q ? hram_rdata : pick(cpu_sel_q, cpu_io_q);
  assign dma_rdata = pick(dma_sel_q, dma_io_q);
endmodule
