// BameGoy: a Game Boy (DMG) compatible system built around an external
// GB-Z80 CPU core. This top level holds everything but the CPU: the
// memory map with cartridge ROM (32 KiB, loaded by the host), VRAM, external
// RAM, WRAM, OAM and HRAM; the timer, interrupt, joypad and OAM DMA
// registers; the PPU; a framebuffer; the 640x480 VGA output at 3:1 scale;
// and the Avalon-MM slave for the host.
// One clock (CLK_HZ) runs everything. A phase accumulator makes cpu_ce, the
// 4.194304 MHz Game Boy tick that paces the PPU, timer and DMA and that the
// CPU core should follow; the VGA pixel tick is every other clock (25 MHz
// from 50 MHz). With CLK_HZ = GB_HZ the tick is every clock.
// CPU bus: cpu_rd / cpu_wr are one-clock strobes; cpu_rdata is valid the
// clock after cpu_rd. cpu_irq_flags = IE & IF; the core pulses cpu_int_ack
// to clear the IF bit it services. cpu_rst_n is low until the host sets
// the run bit.
module bamegoy_top
  import gb_pkg::*;
#(
  parameter int CLK_HZ = 50_000_000,
  parameter int GB_HZ  = 4_194_304
) (
  input  logic        clk,
  input  logic        rst_n,
  // external GB-Z80 CPU core
  input  logic [15:0] cpu_addr,
  input  logic        cpu_rd,
  input  logic        cpu_wr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  output logic [4:0]  cpu_irq_flags,
  input  logic [4:0]  cpu_int_ack,
  output logic        cpu_ce,
  output logic        cpu_rst_n,
  // host Avalon-MM slave
  input  logic        avs_chipselect,
  input  logic [2:0]  avs_address,
  input  logic        avs_write,
  input  logic        avs_read,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // VGA
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank_n
);
  // ---------------- clock enables ----------------
  logic [31:0] phase;
  logic        ce, pix_ce;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; ce <= 1'b0; pix_ce <= 1'b0;
    end else begin
      pix_ce <= !pix_ce;
      if (phase + 32'(GB_HZ) >= 32'(CLK_HZ)) begin
        phase <= phase + 32'(GB_HZ) - 32'(CLK_HZ);
        ce    <= 1'b1;
      end else begin
        phase <= phase + 32'(GB_HZ);
        ce    <= 1'b0;
      end
    end
  end
  assign cpu_ce = ce;

  // ---------------- host interface ----------------
  logic        rom_we, cpu_run;
  logic [14:0] rom_waddr;
  logic [7:0]  rom_wdata, buttons;
  ppu_mode_t   mode;
  logic [7:0]  ly;

  avalon_if u_avalon (
    .clk, .rst_n, .avs_chipselect, .avs_address, .avs_write, .avs_read,
    .avs_writedata, .avs_readdata,
    .rom_we, .rom_addr(rom_waddr), .rom_wdata, .buttons, .cpu_run,
    .ly, .mode(mode)
  );
  assign cpu_rst_n = rst_n && cpu_run;

  // ---------------- memory map ----------------
  logic [15:0] m_addr, dma_addr;
  logic [7:0]  m_wdata, dma_rdata;
  logic        rom_en, vram_en, vram_we, eram_en, eram_we, wram_en, wram_we;
  logic        oam_en, oam_we, hram_en, hram_we;
  logic [6:0]  hram_addr;
  logic [7:0]  rom_rdata, vram_rdata, eram_rdata, wram_rdata, oam_rdata, hram_rdata;
  logic        joy_we, timer_we, if_we, ie_we, ppu_we, dma_start;
  logic [7:0]  joy_rdata, timer_rdata, if_rdata, ie_rdata, ppu_rdata;
  logic        dma_active, dma_rd, dma_oam_we;
  logic [7:0]  dma_oam_addr, dma_oam_wdata;

  bus_ctrl u_bus (
    .clk, .rst_n,
    .cpu_addr, .cpu_rd, .cpu_wr, .cpu_wdata, .cpu_rdata,
    .dma_active, .dma_addr, .dma_rd, .dma_rdata,
    .m_addr, .m_wdata,
    .rom_en, .vram_en, .vram_we, .eram_en, .eram_we, .wram_en, .wram_we,
    .oam_en, .oam_we, .hram_en, .hram_we, .hram_addr,
    .rom_rdata, .vram_rdata, .eram_rdata, .wram_rdata, .oam_rdata, .hram_rdata,
    .joy_we, .timer_we, .if_we, .ie_we, .ppu_we, .dma_start,
    .joy_rdata, .timer_rdata, .if_rdata, .ie_rdata, .ppu_rdata
  );

  // cartridge ROM: port A CPU reads, port B host loading
  logic [7:0] rom_b_unused;
  dp_ram #(.AW(15), .DW(8)) u_rom (
    .clk,
    .a_en(rom_en), .a_we(1'b0), .a_addr(m_addr[14:0]), .a_wdata(8'h00), .a_rdata(rom_rdata),
    .b_en(rom_we), .b_we(rom_we), .b_addr(rom_waddr), .b_wdata(rom_wdata), .b_rdata(rom_b_unused)
  );

  // VRAM: port A CPU, port B PPU
  logic [12:0] ppu_vram_addr;
  logic [7:0]  ppu_vram_data;
  dp_ram #(.AW(13), .DW(8)) u_vram (
    .clk,
    .a_en(vram_en), .a_we(vram_we), .a_addr(m_addr[12:0]), .a_wdata(m_wdata), .a_rdata(vram_rdata),
    .b_en(1'b1), .b_we(1'b0), .b_addr(ppu_vram_addr), .b_wdata(8'h00), .b_rdata(ppu_vram_data)
  );

  logic [7:0] eram_b_unused, wram_b_unused, hram_b_unused;
  dp_ram #(.AW(13), .DW(8)) u_eram (
    .clk,
    .a_en(eram_en), .a_we(eram_we), .a_addr(m_addr[12:0]), .a_wdata(m_wdata), .a_rdata(eram_rdata),
    .b_en(1'b0), .b_we(1'b0), .b_addr(13'd0), .b_wdata(8'h00), .b_rdata(eram_b_unused)
  );
  dp_ram #(.AW(13), .DW(8)) u_wram (
    .clk,
    .a_en(wram_en), .a_we(wram_we), .a_addr(m_addr[12:0]), .a_wdata(m_wdata), .a_rdata(wram_rdata),
    .b_en(1'b0), .b_we(1'b0), .b_addr(13'd0), .b_wdata(8'h00), .b_rdata(wram_b_unused)
  );
  dp_ram #(.AW(7), .DW(8)) u_hram (
    .clk,
    .a_en(hram_en), .a_we(hram_we), .a_addr(hram_addr), .a_wdata(cpu_wdata), .a_rdata(hram_rdata),
    .b_en(1'b0), .b_we(1'b0), .b_addr(7'd0), .b_wdata(8'h00), .b_rdata(hram_b_unused)
  );

  // OAM: byte port shared by the bus and DMA, entry port to the PPU
  logic [5:0] ppu_oam_idx;
  sprite_t    ppu_oam_entry;
  oam_ram u_oam (
    .clk,
    .cpu_en   (oam_en || dma_oam_we),
    .cpu_we   (oam_we || dma_oam_we),
    .cpu_addr (dma_oam_we ? dma_oam_addr : m_addr[7:0]),
    .cpu_wdata(dma_oam_we ? dma_oam_wdata : m_wdata),
    .cpu_rdata(oam_rdata),
    .ppu_idx  (ppu_oam_idx),
    .ppu_entry(ppu_oam_entry)
  );

  oam_dma u_dma (
    .clk, .rst_n, .ce,
    .start(dma_start), .src_hi(m_wdata),
    .active(dma_active), .bus_addr(dma_addr), .bus_rd(dma_rd), .bus_rdata(dma_rdata),
    .oam_we(dma_oam_we), .oam_addr(dma_oam_addr), .oam_wdata(dma_oam_wdata)
  );

  // ---------------- I/O devices ----------------
  logic irq_timer, irq_joy, irq_vblank, irq_stat;

  timer u_timer (
    .clk, .rst_n, .ce, .we(timer_we), .addr(m_addr[1:0]), .wdata(m_wdata),
    .rdata(timer_rdata), .irq(irq_timer)
  );

  joypad u_joy (
    .clk, .rst_n, .buttons, .we(joy_we), .wdata(m_wdata), .rdata(joy_rdata), .irq(irq_joy)
  );

  logic [4:0] int_req;
  always_comb begin
    int_req             = '0;
    int_req[INT_VBLANK] = irq_vblank;
    int_req[INT_STAT]   = irq_stat;
    int_req[INT_TIMER]  = irq_timer;
    int_req[INT_SERIAL] = 1'b0;     // no serial link
    int_req[INT_JOYPAD] = irq_joy;
  end

  int_ctrl u_int (
    .clk, .rst_n,
    .req(int_req),
    .ack(cpu_int_ack),
    .ie_we, .if_we, .wdata(m_wdata),
    .ie_rdata, .if_rdata, .irq_flags(cpu_irq_flags)
  );

  // ---------------- video ----------------
  logic       pix_valid;
  logic [7:0] pix_x, pix_y;
  logic [1:0] pix_shade;

  ppu u_ppu (
    .clk, .rst_n, .ce,
    .reg_we(ppu_we), .reg_addr(m_addr[3:0]), .reg_wdata(m_wdata), .reg_rdata(ppu_rdata),
    .vram_addr(ppu_vram_addr), .vram_data(ppu_vram_data),
    .oam_idx(ppu_oam_idx), .oam_entry(ppu_oam_entry),
    .pix_valid, .pix_x, .pix_y, .pix_shade,
    .irq_vblank, .irq_stat, .mode, .ly
  );

  logic [7:0] fb_x, fb_y;
  logic [1:0] fb_shade;

  framebuffer u_fb (
    .clk, .we(pix_valid), .wx(pix_x), .wy(pix_y), .wshade(pix_shade),
    .rx(fb_x), .ry(fb_y), .rshade(fb_shade)
  );

  vga_out u_vga (
    .clk, .rst_n, .pix_ce, .fb_x, .fb_y, .fb_shade,
    .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync, .vga_blank_n
  );
endmodule
