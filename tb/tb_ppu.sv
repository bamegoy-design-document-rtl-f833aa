// Self-checking test of the PPU with behavioural VRAM and OAM (one clock
// read latency). For several LCDC settings (8000 and 8800 tile data, both
// maps, window, 8x8 and 8x16 sprites, background off) it draws whole frames
// and compares every one of the 160x144 pixels with a reference renderer
// written from the Game Boy rules: background with SCX/SCY scrolling,
// window from WX/WY with its own line counter, the first ten sprites of a
// line in OAM order, sprite-over-sprite order (leftmost first, then OAM
// order), the priority flag, and BGP/OBP0/OBP1. It also checks the timing:
// 456 dots per line, 70224 dots between V-Blank interrupts, modes 2/3/0 on
// visible lines and mode 1 on the ten V-Blank lines, mode 3 lengthened by
// exactly SCX mod 8 dots, the LY=LYC and mode 0 STAT interrupts.
module tb_ppu;
  import gb_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  logic reg_we = 0;
  logic [3:0] reg_addr = 0;
  logic [7:0] reg_wdata = 0, reg_rdata;
  logic [12:0] vram_addr;
  logic [7:0] vram_data;
  logic [5:0] oam_idx;
  sprite_t oam_entry;
  logic pix_valid, irq_vblank, irq_stat;
  logic [7:0] pix_x, pix_y, ly;
  logic [1:0] pix_shade;
  ppu_mode_t mode;

  logic [7:0] vram [8192];
  sprite_t    oam [40];
  logic [1:0] img [144][160];
  int         npix [144];
  int checks = 0, failures = 0;
  logic [7:0] r_lcdc, r_scx, r_scy, r_wy, r_wx, r_bgp, r_obp0, r_obp1;
  bit ce_random = 0;

  ppu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    vram_data <= vram[vram_addr];
    oam_entry <= oam[oam_idx];
  end
  always @(negedge clk) ce <= ce_random ? 1'($urandom) : 1'b1;
  always @(posedge clk) if (rst_n && pix_valid) begin
    if (pix_y < 144 && pix_x < 160) begin img[pix_y][pix_x] = pix_shade; npix[pix_y]++; end
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic wreg(input int a, input logic [7:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 4'(a); reg_wdata = d;
    @(negedge clk); reg_we = 0;
    case (a)
      0: r_lcdc = d; 2: r_scy = d; 3: r_scx = d; 7: r_bgp = d; 8: r_obp0 = d; 9: r_obp1 = d;
      10: r_wy = d; 11: r_wx = d; default: ;
    endcase
  endtask

  // ---------------- reference renderer ----------------
  function automatic logic [1:0] tile_pix(input int tile_addr, input int row, input int col);
    logic [7:0] lo, hi;
    lo = vram[(tile_addr + row * 2) & 8191];
    hi = vram[(tile_addr + row * 2 + 1) & 8191];
    return {hi[7-col], lo[7-col]};
  endfunction

  function automatic int bg_tile_addr(input int t);
    if (r_lcdc[4]) return t * 16;
    return 4096 + ((t >= 128) ? t - 256 : t) * 16;
  endfunction

  task automatic reference(output logic [1:0] ref_img [144][160]);
    int wline, h, by, bx, ma, c, key, best_key, sx, r, t;
    logic [1:0] bgc, sc; logic win_line_used; sprite_t kept [$]; int kidx [$];
    sprite_t best;
    wline = 0;
    h = r_lcdc[2] ? 16 : 8;
    for (int y = 0; y < 144; y++) begin
      kept.delete();
      for (int i = 0; i < 40; i++)
        if (y + 16 >= int'(oam[i].y) && y + 16 < int'(oam[i].y) + h && kept.size() < 10) kept.push_back(oam[i]);
      win_line_used = 0;
      for (int x = 0; x < 160; x++) begin
        if (r_lcdc[5] && y >= int'(r_wy) && x + 7 >= int'(r_wx)) begin
          win_line_used = 1;
          bx = x + 7 - int'(r_wx); by = wline;
          ma = (r_lcdc[6] ? 'h1C00 : 'h1800) + (by / 8) * 32 + bx / 8;
        end else begin
          bx = (x + int'(r_scx)) & 255; by = (y + int'(r_scy)) & 255;
          ma = (r_lcdc[3] ? 'h1C00 : 'h1800) + (by / 8) * 32 + bx / 8;
        end
        bgc = tile_pix(bg_tile_addr(int'(vram[ma])), by % 8, bx % 8);
        if (!r_lcdc[0]) bgc = 0;
        // sprites: first opaque pixel in fetch order
        best_key = 1 << 30; sc = 0; best = '0;
        if (r_lcdc[1]) for (int k = 0; k < kept.size(); k++) begin
          sx = int'(kept[k].x) - 8;
          if (x >= sx && x < sx + 8) begin
            c = x - sx; if (kept[k].flags[5]) c = 7 - c;
            r = y + 16 - int'(kept[k].y); if (kept[k].flags[6]) r = h - 1 - r;
            t = r_lcdc[2] ? ((int'(kept[k].tile) & 'hFE) + r / 8) : int'(kept[k].tile);
            key = ((int'(kept[k].x) < 8 ? 8 : int'(kept[k].x)) << 8) + k;
            if (tile_pix(t * 16, r % 8, c) != 0 && key < best_key) begin
              best_key = key; best = kept[k]; sc = tile_pix(t * 16, r % 8, c);
            end
          end
        end
        if (sc != 0 && !(best.flags[7] && bgc != 0))
          ref_img[y][x] = best.flags[4] ? r_obp1[2*sc +: 2] : r_obp0[2*sc +: 2];
        else
          ref_img[y][x] = r_bgp[2*bgc +: 2];
      end
      if (win_line_used) wline++;
    end
  endtask

  // ---------------- frame runner ----------------
  int m3_len [154];
  int stat_irqs, vbl_irqs;

  // Turn the LCD on with lcdc, run one frame, compare, collect timing.
  task automatic run_frame(input string name, input logic [7:0] lcdc);
    logic [1:0] ref_img [144][160];
    int dots, line_dots, bad, lines_seen, vbl_lines, m2, m3, m0;
    ppu_mode_t prev;
    wreg(0, 8'h00);
    repeat (4) @(negedge clk);
    for (int y = 0; y < 144; y++) npix[y] = 0;
    stat_irqs = 0; vbl_irqs = 0;
    wreg(0, lcdc);
    reference(ref_img);
    // one frame: until LY wraps from 153 to 0
    dots = 0; line_dots = 0; lines_seen = 0; vbl_lines = 0; m2 = 0; m3 = 0; m0 = 0;
    for (int i = 0; i < 154; i++) m3_len[i] = 0;
    do begin
      @(posedge clk);
      if (irq_stat) stat_irqs++;
      if (irq_vblank) vbl_irqs++;
      if (ce) begin
        dots++;
        if (mode == MODE_DRAW) m3_len[ly]++;
        if (ly < 144) begin
          if (mode == MODE_OAM) m2++;
          if (mode == MODE_VBLANK) m0 = -100000;
        end else if (mode != MODE_VBLANK) vbl_lines = -100000;
      end
      @(negedge clk);
    end while (!(ly == 153 && dut.dot == 9'd455 && ce));
    @(posedge clk); dots++;
    @(negedge clk);
    chk({name, " dots per frame"}, dots, 70224);
    chk({name, " mode 2 dots"}, m2, 144 * 80);
    chk({name, " modes on visible lines"}, m0, 0);
    chk({name, " mode 1 on V-Blank lines"}, vbl_lines, 0);
    chk({name, " V-Blank interrupts"}, vbl_irqs, 1);
    bad = 0;
    for (int y = 0; y < 144; y++) begin
      chk({name, " pixels on a line"}, npix[y], 160);
      chk({name, " mode 3 present"}, m3_len[y] > 160, 1);
      for (int x = 0; x < 160; x++) if (img[y][x] != ref_img[y][x]) begin
        bad++;
        if (bad < 5) $display("%s pixel (%0d,%0d) got %0d exp %0d", name, x, y, img[y][x], ref_img[y][x]);
      end
    end
    chk({name, " wrong pixels"}, bad, 0);
  endtask

  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int base_len;
    for (int i = 0; i < 8192; i++) vram[i] = 8'($urandom);
    for (int i = 0; i < 40; i++) begin
      oam[i] = sprite_t'($urandom);
      oam[i].y = 8'($urandom % 170);
      oam[i].x = 8'($urandom % 176);
    end
    // crowd line 60 to exceed ten sprites
    for (int i = 0; i < 14; i++) begin oam[i].y = 8'(60 + 16 - (i % 4)); oam[i].x = 8'(10 + 9 * i); end
    // overlapping sprites and ones cut by the left edge
    oam[20].x = 8'd30; oam[20].y = 8'd100; oam[21].x = 8'd27; oam[21].y = 8'd98;
    oam[22].x = 8'd3;  oam[22].y = 8'd50;  oam[23].x = 8'd5; oam[23].y = 8'd52;
    repeat (3) @(negedge clk); rst_n = 1;

    wreg(7, 8'hE4); wreg(8, 8'hD2); wreg(9, 8'h1B);
    // scroll only, no sprites, no window: mode 3 length base
    wreg(2, 8'h00); wreg(3, 8'h00); wreg(10, 8'd200); wreg(11, 8'd200);
    run_frame("plain", 8'h91);
    base_len = m3_len[10];
    for (int y = 0; y < 144; y++) chk("constant mode 3", m3_len[y], base_len);
    // SCX mod 8 = 3 stretches mode 3 by 3 dots
    wreg(3, 8'h0B); wreg(2, 8'h25);
    run_frame("scx", 8'h91);
    for (int y = 0; y < 144; y++) chk("mode 3 + SCX mod 8", m3_len[y], base_len + 3);
    // window, 8800 data, 8x8 sprites, LY=LYC interrupt
    wreg(3, 8'h3D); wreg(2, 8'hA7); wreg(10, 8'd40); wreg(11, 8'd50); wreg(5, 8'd77); wreg(1, 8'h40);
    run_frame("window", 8'hE3);
    chk("LYC interrupts", stat_irqs, 1);
    // 8x16 sprites, 8000 data, map $9C00, mode 0 interrupt
    wreg(1, 8'h08); wreg(3, 8'h06); wreg(2, 8'h10);
    run_frame("tall", 8'h9F);
    chk("mode 0 interrupts", stat_irqs, 144);
    // background off, window on map $9C00, sprites on, random ce
    wreg(1, 8'h00); wreg(10, 8'd0); wreg(11, 8'd7);
    ce_random = 1;
    run_frame("bgoff", 8'hF6);
    ce_random = 0;
    // register read-back
    reg_addr = 4'h0; #1; chk("LCDC read", reg_rdata, 8'hF6);
    reg_addr = 4'hB; #1; chk("WX read", reg_rdata, 8'd7);
    reg_addr = 4'h7; #1; chk("BGP read", reg_rdata, 8'hE4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
