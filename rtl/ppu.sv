// Pixel processing unit. It owns the LCD registers $FF40-$FF4B (LCDC,
// STAT, SCY, SCX, LY, LYC, BGP, OBP0, OBP1, WY, WX; $FF46 belongs to OAM
// DMA and reads $FF here) and draws one scanline at a time:
//   mode 2  dots 0-79:   OAM scan picks up to 10 sprites on line LY;
//   mode 3  from dot 80: the background/window fetcher fills the 8-pixel
//           background FIFO, the sprite fetcher merges sprite rows into the
//           sprite FIFO, and each dot one pixel is shifted out, mixed and
//           sent to pix_* until 160 pixels are out;
//   mode 0  rest of the 456-dot line;
//   mode 1  lines 144-153 (V-Blank), 70224 dots per frame.
// The first SCX mod 8 background pixels of a line are dropped, lengthening
// mode 3 by that many dots. A sprite fetch starts when a kept sprite's X
// (screen X + 8) reaches the pixel position + 8; pixel output and the
// background fetcher stop until it is merged (an opaque pixel already
// queued keeps its place). The window starts when LCDC bit 5 is set,
// LY >= WY and the pixel position + 7 >= WX: the background FIFO is cleared
// and the fetcher restarts on the window map, whose own line counter
// advances only on lines that showed it.
// irq_vblank pulses on entering line 144; irq_stat pulses on a rising edge
// of (LYC=LY & STAT.6) | (mode 0 & STAT.3) | (mode 1 & STAT.4) |
// (mode 2 & STAT.5). LCDC bit 7 = 0 holds LY and the dot counter at 0.
// All timing runs on ce, one tick per dot (4.194304 MHz). Register reads
// are combinational; VRAM and OAM reads have one clock of latency. The
// 80-dot mode 2, the window start rule and the sprite-fetch trigger are this
// design's choices where the Game Boy description gives none.
module ppu
  import gb_pkg::*;
#(
  parameter int DOTS_PER_LINE = 456,
  parameter int LINES         = 154,
  parameter int VISIBLE_LINES = 144,
  parameter int OAM_DOTS      = 80,
  parameter int SCREEN_W      = 160
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  // register port, $FF40 + reg_addr
  input  logic        reg_we,
  input  logic [3:0]  reg_addr,
  input  logic [7:0]  reg_wdata,
  output logic [7:0]  reg_rdata,
  // VRAM read port (address relative to $8000)
  output logic [12:0] vram_addr,
  input  logic [7:0]  vram_data,
  // OAM entry read port
  output logic [5:0]  oam_idx,
  input  sprite_t     oam_entry,
  // pixel output
  output logic        pix_valid,
  output logic [7:0]  pix_x,
  output logic [7:0]  pix_y,
  output logic [1:0]  pix_shade,
  output logic        irq_vblank,
  output logic        irq_stat,
  output ppu_mode_t   mode,
  output logic [7:0]  ly
);
  localparam int MAXS = 10;

  logic [7:0] lcdc, scy, scx, lyc, bgp, obp0, obp1, wy, wx;
  logic [3:0] stat_en;           // STAT bits 6:3
  logic [8:0] dot;
  logic       drawing;
  logic [7:0] x_out;
  logic [2:0] discard;
  logic       in_window, win_used;
  logic [7:0] win_line;
  logic [MAXS-1:0] fetched;

  // ---------------- sub-blocks ----------------
  sprite_t     slots [MAXS];
  logic [3:0]  slot_count;
  logic        scan_busy;
  logic        line_start;       // last dot of mode 2
  logic        lcd_on;

  assign lcd_on     = lcdc[7];
  assign line_start = lcd_on && ce && (ly < 8'(VISIBLE_LINES)) && (int'(dot) == OAM_DOTS - 1);

  ppu_oam_scan #(.MAX_PER_LINE(MAXS)) u_scan (
    .clk, .rst_n, .ce,
    .start     (lcd_on && (ly < 8'(VISIBLE_LINES)) && dot == 9'd0),
    .ly, .tall (lcdc[2]),
    .oam_idx, .oam_entry,
    .slots, .slot_count, .busy(scan_busy)
  );

  logic        bg_push, bg_waiting, fetch_restart, win_start;
  logic [7:0][1:0] bg_row;
  logic [12:0] bg_vaddr, sp_vaddr;
  logic [7:0][1:0] bg_entries;
  logic [3:0]  bg_count;
  logic        sf_start, sf_busy, sf_done;
  obj_pix_t [7:0] sf_row;
  logic [7:0][3:0] obj_entries, obj_merged;
  logic [3:0]  obj_count;
  logic        pop, obj_load;
  sprite_t     sel_spr;
  logic [3:0]  sel_idx;
  logic        spr_pending;
  sprite_t     sel_spr_q;        // sprite being fetched

  assign fetch_restart = line_start || win_start;

  ppu_fetcher u_fetch (
    .clk, .rst_n, .ce,
    .restart   (fetch_restart),
    .window    (in_window || win_start),
    .stall     (sf_busy || sf_done || sf_start),
    .lcdc, .scx, .scy, .ly, .win_line,
    .vram_addr (bg_vaddr),
    .vram_data,
    .fifo_empty(bg_count == 4'd0 || (bg_count == 4'd1 && pop)),
    .push      (bg_push),
    .row       (bg_row),
    .waiting   (bg_waiting)
  );

  pixel_fifo #(.DEPTH(8), .W(2)) u_bg_fifo (
    .clk, .rst_n,
    .clear     (line_start || win_start),
    .load      (bg_push),
    .load_data (bg_row),
    .pop       (pop),
    .entries   (bg_entries),
    .count     (bg_count)
  );

  ppu_sprite_fetcher u_sfetch (
    .clk, .rst_n, .ce,
    .start     (sf_start),
    .spr       (sel_spr),
    .ly, .tall (lcdc[2]),
    .vram_addr (sp_vaddr),
    .vram_data,
    .busy      (sf_busy),
    .done      (sf_done),
    .row       (sf_row)
  );

  pixel_fifo #(.DEPTH(8), .W(4)) u_obj_fifo (
    .clk, .rst_n,
    .clear     (line_start),
    .load      (obj_load),
    .load_data (obj_merged),
    .pop       (pop && obj_count != 4'd0),
    .entries   (obj_entries),
    .count     (obj_count)
  );

  assign vram_addr = (sf_busy || sf_start) ? sp_vaddr : bg_vaddr;

  // ---------------- sprite selection and merge ----------------
  always_comb begin
    spr_pending = 1'b0;
    sel_idx     = '0;
    for (int i = MAXS - 1; i >= 0; i--) begin
      if (i < int'(slot_count) && !fetched[i] && lcdc[1] &&
          ({1'b0, slots[i].x} <= {1'b0, x_out} + 9'd8)) begin
        spr_pending = 1'b1;
        sel_idx     = 4'(i);
      end
    end
    sel_spr = slots[sel_idx];
  end

  assign sf_start = ce && drawing && spr_pending && !sf_busy && !sf_done &&
                    bg_waiting && bg_count != 4'd0 && discard == 3'd0;
  assign obj_load = ce && sf_done;

  always_comb begin
    logic [3:0] shift;
    shift = 4'(x_out + 8'd8 - sel_spr_q.x);
    for (int k = 0; k < 8; k++) begin
      obj_pix_t cur, nw;
      cur = (k < int'(obj_count)) ? obj_pix_t'(obj_entries[k]) : obj_pix_t'(4'b0);
      nw  = (k + int'(shift) < 8) ? sf_row[k + int'(shift)] : obj_pix_t'(4'b0);
      obj_merged[k] = (cur.color != 2'd0) ? cur : nw;
    end
  end

  // ---------------- pixel output ----------------
  logic       win_trigger;
  logic [1:0] shade;

  assign win_trigger = drawing && lcdc[5] && !in_window && (ly >= wy) &&
                       ({1'b0, x_out} + 9'd7 >= {1'b0, wx}) && discard == 3'd0 &&
                       !sf_busy && !sf_done && !spr_pending;
  assign win_start   = ce && win_trigger;
  // SCX discarding goes on while a sprite waits; output does not.
  assign pop = ce && drawing && !win_trigger && !(spr_pending && discard == 3'd0) &&
               !sf_busy && !sf_done &&
               bg_count != 4'd0;

  ppu_pixel_mixer u_mix (
    .bg_color (bg_entries[0]),
    .bg_en    (lcdc[0]),
    .obj      (obj_pix_t'(obj_entries[0])),
    .obj_valid(obj_count != 4'd0),
    .obj_en   (lcdc[1]),
    .bgp, .obp0, .obp1,
    .shade
  );

  // ---------------- timing, registers ----------------
  logic stat_line, stat_line_q;
  logic lyc_eq;

  assign lyc_eq = (ly == lyc);

  always_comb begin
    if (!lcd_on)                            mode = MODE_HBLANK;
    else if (ly >= 8'(VISIBLE_LINES))       mode = MODE_VBLANK;
    else if (int'(dot) < OAM_DOTS)          mode = MODE_OAM;
    else if (drawing)                       mode = MODE_DRAW;
    else                                    mode = MODE_HBLANK;
    stat_line = (stat_en[3] && lyc_eq) ||
                (stat_en[0] && mode == MODE_HBLANK && lcd_on) ||
                (stat_en[1] && mode == MODE_VBLANK) ||
                (stat_en[2] && mode == MODE_OAM);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcdc <= 8'h00; scy <= '0; scx <= '0; lyc <= '0;
      bgp <= 8'hFC; obp0 <= 8'hFF; obp1 <= 8'hFF; wy <= '0; wx <= '0;
      stat_en <= '0;
      dot <= '0; ly <= '0; drawing <= 1'b0; x_out <= '0; discard <= '0;
      in_window <= 1'b0; win_used <= 1'b0; win_line <= '0; fetched <= '0;
      pix_valid <= 1'b0; pix_x <= '0; pix_y <= '0; pix_shade <= '0;
      irq_vblank <= 1'b0; irq_stat <= 1'b0; stat_line_q <= 1'b0;
      sel_spr_q <= '0;
    end else begin
      pix_valid  <= 1'b0;
      irq_vblank <= 1'b0;
      irq_stat   <= 1'b0;

      if (reg_we) begin
        unique case (reg_addr)
          4'h0: lcdc    <= reg_wdata;
          4'h1: stat_en <= reg_wdata[6:3];
          4'h2: scy     <= reg_wdata;
          4'h3: scx     <= reg_wdata;
          4'h5: lyc     <= reg_wdata;
          4'h7: bgp     <= reg_wdata;
          4'h8: obp0    <= reg_wdata;
          4'h9: obp1    <= reg_wdata;
          4'hA: wy      <= reg_wdata;
          4'hB: wx      <= reg_wdata;
          default: ;
        endcase
      end

      if (ce) begin
        stat_line_q <= stat_line;
        if (stat_line && !stat_line_q) irq_stat <= 1'b1;
      end

      if (!lcd_on) begin
        dot <= '0; ly <= '0; drawing <= 1'b0; in_window <= 1'b0;
        win_used <= 1'b0; win_line <= '0;
      end else if (ce) begin
        // dot / line counters
        if (int'(dot) == DOTS_PER_LINE - 1) begin
          dot     <= '0;
          drawing <= 1'b0;
          if (win_used) win_line <= win_line + 8'd1;
          win_used  <= 1'b0;
          in_window <= 1'b0;
          if (int'(ly) == LINES - 1) begin
            ly <= '0; win_line <= '0;
          end else begin
            ly <= ly + 8'd1;
          end
          if (int'(ly) == VISIBLE_LINES - 1) irq_vblank <= 1'b1;
        end else begin
          dot <= dot + 9'd1;
        end

        if (line_start) begin
          drawing <= 1'b1;
          x_out   <= '0;
          discard <= scx[2:0];
          fetched <= '0;
        end

        if (win_start) begin
          in_window <= 1'b1;
          win_used  <= 1'b1;
        end

        if (sf_start) begin
          fetched[sel_idx] <= 1'b1;
          sel_spr_q        <= sel_spr;
        end

        if (pop) begin
          if (discard != 3'd0) begin
            discard <= discard - 3'd1;
          end else begin
            pix_valid <= 1'b1;
            pix_x     <= x_out;
            pix_y     <= ly;
            pix_shade <= shade;
            x_out     <= x_out + 8'd1;
            if (int'(x_out) == SCREEN_W - 1) drawing <= 1'b0;
          end
        end
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      4'h0: reg_rdata = lcdc;
      4'h1: reg_rdata = {1'b1, stat_en, lyc_eq, mode};
      4'h2: reg_rdata = scy;
      4'h3: reg_rdata = scx;
      4'h4: reg_rdata = ly;
      4'h5: reg_rdata = lyc;
      4'h7: reg_rdata = bgp;
      4'h8: reg_rdata = obp0;
      4'h9: reg_rdata = obp1;
      4'hA: reg_rdata = wy;
      4'hB: reg_rdata = wx;
      default: reg_rdata = 8'hFF;
    endcase
  end
endmodule
