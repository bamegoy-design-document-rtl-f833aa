// Sprite fetcher of the PPU. Given one sprite picked by the OAM scan, it
// reads the two tile-data bytes of the sprite's row on line LY (two dots
// each, address on the first dot, data on the second) and returns eight
// sprite-FIFO pixels with colour, palette and priority, leftmost first.
// Sprites use unsigned tile numbers from VRAM $0000 (8000 method). The row
// within the sprite is LY+16-Y, mirrored by Y-flip (bit 6); for 8x16
// sprites (tall) the tile number's bit 0 is ignored. X-flip (bit 5)
// reverses the pixel order. done pulses on the dot the row is complete
// (4 dots after start).
module ppu_sprite_fetcher
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        start,
  input  sprite_t     spr,
  input  logic [7:0]  ly,
  input  logic        tall,
  output logic [12:0] vram_addr,
  input  logic [7:0]  vram_data,
  output logic        busy,
  output logic        done,
  output obj_pix_t [7:0] row
);
  logic [1:0] step;
  logic [7:0] lo, hi;
  sprite_t    s_q;
  logic [7:0] yrow;
  logic [3:0] r;
  logic [7:0] t;

  always_comb begin
    yrow = ly + 8'd16 - s_q.y;
    r    = tall ? yrow[3:0] : {1'b0, yrow[2:0]};
    if (s_q.flags[6]) r = (tall ? 4'd15 : 4'd7) - r;
    t    = tall ? {s_q.tile[7:1], r[3]} : s_q.tile;
    vram_addr = {1'b0, t, r[2:0], step[1]};
    for (int j = 0; j < 8; j++) begin
      int b;
      b = s_q.flags[5] ? j : 7 - j;
      row[j] = '{prio: s_q.flags[7], palette: s_q.flags[4], color: {hi[b], lo[b]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0; busy <= 1'b0; done <= 1'b0; lo <= '0; hi <= '0; s_q <= '0;
    end else if (ce) begin
      done <= 1'b0;
      if (start && !busy) begin
        s_q <= spr; busy <= 1'b1; step <= '0;
      end else if (busy) begin
        step <= step + 2'd1;
        if (step == 2'd1) lo <= vram_data;
        if (step == 2'd3) begin
          hi <= vram_data; busy <= 1'b0; done <= 1'b1;
        end
      end
    end
  end
endmodule
