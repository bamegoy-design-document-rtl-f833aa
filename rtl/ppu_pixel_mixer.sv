// Pixel mixer of the PPU, combinational. The background pixel is shown
// when there is no sprite pixel, when the sprite colour is 0 (transparent),
// or when the sprite's priority flag is set and the background colour is
// not 0; otherwise the sprite pixel is shown. The chosen colour number is
// mapped through BGP, or OBP0/OBP1 by the sprite's palette bit: palette
// bits [2c+1:2c] give the shade of colour c (0 lightest, 3 darkest).
// bg_en (LCDC bit 0) = 0 forces background colour 0; obj_en (LCDC bit 1)
// = 0 hides sprites.
module ppu_pixel_mixer
  import gb_pkg::*;
(
  input  logic [1:0] bg_color,
  input  logic       bg_en,
  input  obj_pix_t   obj,
  input  logic       obj_valid,
  input  logic       obj_en,
  input  logic [7:0] bgp,
  input  logic [7:0] obp0,
  input  logic [7:0] obp1,
  output logic [1:0] shade
);
  logic [1:0] bgc;
  logic       show_obj;
  logic [7:0] pal;

  always_comb begin
    bgc      = bg_en ? bg_color : 2'd0;
    show_obj = obj_valid && obj_en && (obj.color != 2'd0) && !(obj.prio && bgc != 2'd0);
    pal      = obj.palette ? obp1 : obp0;
    shade    = show_obj ? pal[2*obj.color +: 2] : bgp[2*bgc +: 2];
  end
endmodule
