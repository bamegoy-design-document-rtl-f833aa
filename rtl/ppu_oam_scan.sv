// OAM scan (PPU mode 2). After start, it walks the 40 OAM entries at two
// dots each (80 dots): on the even dot it presents the index, on the odd
// dot it checks the entry returned by the OAM. A sprite covers line LY
// when LY+16 >= Y and LY+16 < Y+height (8, or 16 when tall), Y being the
// OAM byte 0 (screen Y + 16). The first ten such sprites, in OAM order,
// are kept in slots; slot_count says how many. The slots stay valid until
// the next start. The two-dot pace is this design's choice.
module ppu_oam_scan
  import gb_pkg::*;
#(
  parameter int N_SPRITES    = 40,
  parameter int MAX_PER_LINE = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       start,
  input  logic [7:0] ly,
  input  logic       tall,
  output logic [5:0] oam_idx,
  input  sprite_t    oam_entry,
  output sprite_t    slots [MAX_PER_LINE],
  output logic [3:0] slot_count,
  output logic       busy
);
  logic [6:0] dot;
  logic [8:0] line16;
  logic [8:0] ytop;
  logic       hit;

  assign oam_idx = 6'(dot >> 1);
  assign line16  = {1'b0, ly} + 9'd16;
  assign ytop    = {1'b0, oam_entry.y};
  assign hit     = (line16 >= ytop) && (line16 < ytop + (tall ? 9'd16 : 9'd8));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dot <= '0; busy <= 1'b0; slot_count <= '0;
      for (int i = 0; i < MAX_PER_LINE; i++) slots[i] <= '0;
    end else if (ce) begin
      if (start) begin
        dot <= '0; busy <= 1'b1; slot_count <= '0;
      end else if (busy) begin
        if (dot[0] && hit && int'(slot_count) < MAX_PER_LINE) begin
          slots[slot_count] <= oam_entry;
          slot_count        <= slot_count + 4'd1;
        end
        if (int'(dot) == 2*N_SPRITES-1) busy <= 1'b0;
        dot <= dot + 7'd1;
      end
    end
  end
endmodule
