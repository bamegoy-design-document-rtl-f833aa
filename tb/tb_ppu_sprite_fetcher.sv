// Self-checking test of the sprite fetcher with a behavioural VRAM (one
// clock latency). For random sprites, lines and heights it checks the
// eight returned pixels (colour from the tile row picked with Y-flip and
// 8x16 handling, order reversed by X-flip, palette and priority copied
// from the flags) and that done comes four dots after the start dot.
module tb_ppu_sprite_fetcher;
  import gb_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, start = 0, tall = 0, busy, done;
  sprite_t spr;
  logic [7:0] ly = 0, vram_data;
  logic [12:0] vram_addr;
  obj_pix_t [7:0] row;
  logic [7:0] vram [8192];
  int checks = 0, failures = 0;

  ppu_sprite_fetcher dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) vram_data <= vram[vram_addr];

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int r, t, a, dots, h; logic [7:0] lo, hi; obj_pix_t e;
    for (int i = 0; i < 8192; i++) vram[i] = 8'($urandom);
    spr = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      tall = 1'($urandom); h = tall ? 16 : 8;
      spr = sprite_t'($urandom); ly = 8'($urandom % 144);
      spr.y = 8'(int'(ly) + 16 - ($urandom % h));
      r = int'(ly) + 16 - int'(spr.y);
      if (spr.flags[6]) r = h - 1 - r;
      t = tall ? ((int'(spr.tile) & 'hFE) + r / 8) : int'(spr.tile);
      a = t * 16 + (r % 8) * 2;
      lo = vram[a]; hi = vram[a + 1];
      @(negedge clk); start = 1; ce = 1; @(negedge clk); start = 0;
      dots = 1;
      while (!done) begin
        ce = 1'($urandom); @(posedge clk); #1; if (ce && !done) dots++; @(negedge clk);
      end
      ce = 0;
      checks++;
      if (dots != 4) begin failures++; $display("dots %0d", dots); end
      for (int j = 0; j < 8; j++) begin
        int b; b = spr.flags[5] ? j : 7 - j;
        e = '{prio: spr.flags[7], palette: spr.flags[4], color: {hi[b], lo[b]}};
        checks++;
        if (row[j] !== e) begin failures++; $display("n=%0d pix %0d got %h exp %h", n, j, row[j], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
