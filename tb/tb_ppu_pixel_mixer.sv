// Exhaustive self-checking test of the pixel mixer over every background
// colour, sprite pixel, enable and valid combination, with random
// palettes; the reference applies the Game Boy priority rule.
module tb_ppu_pixel_mixer;
  import gb_pkg::*;
  logic [1:0] bg_color, shade;
  logic bg_en, obj_valid, obj_en;
  obj_pix_t obj;
  logic [7:0] bgp, obp0, obp1;
  int checks = 0, failures = 0;

  ppu_pixel_mixer dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1:0] bc, exp_s; logic sprite_wins;
    for (int r = 0; r < 8; r++) begin
      bgp = 8'($urandom); obp0 = 8'($urandom); obp1 = 8'($urandom);
      for (int v = 0; v < 1024; v++) begin
        {bg_color, obj, bg_en, obj_valid, obj_en} = 10'(v);
        #1;
        bc = bg_en ? bg_color : 2'd0;
        sprite_wins = obj_valid && obj_en && obj.color != 0 && !(obj.prio && bc != 0);
        if (sprite_wins) exp_s = obj.palette ? obp1[2*obj.color +: 2] : obp0[2*obj.color +: 2];
        else             exp_s = bgp[2*bc +: 2];
        checks++;
        if (shade !== exp_s) begin failures++; $display("v=%0d got %0d exp %0d", v, shade, exp_s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
