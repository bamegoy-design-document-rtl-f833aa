// Self-checking test of the OAM scan. A behavioural OAM answers each index
// one clock later. For random OAM contents (crowded around the scanned
// line so that the 10-sprite limit is hit) and both sprite heights, the
// kept slots must be the first ten overlapping entries in OAM order, and
// the scan must take 80 dots.
module tb_ppu_oam_scan;
  import gb_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, start = 0, tall = 0, busy;
  logic [7:0] ly = 0;
  logic [5:0] oam_idx;
  sprite_t oam_entry;
  sprite_t slots [10];
  logic [3:0] slot_count;
  sprite_t oam [40];
  int checks = 0, failures = 0, full_lines = 0;

  ppu_oam_scan dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) oam_entry <= oam[oam_idx];

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sprite_t exp [$]; int dots, h;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      ly = 8'($urandom % 154); tall = 1'($urandom);
      for (int i = 0; i < 40; i++) begin
        oam[i] = sprite_t'($urandom);
        oam[i].y = 8'(int'(ly) + 16 - 20 + $urandom % 32);
      end
      h = tall ? 16 : 8;
      exp.delete();
      for (int i = 0; i < 40; i++)
        if (int'(ly) + 16 >= int'(oam[i].y) && int'(ly) + 16 < int'(oam[i].y) + h && exp.size() < 10)
          exp.push_back(oam[i]);
      if (exp.size() == 10) full_lines++;
      @(negedge clk); start = 1; ce = 1; @(negedge clk); start = 0;
      dots = 0;
      while (busy) begin
        ce = ($urandom % 2); @(posedge clk); if (ce) dots++; @(negedge clk);
      end
      ce = 0;
      checks += 2;
      if (dots != 80) begin failures++; $display("dots %0d", dots); end
      if (int'(slot_count) != exp.size()) begin failures++; $display("count %0d exp %0d", slot_count, exp.size()); end
      for (int k = 0; k < exp.size() && k < 10; k++) begin
        checks++;
        if (slots[k] !== exp[k]) begin failures++; $display("slot %0d", k); end
      end
    end
    checks++;
    if (full_lines == 0) begin failures++; $display("10-sprite limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
