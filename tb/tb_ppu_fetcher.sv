// Self-checking test of the background/window fetcher with a behavioural
// VRAM (one clock read latency) filled with random bytes. For random
// LCDC/SCX/SCY/LY/window-line settings it restarts the fetcher, lets a
// random consumer empty the FIFO, and compares every pushed row with the
// row computed from the VRAM contents (map base from LCDC bit 3 or 6,
// 8000 or 8800 addressing from LCDC bit 4). The first push must come six
// dots after the restart, and a push must never happen into a full FIFO.
module tb_ppu_fetcher;
  logic clk = 0, rst_n = 0, ce = 0, restart = 0, window = 0, stall = 0;
  logic [7:0] lcdc = 0, scx = 0, scy = 0, ly = 0, win_line = 0, vram_data;
  logic [12:0] vram_addr;
  logic fifo_empty, push, waiting;
  logic [7:0][1:0] row;
  logic [7:0] vram [8192];
  int checks = 0, failures = 0, m8800 = 0, m8000 = 0, wins = 0;

  ppu_fetcher dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) vram_data <= vram[vram_addr];

  function automatic logic [7:0][1:0] exp_row(input int n);
    int yl, col, ma, t, da; logic [7:0] lo, hi; logic [7:0][1:0] r;
    yl  = window ? int'(win_line) : ((int'(ly) + int'(scy)) & 255);
    col = window ? n : (((int'(scx) >> 3) + n) & 31);
    ma  = ((window ? lcdc[6] : lcdc[3]) ? 'h1C00 : 'h1800) + (yl / 8) * 32 + col;
    t   = vram[ma];
    da  = lcdc[4] ? t * 16 : 4096 + ((t >= 128) ? t - 256 : t) * 16;
    da += (yl % 8) * 2;
    lo = vram[da]; hi = vram[da + 1];
    for (int j = 0; j < 8; j++) r[j] = {hi[7-j], lo[7-j]};
    return r;
  endfunction

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int fill, dots, first;
    for (int i = 0; i < 8192; i++) vram[i] = 8'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      lcdc = 8'($urandom); scx = 8'($urandom); scy = 8'($urandom);
      ly = 8'($urandom % 144); win_line = 8'($urandom % 144); window = 1'($urandom);
      if (lcdc[4]) m8000++; else m8800++;
      if (window) wins++;
      fill = 0;
      @(negedge clk); restart = 1; ce = 1; @(negedge clk); restart = 0;
      dots = 0; first = -1;
      for (int k = 0; k < 21; ) begin
        fifo_empty = (fill == 0);
        ce = 1'($urandom);
        @(posedge clk);
        if (ce) dots++;
        if (push) begin
          checks++;
          if (fill != 0) begin failures++; $display("push into non-empty FIFO"); end
          if (row !== exp_row(k)) begin failures++; $display("row %0d mismatch %h %h", k, row, exp_row(k)); end
          if (first < 0) first = dots;
          fill = 8; k++;
        end else if (ce && fill > 0 && $urandom % 3 != 0) begin
          fill--;
        end
        @(negedge clk);
      end
      checks++;
      if (first != 7) begin failures++; $display("first push on dot %0d", first); end
    end
    checks++;
    if (m8000 == 0 || m8800 == 0 || wins == 0) begin failures++; $display("mode not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
