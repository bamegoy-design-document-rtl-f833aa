// Self-checking test of the VGA output with a behavioural framebuffer
// holding a random 160x144 picture (one clock read latency) and pix_ce
// every other clock. Over two full frames it checks the line and frame
// lengths (800 x 525 pixel ticks), the sync pulse widths (96 and 2), the
// 640x480 blanking, black outside the centred 480x432 window and, for
// every pixel inside it, the grey level of picture pixel ((x-80)/3,
// (y-24)/3).
module tb_vga_out;
  logic clk = 0, rst_n = 0, pix_ce = 0;
  logic [7:0] fb_x, fb_y, vga_r, vga_g, vga_b;
  logic [1:0] fb_shade;
  logic vga_hsync, vga_vsync, vga_blank_n;
  logic [1:0] pic [144][160];
  int checks = 0, failures = 0;

  vga_out dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) fb_shade <= pic[fb_y % 144][fb_x % 160];
  always @(negedge clk) if (rst_n) pix_ce <= !pix_ce;

  function automatic logic [7:0] grey(input logic [1:0] s);
    case (s) 0: return 8'hFF; 1: return 8'hAA; 2: return 8'h55; default: return 8'h00; endcase
  endfunction

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int hc, vc, hs_len, vs_len, hs_start_prev, bad_px, lines, frames;
    logic hs_q, vs_q;
    for (int y = 0; y < 144; y++) for (int x = 0; x < 160; x++) pic[y][x] = 2'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    // wait for the start of a frame: the first vsync falling edge
    vs_q = 1; hs_q = 1;
    // outputs are registered on each pix_ce: follow them tick by tick,
    // sampling right after each pix_ce edge
    hc = -1; vc = -1; bad_px = 0; hs_len = 0; vs_len = 0; hs_start_prev = -1; lines = 0; frames = 0;
    // align: registered output of counter position p appears after tick p
    forever begin
      @(negedge clk); #1;
      if (pix_ce && dut.hc == 0 && dut.vc == 0) break;
    end
    @(posedge clk); #1;   // this tick registered position (0,0)
    for (int t = 0; t < 2 * 800 * 525; t++) begin
      hc = t % 800; vc = (t / 800) % 525;
      // sync and blank
      chk("hsync", vga_hsync, !(hc >= 656 && hc < 752));
      chk("vsync", vga_vsync, !(vc >= 490 && vc < 492));
      chk("blank", vga_blank_n, (hc < 640 && vc < 480));
      if (hc >= 80 && hc < 560 && vc >= 24 && vc < 456) begin
        if (vga_r !== grey(pic[(vc - 24) / 3][(hc - 80) / 3]) || vga_g !== vga_r || vga_b !== vga_r) bad_px++;
      end else if (vga_r !== 0 || vga_g !== 0 || vga_b !== 0) bad_px++;
      @(posedge clk); @(posedge clk); #1;
    end
    chk("wrong pixels", bad_px, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
