// End-to-end test of the whole system at its default parameters (50 MHz
// clock, 4.194304 MHz Game Boy tick). The testbench plays the host program
// (Avalon writes) and the GB-Z80 CPU (bus strobes, interrupt acknowledges).
// It loads a ROM image, releases the CPU, checks ROM/RAM/echo accesses,
// runs the timer to overflow, presses a button, copies a sprite table into
// OAM by DMA, sets up tiles, a scrolled background, a window and a sprite,
// turns the LCD on, waits for V-Blank and the LY=LYC interrupt, and then
// checks a full VGA frame pixel by pixel against the expected picture.
// Every mechanism (ROM loading, DMA and the CPU lock-out during it, timer
// overflow, joypad interrupt, V-Blank and STAT interrupts, each PPU mode,
// SCX discard, sprite fetch, window start) is counted and must happen.
module tb_bamegoy_top;
  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 0;
  logic cpu_rd = 0, cpu_wr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic [4:0] cpu_irq_flags, cpu_int_ack = 0;
  logic cpu_ce, cpu_rst_n;
  logic avs_chipselect = 0, avs_write = 0, avs_read = 0;
  logic [2:0] avs_address = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync, vga_blank_n;

  bamegoy_top dut (.*);
  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  int n_rom = 0, n_dma = 0, n_dma_lock = 0, n_timer = 0, n_joy = 0, n_vbl = 0, n_stat = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_discard = 0, n_sprite = 0, n_window = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ppu.pop && dut.u_ppu.discard != 0) n_discard++;
    if (dut.u_ppu.sf_start) n_sprite++;
    if (dut.u_ppu.win_start) n_window++;
    if (dut.dma_start) n_dma++;
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 30) $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); avs_chipselect = 1; avs_write = 1; avs_address = 3'(a); avs_writedata = d;
    @(negedge clk); avs_chipselect = 0; avs_write = 0;
  endtask
  task automatic host_rd(input int a, output logic [31:0] d);
    @(negedge clk); avs_chipselect = 1; avs_read = 1; avs_address = 3'(a);
    @(negedge clk); avs_chipselect = 0; avs_read = 0; d = avs_readdata;
  endtask
  task automatic cpu_write(input int a, input logic [7:0] d);
    @(negedge clk); cpu_addr = 16'(a); cpu_wdata = d; cpu_wr = 1;
    @(negedge clk); cpu_wr = 0;
  endtask
  task automatic cpu_read(input int a, output logic [7:0] d);
    @(negedge clk); cpu_addr = 16'(a); cpu_rd = 1;
    @(negedge clk); cpu_rd = 0; d = cpu_rdata;
  endtask
  task automatic ack(input int bitn);
    @(negedge clk); cpu_int_ack = 5'(1 << bitn);
    @(negedge clk); cpu_int_ack = 0;
  endtask
  task automatic wait_irq(input int bitn, input int max_clks, output bit seen);
    seen = 0;
    for (int i = 0; i < max_clks; i++) begin
      @(negedge clk);
      if (cpu_irq_flags[bitn]) begin seen = 1; break; end
    end
  endtask

  // expected picture
  function automatic logic [1:0] expected(input int x, input int y);
    int bx;
    if (x >= 30 && x < 38 && y >= 20 && y < 28) return 2'd1;          // sprite, tile 4
    if (y >= 100 && x + 7 >= 87) return 2'd2;                         // window, tile 3
    bx = x + 3;                                                       // SCX = 3
    return (((y / 8) + (bx / 8)) % 2) ? 2'd3 : 2'd0;                  // tiles 1 / 0
  endfunction
  function automatic logic [7:0] grey(input logic [1:0] s);
    case (s) 0: return 8'hFF; 1: return 8'hAA; 2: return 8'h55; default: return 8'h00; endcase
  endfunction

  initial begin
    #500ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] rom [512]; logic [7:0] d; logic [31:0] hd; bit seen; int bad, x, y, ticks;
    repeat (4) @(negedge clk); rst_n = 1;
    chk("CPU held in reset", cpu_rst_n, 0);

    // ---- host loads the cartridge image and starts the CPU ----
    for (int i = 0; i < 512; i++) rom[i] = 8'($urandom);
    host_wr(1, 0);
    for (int i = 0; i < 512; i++) host_wr(2, {24'd0, rom[i]});
    host_wr(0, 1);
    chk("CPU released", cpu_rst_n, 1);
    for (int i = 0; i < 512; i++) begin cpu_read(i, d); chk("ROM byte", d, rom[i]); end
    n_rom++;
    cpu_write('h0150, 8'h00); cpu_read('h0150, d); chk("ROM is read-only", d, rom['h150]);

    // ---- RAM regions, echo ----
    cpu_write('hC123, 8'h5A); cpu_read('hC123, d); chk("WRAM", d, 8'h5A);
    cpu_write('hDFFE, 8'hA7); cpu_read('hDFFE, d); chk("WRAM top", d, 8'hA7);
    cpu_write('hA010, 8'h3C); cpu_read('hA010, d); chk("external RAM", d, 8'h3C);
    cpu_write('hFF90, 8'h99); cpu_read('hFF90, d); chk("HRAM", d, 8'h99);
    cpu_read('hE123, d); chk("echo not emulated", d, 8'hFF);
    cpu_read('hFEA5, d); chk("unusable area", d, 8'hFF);

    // ---- interrupts enabled; timer overflow ----
    cpu_write('hFFFF, 8'h1F);
    cpu_write('hFF06, 8'hF0); cpu_write('hFF05, 8'hFC); cpu_write('hFF07, 8'h05);
    wait_irq(2, 200000, seen); chk("timer interrupt", seen, 1);
    if (seen) n_timer++;
    cpu_read('hFF05, d); chk("TIMA reloaded from TMA", d >= 8'hF0, 1);
    ack(2); cpu_read('hFF0F, d); chk("IF timer cleared", d[2], 0);
    cpu_write('hFF07, 8'h00);

    // ---- joypad ----
    host_wr(3, 0); cpu_write('hFF00, 8'h20);     // bit 4 low: D-pad
    ack(4);
    host_wr(3, 8'h11);                           // Right and A pressed
    wait_irq(4, 100, seen); chk("joypad interrupt", seen, 1);
    if (seen) n_joy++;
    cpu_read('hFF00, d); chk("joypad D-pad", d, 8'hEE);
    cpu_write('hFF00, 8'h10); cpu_read('hFF00, d); chk("joypad buttons", d, 8'hDE);
    ack(4); host_wr(3, 0);

    // ---- tiles and maps (LCD still off) ----
    for (int r = 0; r < 8; r++) begin
      cpu_write('h8000 + 16 * 1 + 2 * r, 8'hFF); cpu_write('h8000 + 16 * 1 + 2 * r + 1, 8'hFF);  // tile 1: colour 3
      cpu_write('h8000 + 16 * 3 + 2 * r, 8'h00); cpu_write('h8000 + 16 * 3 + 2 * r + 1, 8'hFF);  // tile 3: colour 2
      cpu_write('h8000 + 16 * 4 + 2 * r, 8'hFF); cpu_write('h8000 + 16 * 4 + 2 * r + 1, 8'h00);  // tile 4: colour 1
    end
    for (int i = 0; i < 1024; i++) begin
      cpu_write('h9800 + i, 8'(((i / 32) + (i % 32)) % 2));
      cpu_write('h9C00 + i, 8'd3);
    end

    // ---- sprite table in WRAM, copied by DMA ----
    for (int i = 0; i < 160; i++) cpu_write('hC100 + i, 8'h00);
    cpu_write('hC100, 8'd36); cpu_write('hC101, 8'd38); cpu_write('hC102, 8'd4); cpu_write('hC103, 8'h00);
    cpu_write('hFF46, 8'hC1);
    cpu_read('hC100, d); chk("CPU locked out during DMA", d, 8'hFF);
    if (d == 8'hFF) n_dma_lock++;
    ticks = 0;
    while (dut.dma_active) begin @(negedge clk); ticks++; end
    chk("DMA finished within 161 ticks", ticks <= 161 * 12 + 12, 1);
    cpu_read('hFE00, d); chk("OAM Y", d, 36);
    cpu_read('hFE01, d); chk("OAM X", d, 38);
    cpu_read('hFE02, d); chk("OAM tile", d, 4);
    cpu_read('hFE9F, d); chk("OAM last", d, 0);

    // ---- LCD registers and start ----
    cpu_write('hFF47, 8'hE4); cpu_write('hFF48, 8'hE4);
    cpu_write('hFF43, 8'd3);  cpu_write('hFF42, 8'd0);
    cpu_write('hFF4A, 8'd100); cpu_write('hFF4B, 8'd87);
    cpu_write('hFF45, 8'd50); cpu_write('hFF41, 8'h40);
    cpu_write('hFF0F, 8'h00);
    cpu_write('hFF40, 8'hF3);
    // poll STAT over two frames, watching interrupts
    for (int f = 0; f < 2; f++) begin
      bit got_vbl; got_vbl = 0;
      while (!got_vbl) begin
        cpu_read('hFF41, d);
        n_mode[d[1:0]]++;
        if (cpu_irq_flags[1]) begin n_stat++; cpu_read('hFF44, d); chk("LY at STAT interrupt", d, 50); ack(1); end
        if (cpu_irq_flags[0]) begin n_vbl++; got_vbl = 1; cpu_read('hFF44, d); chk("LY at V-Blank", d, 144); ack(0); end
      end
    end
    host_rd(4, hd); chk("host status mode is V-Blank", hd[9:8], 1);

    // ---- one VGA frame ----
    forever begin @(negedge clk); if (dut.u_vga.hc == 0 && dut.u_vga.vc == 0 && dut.pix_ce) break; end
    @(posedge clk); #1;
    bad = 0;
    for (int t = 0; t < 800 * 525; t++) begin
      x = t % 800; y = t / 800;
      if (x >= 80 && x < 560 && y >= 24 && y < 456) begin
        if (vga_r !== grey(expected((x - 80) / 3, (y - 24) / 3))) begin
          bad++; if (bad < 5) $display("VGA (%0d,%0d) got %h exp %h", x, y, vga_r, grey(expected((x - 80) / 3, (y - 24) / 3)));
        end
      end else if (vga_r !== 0) bad++;
      if (vga_blank_n !== (x < 640 && y < 480)) bad++;
      @(posedge clk); @(posedge clk); #1;
    end
    chk("VGA picture", bad, 0);

    // ---- every mechanism happened ----
    chk("ROM loaded", n_rom > 0, 1);       chk("DMA ran", n_dma > 0, 1);
    chk("DMA lock-out", n_dma_lock > 0, 1); chk("timer overflow", n_timer > 0, 1);
    chk("joypad irq", n_joy > 0, 1);       chk("V-Blank irqs", n_vbl, 2);
    chk("STAT irqs", n_stat > 0, 1);
    for (int m = 0; m < 4; m++) chk($sformatf("mode %0d seen", m), n_mode[m] > 0, 1);
    chk("SCX discard", n_discard > 0, 1);  chk("sprite fetch", n_sprite > 0, 1);
    chk("window start", n_window > 0, 1);
    $display("events: rom=%0d dma=%0d timer=%0d joy=%0d vbl=%0d stat=%0d modes=%0d/%0d/%0d/%0d discard=%0d sprite=%0d window=%0d",
             n_rom, n_dma, n_timer, n_joy, n_vbl, n_stat, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_discard, n_sprite, n_window);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
