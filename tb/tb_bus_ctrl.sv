// Self-checking test of the memory map. Behavioural memories (one clock
// latency) and I/O registers sit behind the bus controller; a flat 64 KiB
// reference model applies the Game Boy map on its own (ROM read-only,
// echo and unusable areas read $FF, I/O registers at their addresses,
// $FF46 starting DMA). Random CPU reads and writes over all regions are
// compared with the model; then, with DMA active, DMA reads must see the
// source data while CPU accesses reach HRAM only.
module tb_bus_ctrl;
  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 0, dma_addr = 0, m_addr;
  logic cpu_rd = 0, cpu_wr = 0, dma_active = 0, dma_rd = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata, dma_rdata, m_wdata;
  logic rom_en, vram_en, vram_we, eram_en, eram_we, wram_en, wram_we, oam_en, oam_we, hram_en, hram_we;
  logic [6:0] hram_addr;
  logic [7:0] rom_rdata, vram_rdata, eram_rdata, wram_rdata, oam_rdata, hram_rdata;
  logic joy_we, timer_we, if_we, ie_we, ppu_we, dma_start;
  logic [7:0] joy_rdata, timer_rdata, if_rdata, ie_rdata, ppu_rdata;

  bus_ctrl dut (.*);
  always #5 clk = ~clk;

  logic [7:0] mem [65536];     // memories behind the bus, by CPU address
  logic [7:0] io [65536];      // I/O registers behind the bus, by CPU address
  logic [7:0] model [65536];   // what the CPU should see
  int checks = 0, failures = 0, dma_starts = 0;

  always @(posedge clk) begin
    if (rom_en)  rom_rdata  <= mem[{1'b0, m_addr[14:0]}];
    if (vram_en) begin if (vram_we) mem[{3'b100, m_addr[12:0]}] <= m_wdata; vram_rdata <= mem[{3'b100, m_addr[12:0]}]; end
    if (eram_en) begin if (eram_we) mem[{3'b101, m_addr[12:0]}] <= m_wdata; eram_rdata <= mem[{3'b101, m_addr[12:0]}]; end
    if (wram_en) begin if (wram_we) mem[{3'b110, m_addr[12:0]}] <= m_wdata; wram_rdata <= mem[{3'b110, m_addr[12:0]}]; end
    if (oam_en)  begin if (oam_we)  mem[{8'hFE, m_addr[7:0]}]   <= m_wdata; oam_rdata  <= mem[{8'hFE, m_addr[7:0]}]; end
    if (hram_en) begin if (hram_we) mem[{9'h1FF, hram_addr}]    <= cpu_wdata; hram_rdata <= mem[{9'h1FF, hram_addr}]; end
    if (joy_we)   io[16'hFF00] <= m_wdata;
    if (timer_we) io[m_addr]   <= m_wdata;
    if (if_we)    io[16'hFF0F] <= m_wdata;
    if (ie_we)    io[16'hFFFF] <= m_wdata;
    if (ppu_we)   io[m_addr]   <= m_wdata;
    if (dma_start) dma_starts++;
  end
  assign joy_rdata   = io[16'hFF00];
  assign timer_rdata = io[m_addr];
  assign if_rdata    = io[16'hFF0F];
  assign ie_rdata    = io[16'hFFFF];
  assign ppu_rdata   = io[m_addr];

  function automatic bit is_mem(input int a);
    return a < 'hE000 || (a >= 'hFE00 && a < 'hFEA0) || (a >= 'hFF80 && a < 'hFFFF);
  endfunction
  function automatic bit is_io(input int a);
    return a == 'hFF00 || a == 'hFF01 || a == 'hFF02 || (a >= 'hFF04 && a <= 'hFF07) ||
           a == 'hFF0F || (a >= 'hFF40 && a <= 'hFF4B) || a == 'hFF50 || a == 'hFFFF;
  endfunction

  task automatic cpu_access(input bit wr, input int a, input logic [7:0] d, input logic [7:0] exp, input bit check);
    @(negedge clk);
    cpu_addr = 16'(a); cpu_wdata = d; cpu_rd = !wr; cpu_wr = wr;
    @(negedge clk); cpu_rd = 0; cpu_wr = 0;
    if (check) begin
      checks++;
      if (cpu_rdata !== exp) begin failures++; if (failures < 20) $display("read %h got %h exp %h", a, cpu_rdata, exp); end
    end
  endtask

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a; logic [7:0] d;
    for (int i = 0; i < 65536; i++) begin
      mem[i] = 8'($urandom); io[i] = 8'($urandom);
      model[i] = is_mem(i) ? mem[i] : (is_io(i) ? io[i] : 8'hFF);
    end
    model[16'hFF01] = 0; model[16'hFF02] = 0; model[16'hFF50] = 0; model[16'hFF46] = 8'hFF;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      case ($urandom % 8)
        0: a = $urandom % 65536;
        1: a = 'hFE00 + $urandom % 512;
        2: a = 'hFF00 + $urandom % 128;
        3: a = 'hFF80 + $urandom % 128;
        4: a = 'hE000 + $urandom % 8192;
        default: a = ($urandom % 7) * 'h2000 + $urandom % 8192;
      endcase
      if (a == 'hFF46) continue;
      d = 8'($urandom);
      if ($urandom % 2) begin
        cpu_access(1, a, d, 0, 0);
        if (a >= 'h8000 && (is_mem(a) || is_io(a))) model[a] = d;
      end else begin
        cpu_access(0, a, 0, model[a], 1);
      end
    end
    // DMA start strobe
    cpu_access(1, 'hFF46, 8'hC1, 0, 0);
    checks++; if (dma_starts != 1) begin failures++; $display("dma_start %0d", dma_starts); end
    // DMA owns the bus
    dma_active = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      dma_addr = 16'('hC000 + $urandom % 8192); dma_rd = 1;
      cpu_addr = 16'($urandom % 2 ? 'hFF80 + $urandom % 127 : 'hC000 + $urandom % 8192);
      cpu_rd = 1; cpu_wr = 0;
      @(negedge clk); dma_rd = 0; cpu_rd = 0;
      checks += 2;
      if (dma_rdata !== model[dma_addr]) begin failures++; $display("dma read %h", dma_addr); end
      if (cpu_rdata !== ((cpu_addr >= 16'hFF80) ? model[cpu_addr] : 8'hFF)) begin failures++; $display("cpu during dma %h", cpu_addr); end
    end
    dma_active = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
