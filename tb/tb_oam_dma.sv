// Self-checking test of oam_dma with a behavioural 64 KiB source memory
// that answers a read one clock later. A transfer from $C100 (ce every
// third clock) must write OAM bytes 0..159 in order with the source bytes,
// each once, finish after 161 ticks, and stay idle afterwards.
module tb_oam_dma;
  logic clk = 0, rst_n = 0, ce = 0, start = 0;
  logic [7:0] src_hi = 0, bus_rdata, oam_addr, oam_wdata;
  logic active, bus_rd, oam_we;
  logic [15:0] bus_addr;
  logic [7:0] src [65536];
  logic [7:0] oam [160];
  int writes [160];
  int checks = 0, failures = 0;

  oam_dma dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ce <= ($urandom % 3 == 0);
  always @(posedge clk) if (bus_rd) bus_rdata <= src[bus_addr];
  always @(posedge clk) if (rst_n && oam_we) begin oam[oam_addr] <= oam_wdata; writes[oam_addr]++; end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    for (int i = 0; i < 65536; i++) src[i] = 8'($urandom);
    for (int i = 0; i < 160; i++) begin oam[i] = 0; writes[i] = 0; end
    bus_rdata = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    start = 1; src_hi = 8'hC1; @(negedge clk); start = 0;
    t = 0;
    while (active) begin @(posedge clk); if (ce) t++; @(negedge clk); end
    checks++;
    if (t != 161) begin failures++; $display("ticks %0d", t); end
    repeat (20) @(negedge clk);
    for (int i = 0; i < 160; i++) begin
      checks += 2;
      if (oam[i] !== src[16'hC100 + i]) begin failures++; $display("byte %0d %h %h", i, oam[i], src[16'hC100+i]); end
      if (writes[i] != 1) begin failures++; $display("writes %0d = %0d", i, writes[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
