// Self-checking test of oam_ram: random byte writes and reads through the
// CPU port, whole-entry reads through the PPU port, both checked against a
// reference array one clock after the request. Addresses past $9F must
// read $FF and not write.
module tb_oam_ram;
  import gb_pkg::*;
  logic clk = 0;
  logic cpu_en = 0, cpu_we = 0;
  logic [7:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic [5:0] ppu_idx = 0;
  sprite_t ppu_entry;
  logic [7:0] ref_mem [160];
  int checks = 0, failures = 0;

  oam_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] exp_b; logic [31:0] exp_e;
    for (int i = 0; i < 160; i++) ref_mem[i] = 0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      cpu_en = 1'($urandom); cpu_we = 1'($urandom);
      cpu_addr = ($urandom % 8 == 0) ? 8'(160 + $urandom % 96) : 8'($urandom % 160);
      cpu_wdata = 8'($urandom); ppu_idx = 6'($urandom % 40);
      exp_b = (cpu_addr < 160) ? ref_mem[cpu_addr] : 8'hFF;
      exp_e = {ref_mem[4*ppu_idx+3], ref_mem[4*ppu_idx+2], ref_mem[4*ppu_idx+1], ref_mem[4*ppu_idx]};
      @(posedge clk); #1;
      if (cpu_en && cpu_we && cpu_addr < 160) ref_mem[cpu_addr] = cpu_wdata;
      if (cpu_en) begin
        checks++;
        if (cpu_rdata !== exp_b) begin failures++; $display("byte mismatch"); end
      end
      checks++;
      if (ppu_entry !== exp_e) begin failures++; $display("entry mismatch %h %h", ppu_entry, exp_e); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
