// Self-checking test of dp_ram: random writes through both ports are
// mirrored in a reference array; every read on either port must return the
// reference value exactly one clock after its enable, and a port whose
// enable is low must keep its last output.
module tb_dp_ram;
  localparam int AW = 6, DW = 8;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [DW-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  dp_ram #(.AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_a, exp_b;
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = AW'($urandom); a_wdata = DW'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = AW'($urandom); b_wdata = DW'($urandom);
      if (a_en && b_en && a_we && b_we && a_addr == b_addr) b_we = 0;
      exp_a = a_en ? ref_mem[a_addr] : a_rdata;
      exp_b = b_en ? ref_mem[b_addr] : b_rdata;
      // reads return the old contents when the other port writes the same word
      @(posedge clk); #1;
      if (a_en && a_we) ref_mem[a_addr] = a_wdata;
      if (b_en && b_we) ref_mem[b_addr] = b_wdata;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("A mismatch %h %h", a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("B mismatch %h %h", b_rdata, exp_b); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
