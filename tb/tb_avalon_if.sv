// Self-checking test of the host interface: ROM loading with address
// auto-increment (back-to-back and spaced writes), re-seeding the address,
// the run bit, the joypad byte and the status word, each through Avalon
// writes and latency-1 reads.
module tb_avalon_if;
  logic clk = 0, rst_n = 0;
  logic avs_chipselect = 0, avs_write = 0, avs_read = 0;
  logic [2:0] avs_address = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic rom_we, cpu_run;
  logic [14:0] rom_addr;
  logic [7:0] rom_wdata, buttons, ly = 8'd77;
  logic [1:0] mode = 2'd3;
  logic [7:0] rom [32768];
  bit written [32768];
  int checks = 0, failures = 0;

  avalon_if dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && rom_we) begin rom[rom_addr] <= rom_wdata; written[rom_addr] <= 1; end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); avs_chipselect = 1; avs_write = 1; avs_address = 3'(a); avs_writedata = d;
    @(negedge clk); avs_write = 0; avs_chipselect = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); avs_chipselect = 1; avs_read = 1; avs_address = 3'(a);
    @(negedge clk); avs_read = 0; avs_chipselect = 0; d = avs_readdata;
  endtask
  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d; logic [7:0] img [64];
    for (int i = 0; i < 32768; i++) begin rom[i] = 0; written[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    rd(0, d); chk("run after reset", d, 0); chk("cpu_run low", cpu_run, 0);
    // spaced writes from $0100
    for (int i = 0; i < 64; i++) img[i] = 8'($urandom);
    wr(1, 32'h0100);
    for (int i = 0; i < 32; i++) wr(2, {24'd0, img[i]});
    rd(1, d); chk("address advanced", d, 32'h0120);
    // back-to-back writes
    @(negedge clk); avs_chipselect = 1; avs_write = 1; avs_address = 2;
    for (int i = 32; i < 64; i++) begin avs_writedata = {24'd0, img[i]}; @(negedge clk); end
    avs_write = 0; avs_chipselect = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) chk("rom byte", rom[16'h0100 + i], img[i]);
    chk("nothing else written", written[16'h00FF] || written[16'h0140], 0);
    wr(1, 32'h7FFF); wr(2, 32'hA5); @(negedge clk); chk("last byte", rom[15'h7FFF], 8'hA5);
    wr(3, 32'h96); chk("buttons", buttons, 8'h96); rd(3, d); chk("buttons read", d, 32'h96);
    wr(0, 1); chk("cpu_run", cpu_run, 1); rd(0, d); chk("run read", d, 1);
    rd(4, d); chk("status", d, {22'd0, 2'd3, 8'd77});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
