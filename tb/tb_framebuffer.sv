// Self-checking test of the framebuffer: a random picture is written
// pixel by pixel, then every position is read back with one clock latency
// and compared; a second partial overwrite checks that only the written
// pixels change.
module tb_framebuffer;
  logic clk = 0, we = 0;
  logic [7:0] wx = 0, wy = 0, rx = 0, ry = 0;
  logic [1:0] wshade = 0, rshade;
  logic [1:0] pic [144][160];
  int checks = 0, failures = 0;

  framebuffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic read_all;
    for (int y = 0; y < 144; y++) for (int x = 0; x < 160; x++) begin
      @(negedge clk); rx = 8'(x); ry = 8'(y);
      @(negedge clk);
      checks++;
      if (rshade !== pic[y][x]) begin failures++; if (failures < 10) $display("(%0d,%0d) %0d %0d", x, y, rshade, pic[y][x]); end
    end
  endtask

  initial begin
    for (int y = 0; y < 144; y++) for (int x = 0; x < 160; x++) begin
      pic[y][x] = 2'($urandom);
      @(negedge clk); we = 1; wx = 8'(x); wy = 8'(y); wshade = pic[y][x];
    end
    @(negedge clk); we = 0;
    read_all();
    for (int n = 0; n < 500; n++) begin
      int x, y; x = $urandom % 160; y = $urandom % 144;
      pic[y][x] = 2'($urandom);
      @(negedge clk); we = 1; wx = 8'(x); wy = 8'(y); wshade = pic[y][x];
    end
    @(negedge clk); we = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
