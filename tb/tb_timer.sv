// Self-checking test of the timer. It measures, in Game Boy ticks, the DIV
// period (256 ticks) and the TIMA period for each TAC clock select
// (1024, 16, 64, 256 ticks, i.e. 4096, 262144, 65536 and 16384 Hz at
// 4.194304 MHz), checks that TAC bit 2 = 0 stops TIMA, that overflow
// reloads TMA and raises irq once, and that writing DIV clears it.
module tb_timer;
  logic clk = 0, rst_n = 0, ce = 0, we = 0, irq;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  int irqs = 0;

  timer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && irq) irqs++;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d; @(negedge clk); we = 0;
  endtask
  logic [7:0] rv;
  task automatic rd(input logic [1:0] a);
    addr = a; #1; rv = rdata;
  endtask
  task automatic ticks(input int n);
    repeat (n) begin @(negedge clk); ce = 1; @(negedge clk); ce = 0; end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int periods [4] = '{1024, 16, 64, 256};
    logic [7:0] d0;
    repeat (3) @(negedge clk); rst_n = 1;
    // DIV
    wr(0, 8'h00);
    ticks(255); rd(0); check("DIV before 256", rv, 0);
    ticks(1);   rd(0); check("DIV at 256", rv, 1);
    ticks(256*5); rd(0); check("DIV at 6*256", rv, 6);
    wr(0, 8'h5A); rd(0); check("DIV cleared", rv, 0);
    // TIMA rates
    for (int s = 0; s < 4; s++) begin
      wr(3, 8'(4 | s)); wr(0, 0); wr(1, 0);
      ticks(periods[s] - 1); rd(1); check($sformatf("TIMA sel %0d before", s), rv, 0);
      ticks(1);              rd(1); check($sformatf("TIMA sel %0d at period", s), rv, 1);
      ticks(periods[s] * 3); rd(1); check($sformatf("TIMA sel %0d x4", s), rv, 4);
    end
    // stopped
    wr(3, 8'h01); wr(1, 8'h10); ticks(100); rd(1); check("TIMA stopped", rv, 8'h10);
    rd(3); check("TAC read", rv, 8'hF9);
    // overflow
    irqs = 0;
    wr(2, 8'hC0); wr(3, 8'h05); wr(0, 0); wr(1, 8'hFE);
    ticks(16); rd(1); check("TIMA FF", rv, 8'hFF); check("no irq yet", irqs, 0);
    ticks(16); @(negedge clk); rd(1); check("TIMA reload", rv, 8'hC0); check("one irq", irqs, 1);
    rd(2); check("TMA read", rv, 8'hC0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
