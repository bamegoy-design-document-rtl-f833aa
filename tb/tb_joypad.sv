// Self-checking test of the joypad register: for random button states and
// all four select settings the low nibble must equal the active-low AND of
// the selected groups, bits 5:4 read back, bits 7:6 read 1, and irq must
// pulse exactly when a selected line falls.
module tb_joypad;
  logic clk = 0, rst_n = 0, we = 0, irq;
  logic [7:0] buttons = 0, wdata = 0, rdata;
  int checks = 0, failures = 0, irqs_seen = 0, irqs_exp = 0;

  joypad dut (.*);
  always #5 clk = ~clk;

  function automatic logic [3:0] lines(input logic [1:0] sel, input logic [7:0] b);
    logic [3:0] l = 4'hF;
    if (!sel[0]) l = l & ~b[3:0];
    if (!sel[1]) l = l & ~b[7:4];
    return l;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && irq) irqs_seen++;

  initial begin
    logic [1:0] sel; logic [3:0] prev, now;
    sel = 2'b11; prev = 4'hF;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if ($urandom % 4 == 0) begin
        we = 1; wdata = 8'($urandom); sel = wdata[5:4];
        @(negedge clk); we = 0;
      end else begin
        buttons = ($urandom % 2) ? 8'($urandom) : buttons ^ (8'd1 << ($urandom % 8));
      end
      now = lines(sel, buttons);
      if ((prev & ~now) != 0) irqs_exp++;
      prev = now;
      #1; checks++;
      if (rdata !== {2'b11, sel, now}) begin failures++; $display("rdata %h exp %h", rdata, {2'b11, sel, now}); end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (irqs_seen != irqs_exp) begin failures++; $display("irqs %0d exp %0d", irqs_seen, irqs_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
