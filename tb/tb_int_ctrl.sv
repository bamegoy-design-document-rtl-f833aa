// Self-checking test of int_ctrl: request pulses set IF bits, acknowledges
// and IF writes clear them, IE masks irq_flags, a request beats a clearing
// write in the same clock, and the upper bits read as 1.
module tb_int_ctrl;
  logic clk = 0, rst_n = 0, ie_we = 0, if_we = 0;
  logic [4:0] req = 0, ack = 0, irq_flags;
  logic [7:0] wdata = 0, ie_rdata, if_rdata;
  int checks = 0, failures = 0;
  logic [4:0] m_ie, m_if;

  int_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_ie = 0; m_if = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req = 5'($urandom) & 5'($urandom); ack = 5'($urandom) & 5'($urandom);
      ie_we = ($urandom % 6 == 0); if_we = ($urandom % 6 == 0); wdata = 8'($urandom);
      @(posedge clk);
      if (ie_we) m_ie = wdata[4:0];
      if (if_we) m_if = wdata[4:0] | req; else m_if = (m_if & ~ack) | req;
      #1;
      checks += 3;
      if (ie_rdata !== {3'b111, m_ie}) begin failures++; $display("IE %h", ie_rdata); end
      if (if_rdata !== {3'b111, m_if}) begin failures++; $display("IF %h exp %h", if_rdata, m_if); end
      if (irq_flags !== (m_ie & m_if)) begin failures++; $display("flags"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
