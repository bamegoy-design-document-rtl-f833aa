// Interrupt registers IE ($FFFF) and IF ($FF0F), five sources: V-Blank,
// LCDC (STAT), timer, serial and joypad (bits 0..4). A one-clock pulse on
// req[i] sets IF bit i; the CPU clears bits by writing IF or by pulsing
// ack[i] when it services an interrupt. irq_flags = IE & IF tells the CPU
// core which interrupts are pending. A request arriving in the same clock
// as a clearing write or acknowledge wins. Reads return the upper three
// bits as 1 (unmapped). Register layout follows the Game Boy map; the
// ack port is this design's interface to the external CPU core.
module int_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] req,
  input  logic [4:0] ack,
  input  logic       ie_we,
  input  logic       if_we,
  input  logic [7:0] wdata,
  output logic [7:0] ie_rdata,
  output logic [7:0] if_rdata,
  output logic [4:0] irq_flags
);
  logic [4:0] ie_q, if_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ie_q <= '0;
      if_q <= '0;
    end else begin
      if (ie_we) ie_q <= wdata[4:0];
      if (if_we) if_q <= wdata[4:0] | req;
      else       if_q <= (if_q & ~ack) | req;
    end
  end

  assign ie_rdata  = {3'b111, ie_q};
  assign if_rdata  = {3'b111, if_q};
  assign irq_flags = ie_q & if_q;
endmodule
