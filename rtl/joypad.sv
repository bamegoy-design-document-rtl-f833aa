// Joypad register $FF00. The host writes the state of the eight buttons
// (1 = pressed; bit 0 Right, 1 Left, 2 Up, 3 Down, 4 A, 5 B, 6 Select,
// 7 Start). The CPU writes bits 5:4: bit 4 low selects the D-pad, bit 5 low
// the A/B/Select/Start group, both low ANDs the two groups, neither reads
// all ones. The low nibble reads 0 for a pressed key. irq pulses for one
// clock when any of the four lines goes from high to low, the joypad
// interrupt source. The host byte order is this design's choice.
module joypad (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] buttons,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       irq
);
  logic [1:0] sel;    // {P15, P14}
  logic [3:0] lines, lines_q;

  always_comb begin
    lines = 4'hF;
    if (!sel[0]) lines &= ~buttons[3:0];
    if (!sel[1]) lines &= ~buttons[7:4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel     <= 2'b11;
      lines_q <= 4'hF;
      irq     <= 1'b0;
    end else begin
      if (we) sel <= wdata[5:4];
      lines_q <= lines;
      irq     <= |(lines_q & ~lines);
    end
  end

  assign rdata = {2'b11, sel, lines};
endmodule
