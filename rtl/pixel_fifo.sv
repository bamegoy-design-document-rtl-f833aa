// Pixel FIFO of the PPU: an 8-entry shift register, one instance for the
// background and one for sprites. load writes a whole tile row (entry 0 is
// the leftmost pixel, shifted out first) and sets the count to DEPTH; pop
// shifts out entry 0 and decrements the count; clear empties it. All
// entries are visible so the sprite path can merge a new sprite row over
// pixels still queued. load has priority over pop, clear over both.
module pixel_fifo #(
  parameter int DEPTH = 8,
  parameter int W     = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 load,
  input  logic [DEPTH-1:0][W-1:0] load_data,
  input  logic                 pop,
  output logic [DEPTH-1:0][W-1:0] entries,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entries <= '0;
      count   <= '0;
    end else if (clear) begin
      entries <= '0;
      count   <= '0;
    end else if (load) begin
      entries <= load_data;
      count   <= ($clog2(DEPTH+1))'(DEPTH);
    end else if (pop && count != 0) begin
      entries <= {{W{1'b0}}, entries[DEPTH-1:1]};
      count   <= count - 1'b1;
    end
  end
endmodule
