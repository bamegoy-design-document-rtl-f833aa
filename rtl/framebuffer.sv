// Frame store between the PPU and the VGA output: 160x144 pixels of
// 2 bits (shade 0..3), one per address y*160 + x in a dual-port RAM. The
// PPU side writes one pixel per we; the VGA side presents (rx, ry) and gets
// the shade one clock later. Keeping a whole frame (rather than a single
// line) lets the 59.73 Hz PPU and the 60 Hz VGA scan run unsynchronised;
// this is this design's choice.
module framebuffer #(
  parameter int WIDTH  = 160,
  parameter int HEIGHT = 144
) (
  input  logic       clk,
  input  logic       we,
  input  logic [7:0] wx,
  input  logic [7:0] wy,
  input  logic [1:0] wshade,
  input  logic [7:0] rx,
  input  logic [7:0] ry,
  output logic [1:0] rshade
);
  localparam int AW = $clog2(WIDTH * HEIGHT);

  logic [AW-1:0] waddr, raddr;
  logic [1:0]    unused_a;

  assign waddr = AW'(int'(wy) * WIDTH + int'(wx));
  assign raddr = AW'(int'(ry) * WIDTH + int'(rx));

  dp_ram #(.AW(AW), .DW(2)) u_mem (
    .clk,
    .a_en(we), .a_we(we), .a_addr(waddr), .a_wdata(wshade), .a_rdata(unused_a),
    .b_en(1'b1), .b_we(1'b0), .b_addr(raddr), .b_wdata(2'b00), .b_rdata(rshade)
  );
endmodule
