// OAM DMA ($FF46). Writing XX starts a copy of the 160 bytes at $XX00..$XX9F
// into OAM. While active the engine is bus master: each Game Boy tick (ce)
// it reads one source byte through the bus controller, whose read data
// returns on the following clock, and writes the byte read on the previous
// tick into OAM. A transfer takes 161 ticks. The rate of one byte per tick
// is this design's choice; the register and its effect follow the Game Boy
// memory map.
module oam_dma #(
  parameter int N_BYTES = 160
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        start,
  input  logic [7:0]  src_hi,
  output logic        active,
  output logic [15:0] bus_addr,
  output logic        bus_rd,
  input  logic [7:0]  bus_rdata,
  output logic        oam_we,
  output logic [7:0]  oam_addr,
  output logic [7:0]  oam_wdata
);
  logic [7:0] src_q;
  logic [8:0] idx;        // next byte to read
  logic       have_data;  // a read was issued on the previous tick
  logic [7:0] wr_idx;

  assign bus_addr = {src_q, idx[7:0]};
  assign bus_rd   = active && ce && (int'(idx) < N_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; src_q <= '0; idx <= '0;
      have_data <= 1'b0; wr_idx <= '0;
      oam_we <= 1'b0; oam_addr <= '0; oam_wdata <= '0;
    end else begin
      oam_we <= 1'b0;
      if (start) begin
        active <= 1'b1; src_q <= src_hi; idx <= '0; have_data <= 1'b0;
      end else if (active && ce) begin
        if (have_data) begin
          oam_we    <= 1'b1;
          oam_addr  <= wr_idx;
          oam_wdata <= bus_rdata;
        end
        if (int'(idx) < N_BYTES) begin
          wr_idx    <= idx[7:0];
          idx       <= idx + 9'd1;
          have_data <= 1'b1;
        end else begin
          have_data <= 1'b0;
          active    <= 1'b0;
        end
      end
    end
  end
endmodule
