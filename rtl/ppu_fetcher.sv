// Background / window fetcher of the PPU. Four steps of two dots each:
// read the tile number from the tile map, read the low byte of the tile
// row, read the high byte, then push the eight pixels into the background
// FIFO. The push waits until the FIFO is empty and happens on the first
// dot it is (the PPU counts a FIFO whose last pixel leaves on this dot as
// empty, so output does not pause between tiles). VRAM reads are synchronous: the address is driven on the
// first dot of a step and the byte is taken on the second.
//   Map address : base ($1800 or $1C00 in VRAM, from LCDC bit 3 for the
//                 background, bit 6 for the window) + row*32 + column.
//   Background  : row = (LY+SCY)/8, column = (SCX/8 + n) mod 32.
//   Window      : row = window line / 8, column = n.
//   Tile data   : LCDC bit 4 = 1: $0000 + tile*16 (8000 method), else
//                 $1000 + signed(tile)*16 (8800 method); + 2*(line mod 8).
// Pixel j of the row (j = 0 leftmost) has colour {hi[7-j], lo[7-j]}.
// restart begins a new line (or the window) at column n = 0; stall holds
// the fetcher while a sprite is fetched. The PPU starts a sprite fetch only
// while waiting is high, so no tile-map or tile-data read is cut in two.
module ppu_fetcher (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        restart,
  input  logic        window,
  input  logic        stall,
  input  logic [7:0]  lcdc,
  input  logic [7:0]  scx,
  input  logic [7:0]  scy,
  input  logic [7:0]  ly,
  input  logic [7:0]  win_line,
  output logic [12:0] vram_addr,
  input  logic [7:0]  vram_data,
  input  logic        fifo_empty,
  output logic        push,
  output logic [7:0][1:0] row,
  output logic        waiting   // holding a row, waiting to push
);
  typedef enum logic [2:0] {F_TILE0, F_TILE1, F_LO0, F_LO1, F_HI0, F_HI1, F_PUSH} fstate_t;
  fstate_t st;
  logic [4:0]  col_n;
  logic [7:0]  tile, lo, hi;
  logic [7:0]  yline;
  logic [4:0]  col;
  logic [12:0] map_addr, data_addr;

  assign yline = window ? win_line : (ly + scy);
  assign col   = window ? col_n : (scx[7:3] + col_n);

  always_comb begin
    map_addr = ((window ? lcdc[6] : lcdc[3]) ? 13'h1C00 : 13'h1800)
             + 13'({yline[7:3], col});
    if (lcdc[4]) data_addr = {1'b0, tile, yline[2:0], 1'b0};
    else         data_addr = 13'h1000 + {{1{tile[7]}}, tile, yline[2:0], 1'b0};
    unique case (st)
      F_TILE0, F_TILE1: vram_addr = map_addr;
      F_LO0, F_LO1:     vram_addr = data_addr;
      default:          vram_addr = data_addr | 13'd1;
    endcase
    for (int j = 0; j < 8; j++) row[j] = {hi[7-j], lo[7-j]};
  end

  assign waiting = (st == F_PUSH);
  assign push = ce && !stall && !restart && (st == F_PUSH) && fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_TILE0; col_n <= '0; tile <= '0; lo <= '0; hi <= '0;
    end else if (ce) begin
      if (restart) begin
        st <= F_TILE0; col_n <= '0;
      end else if (!stall) begin
        unique case (st)
          F_TILE0: st <= F_TILE1;
          F_TILE1: begin tile <= vram_data; st <= F_LO0; end
          F_LO0:   st <= F_LO1;
          F_LO1:   begin lo <= vram_data; st <= F_HI0; end
          F_HI0:   st <= F_HI1;
          F_HI1:   begin hi <= vram_data; st <= F_PUSH; end
          default: if (fifo_empty) begin st <= F_TILE0; col_n <= col_n + 5'd1; end
        endcase
      end
    end
  end
endmodule
