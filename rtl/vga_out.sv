// VGA output, 640x480 at 60 Hz: 800 pixel clocks per line (640 visible,
// 16 front porch, 96 sync, 48 back porch) and 525 lines (480, 10, 2, 33),
// negative sync pulses, advanced by pix_ce (a 25 MHz tick). The 160x144
// Game Boy picture is scaled 3:1 into a 480x432 window centred on the
// screen (columns 80-559, lines 24-455); outside it the screen is black.
// Each visible position asks the framebuffer for (fb_x, fb_y) = (col-80)/3,
// (line-24)/3, counted with divide-by-3 sub-counters rather than dividers.
// fb_x/fb_y change right after a pix_ce and the framebuffer answers one
// clock later, so pix_ce must come at most every other clock (25 MHz from
// 50 MHz); colour, syncs and blank are registered on the same pix_ce, one
// clock after each other's position is counted. Shades 0..3
// are greys FF, AA, 55, 00. The porch and sync numbers are the standard
// 640x480 timing.
module vga_out #(
  parameter int H_VIS = 640, parameter int H_FP = 16, parameter int H_SYNC = 96, parameter int H_BP = 48,
  parameter int V_VIS = 480, parameter int V_FP = 10, parameter int V_SYNC = 2,  parameter int V_BP = 33,
  parameter int SCALE = 3,
  parameter int GB_W  = 160,
  parameter int GB_H  = 144
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_ce,
  output logic [7:0] fb_x,
  output logic [7:0] fb_y,
  input  logic [1:0] fb_shade,
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic       vga_hsync,
  output logic       vga_vsync,
  output logic       vga_blank_n
);
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int X0 = (H_VIS - SCALE * GB_W) / 2;
  localparam int Y0 = (V_VIS - SCALE * GB_H) / 2;

  logic [10:0] hc, vc;
  logic [1:0]  hsub, vsub;
  logic        in_win;

  assign in_win = (int'(hc) >= X0) && (int'(hc) < X0 + SCALE * GB_W) &&
                  (int'(vc) >= Y0) && (int'(vc) < Y0 + SCALE * GB_H);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc <= '0; vc <= '0; hsub <= '0; vsub <= '0; fb_x <= '0; fb_y <= '0;
      vga_hsync <= 1'b1; vga_vsync <= 1'b1; vga_blank_n <= 1'b0;
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
    end else if (pix_ce) begin
      // fb_shade already holds the pixel at (fb_x, fb_y)
      vga_r <= in_win ? ~{fb_shade, fb_shade, fb_shade, fb_shade} : 8'h00;
      vga_g <= in_win ? ~{fb_shade, fb_shade, fb_shade, fb_shade} : 8'h00;
      vga_b <= in_win ? ~{fb_shade, fb_shade, fb_shade, fb_shade} : 8'h00;
      vga_hsync   <= !((int'(hc) >= H_VIS + H_FP) && (int'(hc) < H_VIS + H_FP + H_SYNC));
      vga_vsync   <= !((int'(vc) >= V_VIS + V_FP) && (int'(vc) < V_VIS + V_FP + V_SYNC));
      vga_blank_n <= (int'(hc) < H_VIS) && (int'(vc) < V_VIS);

      // horizontal scaler: fb_x steps every SCALE columns inside the window
      if (in_win) begin
        if (int'(hsub) == SCALE - 1) begin
          hsub <= '0;
          fb_x <= (int'(fb_x) == GB_W - 1) ? 8'd0 : fb_x + 8'd1;
        end else begin
          hsub <= hsub + 2'd1;
        end
      end

      if (int'(hc) == H_TOT - 1) begin
        hc <= '0; hsub <= '0; fb_x <= '0;
        if (int'(vc) >= Y0 && int'(vc) < Y0 + SCALE * GB_H) begin
          if (int'(vsub) == SCALE - 1) begin
            vsub <= '0;
            fb_y <= (int'(fb_y) == GB_H - 1) ? 8'd0 : fb_y + 8'd1;
          end else begin
            vsub <= vsub + 2'd1;
          end
        end
        if (int'(vc) == V_TOT - 1) begin
          vc <= '0; vsub <= '0; fb_y <= '0;
        end else begin
          vc <= vc + 11'd1;
        end
      end else begin
        hc <= hc + 11'd1;
      end
    end
  end
endmodule
