// Game Boy timer: DIV ($FF04), TIMA ($FF05), TMA ($FF06), TAC ($FF07).
// A 16-bit divider counts Game Boy clock ticks (ce, 4.194304 MHz); DIV is
// its upper byte (16384 Hz) and any write to DIV clears it. When TAC bit 2
// is set, TIMA counts falling edges of the divider bit picked by TAC[1:0]:
// bit 9 (4096 Hz), bit 3 (262144 Hz), bit 5 (65536 Hz) or bit 7 (16384 Hz),
// the four rates the TAC description lists. On overflow TIMA reloads from
// TMA in the same tick and irq pulses for one clock. Register reads are
// combinational. The divider-bit scheme and the immediate reload are this
// design's choices.
module timer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       we,
  input  logic [1:0] addr,    // 0 DIV, 1 TIMA, 2 TMA, 3 TAC
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       irq
);
  logic [15:0] div_q, div_n;
  logic [7:0]  tima, tma;
  logic [2:0]  tac;
  logic        fall;

  function automatic logic pick_bit(input logic [15:0] d, input logic [1:0] s);
    unique case (s)
      2'd0:    return d[9];
      2'd1:    return d[3];
      2'd2:    return d[5];
      default: return d[7];
    endcase
  endfunction

  // the selected divider bit falls on this tick
  assign div_n = div_q + 16'd1;
  assign fall  = tac[2] && pick_bit(div_q, tac[1:0]) && !pick_bit(div_n, tac[1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= '0; tima <= '0; tma <= '0; tac <= '0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (ce) begin
        div_q <= div_n;
        if (fall) begin
          if (tima == 8'hFF) begin
            tima <= tma;
            irq  <= 1'b1;
          end else begin
            tima <= tima + 8'd1;
          end
        end
      end
      if (we) begin
        unique case (addr)
          2'd0: div_q <= '0;
          2'd1: tima <= wdata;
          2'd2: tma  <= wdata;
          default: tac <= wdata[2:0];
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      2'd0: rdata = div_q[15:8];
      2'd1: rdata = tima;
      2'd2: rdata = tma;
      default: rdata = {5'b11111, tac};
    endcase
  end
endmodule
