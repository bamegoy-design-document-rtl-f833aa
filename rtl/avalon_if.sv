// Avalon-MM slave through which the host processor drives the system: the
// host program loads the cartridge image, passes the controller byte and
// releases the CPU. Word registers (avs_address):
//   0 CTRL     bit 0 = run: 1 releases the CPU from reset (read/write)
//   1 ROM_ADDR ROM byte address for loading, bits 14:0 (read/write)
//   2 ROM_DATA write: store bits 7:0 at ROM_ADDR, then ROM_ADDR += 1
//   3 JOYPAD   buttons, 1 = pressed: bit 0 Right, 1 Left, 2 Up, 3 Down,
//              4 A, 5 B, 6 Select, 7 Start (read/write)
//   4 STATUS   read: bits 9:8 PPU mode, bits 7:0 LY
// Writes take effect on the clock of the strobe; read data is registered
// (read latency 1). The register map is this design's own.
module avalon_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        avs_chipselect,
  input  logic [2:0]  avs_address,
  input  logic        avs_write,
  input  logic        avs_read,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        rom_we,
  output logic [14:0] rom_addr,
  output logic [7:0]  rom_wdata,
  output logic [7:0]  buttons,
  output logic        cpu_run,
  input  logic [7:0]  ly,
  input  logic [1:0]  mode
);
  logic wr, rd;
  assign wr = avs_chipselect && avs_write;
  assign rd = avs_chipselect && avs_read;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rom_we <= 1'b0; rom_addr <= '0; rom_wdata <= '0;
      buttons <= '0; cpu_run <= 1'b0; avs_readdata <= '0;
    end else begin
      rom_we <= 1'b0;
      if (rom_we) rom_addr <= rom_addr + 15'd1;
      if (wr) begin
        unique case (avs_address)
          3'd0: cpu_run  <= avs_writedata[0];
          3'd1: rom_addr <= avs_writedata[14:0];
          3'd2: begin rom_we <= 1'b1; rom_wdata <= avs_writedata[7:0]; end
          3'd3: buttons  <= avs_writedata[7:0];
          default: ;
        endcase
      end
      if (rd) begin
        unique case (avs_address)
          3'd0: avs_readdata <= {31'd0, cpu_run};
          3'd1: avs_readdata <= {17'd0, rom_addr};
          3'd3: avs_readdata <= {24'd0, buttons};
          3'd4: avs_readdata <= {22'd0, mode, ly};
          default: avs_readdata <= '0;
        endcase
      end
    end
  end
endmodule
