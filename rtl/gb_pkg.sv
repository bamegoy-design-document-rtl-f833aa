// Shared types and constants of the BameGoy design: PPU modes, the OAM
// sprite entry, sprite-FIFO pixels, interrupt bit numbers and the memory-map
// regions decoded by the bus controller. The numbers follow the Game Boy
// memory map and register layout; the region encoding is this design's own.
package gb_pkg;

  // STAT bits 1:0
  typedef enum logic [1:0] {
    MODE_HBLANK = 2'd0,
    MODE_VBLANK = 2'd1,
    MODE_OAM    = 2'd2,
    MODE_DRAW   = 2'd3
  } ppu_mode_t;

  // One OAM entry, byte 0 in the low bits of the packed vector.
  typedef struct packed {
    logic [7:0] flags;  // 7 priority, 6 Y-flip, 5 X-flip, 4 palette
    logic [7:0] tile;
    logic [7:0] x;      // screen X + 8
    logic [7:0] y;      // screen Y + 16
  } sprite_t;

  // One pixel of the sprite FIFO.
  typedef struct packed {
    logic       prio;     // 1: background colours 1-3 cover the sprite
    logic       palette;  // 0: OBP0, 1: OBP1
    logic [1:0] color;    // 0 is transparent
  } obj_pix_t;

  // IE / IF bit positions
  localparam int INT_VBLANK = 0;
  localparam int INT_STAT   = 1;
  localparam int INT_TIMER  = 2;
  localparam int INT_SERIAL = 3;
  localparam int INT_JOYPAD = 4;

  typedef enum logic [3:0] {
    REG_NONE,   // unmapped: reads $FF
    REG_ROM,    // $0000-$7FFF
    REG_VRAM,   // $8000-$9FFF
    REG_ERAM,   // $A000-$BFFF
    REG_WRAM,   // $C000-$DFFF
    REG_OAM,    // $FE00-$FE9F
    REG_IO,     // $FF00-$FF7F
    REG_HRAM,   // $FF80-$FFFE
    REG_IE      // $FFFF
  } region_t;

  function automatic region_t decode_region(input logic [15:0] a);
    if (a[15] == 1'b0)                  return REG_ROM;
    else if (a[15:13] == 3'b100)        return REG_VRAM;
    else if (a[15:13] == 3'b101)        return REG_ERAM;
    else if (a[15:13] == 3'b110)        return REG_WRAM;
    else if (a >= 16'hFE00 && a <= 16'hFE9F) return REG_OAM;
    else if (a >= 16'hFF00 && a <= 16'hFF7F) return REG_IO;
    else if (a >= 16'hFF80 && a <= 16'hFFFE) return REG_HRAM;
    else if (a == 16'hFFFF)             return REG_IE;
    else                                return REG_NONE;
  endfunction

endpackage
