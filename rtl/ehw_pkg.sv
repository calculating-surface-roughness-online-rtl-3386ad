// ehw_pkg: types and constants shared by the evolvable image-operator blocks.
//
// The virtual reconfigurable circuit (VRC) works on 8-bit grey-level pixels.
// Each processing element (PE) is set by a triplet: two 4-bit multiplexer
// selects (cfg1, cfg2) that pick its operands X and Y from a bus of sixteen
// 8-bit lines (the 128-bit bus), and a 4-bit function code (cfg3) that picks
// one of the sixteen operations listed in func_e. The array is 6 columns of
// 4 PEs plus a single output PE, 25 PEs in all, and it is fed with the nine
// pixels of a 3x3 neighbourhood. The column/row counts and the function set
// follow the published design; the 3x3 neighbourhood size is this design's
// choice.
package ehw_pkg;

  localparam int unsigned PIX_W  = 8;   // grey-level pixel width
  localparam int unsigned MUX_N  = 16;  // lines on a PE's input bus (128 / 8)
  localparam int unsigned SEL_W  = 4;   // width of cfg1 / cfg2
  localparam int unsigned FUNC_W = 4;   // width of cfg3
  localparam int unsigned N_WIN  = 9;   // pixels of the 3x3 neighbourhood
  localparam int unsigned N_ROWS = 4;   // PEs per column
  localparam int unsigned N_COLS = 6;   // columns before the output PE

  typedef logic [PIX_W-1:0] pixel_t;

  // Function codes F0..F15.
  typedef enum logic [FUNC_W-1:0] {
    F_SHR1   = 4'd0,   // X >> 1
    F_SHR2   = 4'd1,   // X >> 2
    F_NOT    = 4'd2,   // ~X
    F_AND    = 4'd3,   // X & Y
    F_OR     = 4'd4,   // X | Y
    F_XOR    = 4'd5,   // X ^ Y
    F_ADD    = 4'd6,   // X + Y (modulo 256)
    F_AVG    = 4'd7,   // (X + Y) >> 1
    F_AVGR   = 4'd8,   // (X + Y + 1) >> 1
    F_LO     = 4'd9,   // X & 0x0F
    F_HI     = 4'd10,  // X & 0xF0
    F_ORLO   = 4'd11,  // X | 0x0F
    F_ORHI   = 4'd12,  // X | 0xF0
    F_MIXOR  = 4'd13,  // (X & 0x0F) | (Y & 0xF0)
    F_MIXXOR = 4'd14,  // (X & 0x0F) ^ (Y & 0xF0)
    F_MIXAND = 4'd15   // (X & 0x0F) & (Y & 0xF0)
  } func_e;

  // One PE's configuration triplet: 12 bits.
  typedef struct packed {
    logic [SEL_W-1:0] cfg1;
    logic [SEL_W-1:0] cfg2;
    func_e            cfg3;
  } triplet_t;

endpackage
