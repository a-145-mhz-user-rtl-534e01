// flecha_pkg: shared constants and configuration formats of the FLECHA
// user-programmable gate array.
//
// The matrix is built from rows of ten 3-input logic cells and ten I/O pads.
// Every programmable choice is held in a bit-serial configuration chain. The
// original FLECHA design fixes the chain length at 776 bits for four rows; the split of
// those bits between cells, pads and the central bus below is this design's
// own, chosen so that a row holds exactly 776/4 = 194 bits:
//   per column (cell + pad) : 17 + 2 = 19 bits, times 10 columns = 190
//   central bus driver      : 4 bits
// The chain enters row 0 at bit 0 of column 0's cell segment. Within a
// segment the bit loaded last sits at index 0, so a field occupies the bit
// positions shown by the packed structs (MSB first).
package flecha_pkg;

  localparam int unsigned LUT_BITS   = 8;  // 3-input truth table
  localparam int unsigned CELL_CFG_W = 17; // see cell_cfg_t
  localparam int unsigned PAD_CFG_W  = 2;  // see pad_mode_e
  localparam int unsigned CBUS_CFG_W = 4;  // cell index + 1 driving the row's central bus line, 0 = none
  localparam int unsigned GROUP      = 5;  // pads per pad bus / group
  localparam int unsigned CBUS_READ  = 3;  // central bus lines visible to a row (one per cell input)

  // Where a cell's output is placed on its group's 5-line pad bus.
  typedef enum logic [1:0] {
    OUT_NONE = 2'd0, // output seen only by lateral neighbours / central bus
    OUT_SAME = 2'd1, // pad line at the cell's own position p
    OUT_NEXT = 2'd2, // pad line p+1 (mod 5)
    OUT_PREV = 2'd3  // pad line p-1 (mod 5)
  } out_sel_e;

  // Programmable I/O pad modes.
  typedef enum logic [1:0] {
    PAD_OFF    = 2'd0, // buffer off, nothing driven onto the pad bus
    PAD_IN     = 2'd1, // pin drives its own row's pad line
    PAD_OUT    = 2'd2, // pad line drives the pin
    PAD_IN_ALT = 2'd3  // pin drives the pad line at the same place in the partner row
  } pad_mode_e;

  // Logic cell configuration, 17 bits.
  //   lut     : truth table, output = lut[{in2,in1,in0}]
  //   reg_en  : output block multiplexer, 1 = registered output
  //   inN_sel : input multiplexer N, 4 sources each (see logic_cell)
  //   out_sel : output multiplexer onto the pad bus
  typedef struct packed {
    out_sel_e    out_sel;
    logic [1:0]  in2_sel;
    logic [1:0]  in1_sel;
    logic [1:0]  in0_sel;
    logic        reg_en;
    logic [LUT_BITS-1:0] lut;
  } cell_cfg_t;

  function automatic int unsigned row_cfg_bits(int unsigned cells);
    return cells * (CELL_CFG_W + PAD_CFG_W) + CBUS_CFG_W;
  endfunction

endpackage
