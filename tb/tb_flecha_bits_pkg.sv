// tb_flecha_bits_pkg: configuration-stream helpers shared by the row and
// matrix testbenches. A configuration image is a bit vector indexed by chain
// position: position 0 is the first bit after the serial input (row 0,
// cell 0, bit 0) and positions grow along the chain. The stream is sent
// highest position first, so that after the last bit every bit sits at its
// own position. Layout per row of ten columns: column c holds the cell's 17
// bits at 19*c and the pad's 2 bits at 19*c+17; the central bus selector's
// 4 bits follow at 190.
package tb_flecha_bits_pkg;
  import flecha_pkg::*;

  localparam int unsigned CELLS = 10;
  localparam int unsigned COL_W = CELL_CFG_W + PAD_CFG_W;
  localparam int unsigned ROW_W = CELLS * COL_W + CBUS_CFG_W;

  function automatic int unsigned cell_pos(int unsigned r, int unsigned c);
    return r * ROW_W + c * COL_W;
  endfunction

  function automatic int unsigned pad_pos(int unsigned r, int unsigned c);
    return r * ROW_W + c * COL_W + CELL_CFG_W;
  endfunction

  function automatic int unsigned cbus_pos(int unsigned r);
    return r * ROW_W + CELLS * COL_W;
  endfunction

  // build one cell's configuration word
  function automatic cell_cfg_t mk_cell(logic [7:0] lut, logic reg_en,
                                        logic [1:0] s0, logic [1:0] s1, logic [1:0] s2,
                                        out_sel_e o);
    cell_cfg_t c;
    c.lut = lut; c.reg_en = reg_en;
    c.in0_sel = s0; c.in1_sel = s1; c.in2_sel = s2;
    c.out_sel = o;
    return c;
  endfunction

  // truth tables over {in2,in1,in0}
  localparam logic [7:0] LUT_IN0  = 8'hAA;
  localparam logic [7:0] LUT_IN1  = 8'hCC;
  localparam logic [7:0] LUT_IN2  = 8'hF0;
  localparam logic [7:0] LUT_XOR3 = 8'h96;
  localparam logic [7:0] LUT_AND01 = 8'h88;  // in0 & in1
  localparam logic [7:0] LUT_XOR01 = 8'h66;  // in0 ^ in1
  localparam logic [7:0] LUT_NOT0 = 8'h55;
endpackage
