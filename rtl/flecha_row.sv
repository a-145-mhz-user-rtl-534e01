// flecha_row: one row of the FLECHA matrix - ten logic cells, ten I/O pads,
// the lateral switching between them and the row's configuration memory.
//
// Lateral placement: the cells of one function are placed side by side, so
// each cell only needs its neighbours. The row's pads form groups of five;
// each group has a 5-line pad bus shared by its five pads and five cells.
// Column c belongs to group g = c/5 at position p = c%5. Cell input sources:
//   input 0: {cbus_in[0], out[c+1], out[c-1], line[g][p]}      (sel 3..0)
//   input 1: {cbus_in[1], out[c],   out[c-1], line[g][p+1]}
//   input 2: {cbus_in[2], out[c],   out[c+1], line[g][p+2]}
// with positions modulo 5, out[-1] and out[CELLS] tied to 0, and out[c] the
// cell's own output (feedback for counters and state machines). A pad line
// is the OR of everything configured to drive it: its pad in PAD_IN mode,
// the partner row's pad at the same place in PAD_IN_ALT mode, and any cell
// of the group whose output multiplexer points at it. A correct
// configuration gives each line at most one driver; the OR only makes
// a conflicting one harmless. The cbus_driver at the end of the row puts one
// chosen cell output on the row's central bus line.
//
// Configuration chain order through the row (194 bits for ten cells):
// cell 0 (17), pad 0 (2), cell 1, pad 1, ..., cell 9, pad 9, cbus driver (4).
//
// Groups of five pads with a 5-line bus, neighbour-only links and a
// row-level central bus connection follow the original FLECHA design. The
// exact source lists, the OR-combining of lines and the chain order are this
// design's own: the original's switch pattern (296 switches) is not
// reproduced.
// Timing: purely combinational between cells except for the cell flip-flops.
// Lint tools report the cell output vector as a possible combinational loop
// (UNOPTFLAT): that is inherent in a programmable array, whose loops exist
// only in configurations that close them through combinational cells.
module flecha_row
  import flecha_pkg::*;
#(
  parameter int unsigned CELLS = 10
) (
  input  logic             clk,
  input  logic             run,
  input  logic             cfg_shift,
  input  logic             cfg_sin,
  output logic             cfg_sout,
  // pads
  input  logic [CELLS-1:0] pad_in,
  output logic [CELLS-1:0] pad_out,
  output logic [CELLS-1:0] pad_oe,
  // alternative paths with the partner row
  input  logic [CELLS-1:0] alt_in,    // partner's pins in PAD_IN_ALT mode
  output logic [CELLS-1:0] alt_out,   // this row's pins in PAD_IN_ALT mode
  // central bus
  input  logic [CBUS_READ-1:0] cbus_in, // lines of the other rows, one per cell input
  output logic             cbus_out   // this row's line
);

  logic [CELLS:0]   chain;      // serial chain between columns
  logic [CELLS-1:0] cell_out;
  logic [CELLS-1:0] line;       // pad lines, index = column
  logic [CELLS-1:0] pad_to_line;
  logic [2:0]       drive [CELLS];
  logic [CELLS+1:0] nb;         // cell outputs with a 0 on each side: nb[c+1] = out[c]

  assign chain[0] = cfg_sin;
  assign nb = {1'b0, cell_out, 1'b0};

  // pad lines: OR of every configured driver
  always_comb begin
    line = pad_to_line | alt_in;
    for (int unsigned d = 0; d < CELLS; d++) begin
      automatic int unsigned g  = d / GROUP;
      automatic int unsigned pd = d % GROUP;
      line[g*GROUP + pd]               |= drive[d][0];
      line[g*GROUP + (pd+1) % GROUP]   |= drive[d][1];
      line[g*GROUP + (pd+GROUP-1) % GROUP] |= drive[d][2];
    end
  end

  for (genvar c = 0; c < CELLS; c++) begin : g_col
    localparam int unsigned G = c / GROUP;
    localparam int unsigned P = c % GROUP;
    logic mid;  // chain between the cell and its pad

    logic_cell u_cell (
      .clk       (clk),
      .run       (run),
      .cfg_shift (cfg_shift),
      .cfg_sin   (chain[c]),
      .cfg_sout  (mid),
      .src0      ({cbus_in[0], nb[c+2], nb[c], line[G*GROUP + P]}),
      .src1      ({cbus_in[1], nb[c+1], nb[c], line[G*GROUP + (P+1) % GROUP]}),
      .src2      ({cbus_in[2], nb[c+1], nb[c+2], line[G*GROUP + (P+2) % GROUP]}),
      .out       (cell_out[c]),
      .drive     (drive[c])
    );

    io_pad_ctrl u_pad (
      .clk        (clk),
      .run        (run),
      .cfg_shift  (cfg_shift),
      .cfg_sin    (mid),
      .cfg_sout   (chain[c+1]),
      .pad_in     (pad_in[c]),
      .pad_out    (pad_out[c]),
      .pad_oe     (pad_oe[c]),
      .line       (line[c]),
      .to_line    (pad_to_line[c]),
      .to_partner (alt_out[c])
    );
  end

  cbus_driver #(.CELLS(CELLS)) u_cbus (
    .clk       (clk),
    .cfg_shift (cfg_shift),
    .cfg_sin   (chain[CELLS]),
    .cfg_sout  (cfg_sout),
    .cell_out  (cell_out),
    .line      (cbus_out)
  );

  initial begin
    assert (CELLS % GROUP == 0) else $error("CELLS must be a multiple of %0d", GROUP);
  end

endmodule
