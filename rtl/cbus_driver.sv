// cbus_driver: a row's connection onto the central bus.
//
// Rows that together implement a function larger than ten cells exchange
// signals over the central bus. Each row owns one bus line; a 4-bit segment
// of the configuration chain names the cell that drives it: value k in
// 1..CELLS puts cell k-1's output on the line, 0 (or any value above CELLS)
// leaves the line at 0. The selection is a combinational multiplexer.
// That rows meet over a central bus follows the original FLECHA design; one line per row
// and its selection code are this design's own.
module cbus_driver
  import flecha_pkg::*;
#(
  parameter int unsigned CELLS = 10
) (
  input  logic             clk,
  input  logic             cfg_shift,
  input  logic             cfg_sin,
  output logic             cfg_sout,
  input  logic [CELLS-1:0] cell_out,
  output logic             line
);

  logic [CBUS_CFG_W-1:0] sel;

  cfg_shift_reg #(.W(CBUS_CFG_W)) u_cfg (
    .clk      (clk),
    .shift_en (cfg_shift),
    .sin      (cfg_sin),
    .sout     (cfg_sout),
    .q        (sel)
  );

  always_comb begin
    line = 1'b0;
    for (int unsigned k = 0; k < CELLS; k++)
      if (sel == CBUS_CFG_W'(k + 1)) line = cell_out[k];
  end

endmodule
