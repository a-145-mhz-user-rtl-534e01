// logic_cell: FLECHA programmable logic cell with its input and output
// multiplexers and its own 17-bit configuration segment.
//
// Functional block: the eight truth-table bits of the configuration segment
// feed an 8:1 multiplexer addressed by the three cell inputs {in2,in1,in0},
// so the cell computes any Boolean function of three variables.
// Output block: an edge-triggered D flip-flop samples the function every
// clock while the array runs; a 2:1 multiplexer (reg_en) selects the
// registered or the combinational value as the cell output. While run is low
// (configuration in progress) the flip-flop is held at 0 and the output is
// forced to 0, so half-loaded configurations cannot form live loops.
// Input multiplexers: each cell input picks one of four candidate signals,
// src0/src1/src2, assembled by the row (pad bus lines, lateral neighbours,
// the cell's own output, central bus lines). Output multiplexer: drive[k] is
// the cell output routed onto one of three lines of its group's pad bus
// (same position, next, previous), or none.
//
// The look-up table, 8:1 multiplexer, flip-flop, 2:1 output multiplexer and
// the four routing multiplexers follow the original FLECHA design; the four-way choice per
// input and the three pad-bus targets are this design's own.
// Timing: the function is combinational from the selected sources to out
// when reg_en = 0; with reg_en = 1 out changes one clock after its inputs.
// In a row, lint tools report a possible combinational loop through out:
// the routing lets a configuration feed a combinational cell back to itself,
// which is a property of any programmable array, not of this cell.
module logic_cell
  import flecha_pkg::*;
(
  input  logic       clk,
  input  logic       run,       // internal RST of the original: high = normal operation
  // configuration chain
  input  logic       cfg_shift,
  input  logic       cfg_sin,
  output logic       cfg_sout,
  // routing
  input  logic [3:0] src0,      // candidates for input 0
  input  logic [3:0] src1,      // candidates for input 1
  input  logic [3:0] src2,      // candidates for input 2
  output logic       out,       // cell output (to neighbours and central bus driver)
  output logic [2:0] drive      // out routed onto pad line {prev, next, same}
);

  cell_cfg_t cfg;
  logic [CELL_CFG_W-1:0] cfg_bits;

  cfg_shift_reg #(.W(CELL_CFG_W)) u_cfg (
    .clk      (clk),
    .shift_en (cfg_shift),
    .sin      (cfg_sin),
    .sout     (cfg_sout),
    .q        (cfg_bits)
  );
  assign cfg = cell_cfg_t'(cfg_bits);

  logic [2:0] idx;
  logic       f;
  logic       ff_q;

  // input multiplexers
  assign idx[0] = src0[cfg.in0_sel];
  assign idx[1] = src1[cfg.in1_sel];
  assign idx[2] = src2[cfg.in2_sel];

  // functional block: 8:1 multiplexer over the truth table
  assign f = cfg.lut[idx];

  // output block
  always_ff @(posedge clk) begin
    if (!run) ff_q <= 1'b0;
    else      ff_q <= f;
  end

  assign out = run & (cfg.reg_en ? ff_q : f);

  always_comb begin
    drive = '0;
    unique case (cfg.out_sel)
      OUT_SAME: drive[0] = out;
      OUT_NEXT: drive[1] = out;
      OUT_PREV: drive[2] = out;
      default:  drive    = '0;
    endcase
  end

endmodule
