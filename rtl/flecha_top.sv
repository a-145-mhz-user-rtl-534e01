// flecha_top: the FLECHA user-programmable gate array.
//
// A small, fast FPGA meant for glue logic between processors and memories:
// ROWS rows (4) of CELLS logic cells (10) and as many I/O pads, 40 of each.
// Each row has its own switching and configuration memory (flecha_row); rows
// that must cooperate do so over the central bus, one line per row, each row
// reading the lines of the other rows (row r's cell input k reads the line
// of row (r+k+1) mod ROWS). Rows 0/1 and 2/3 are partners for the pads'
// alternative input path.
//
// Configuration: after reset_n rises, flecha_ctrl raises menable and the
// serial stream on din is shifted through all rows (row 0 first) for 2**CNT_W
// clocks. With the default sizes the chain holds 4 x 194 = 776 bits, so a
// stream is 248 zero bits followed by the 776 configuration bits, the bit
// meant for the chain's far end (row 3's central bus selector, top bit)
// first. One clock after the count completes, running goes high and the
// configured logic works; the cell flip-flops start from 0.
//
// Pins: clk, reset_n, din and menable are the four control pins; pad_in,
// pad_out and pad_oe connect to the bidirectional pad buffers (index
// r*CELLS + c). ck1/ck2/ckff1/ckff2 bring out the two-phase clock phases of
// the chain and of the cell flip-flops, and running the internal RST.
// Sizes, counter width and the load procedure follow the original FLECHA design; the
// central bus and partner-row wiring are this design's own.
// Lint tools report the cell outputs as a possible combinational loop
// (UNOPTFLAT) through the rows and the central bus: such loops close only in
// configurations that route a combinational cell back to itself.
module flecha_top
  import flecha_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned CELLS = 10,
  parameter int unsigned CNT_W = 10
) (
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic                  din,
  output logic                  menable,
  input  logic [ROWS*CELLS-1:0] pad_in,
  output logic [ROWS*CELLS-1:0] pad_out,
  output logic [ROWS*CELLS-1:0] pad_oe,
  output logic                  ck1,
  output logic                  ck2,
  output logic                  ckff1,
  output logic                  ckff2,
  output logic                  running
);

  logic             cfg_shift;
  logic             run;
  logic [ROWS:0]    chain;
  logic [ROWS-1:0]  cbus;
  logic [CELLS-1:0] alt_out [ROWS];

  flecha_ctrl #(.CNT_W(CNT_W)) u_ctrl (
    .clk       (clk),
    .reset_n   (reset_n),
    .menable   (menable),
    .cfg_shift (cfg_shift),
    .run       (run),
    .ck1       (ck1),
    .ck2       (ck2),
    .ckff1     (ckff1),
    .ckff2     (ckff2)
  );

  assign running  = run;

  // The controller always shifts 2**CNT_W bits; the chain must fit in that,
  // otherwise the counter needs another bit.
  initial begin
    assert (ROWS * row_cfg_bits(CELLS) <= (1 << CNT_W))
      else $error("configuration chain of %0d bits exceeds the %0d-bit load",
                  ROWS * row_cfg_bits(CELLS), 1 << CNT_W);
  end
  assign chain[0] = din;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    localparam int unsigned PARTNER = r ^ 1;
    logic [CELLS-1:0]     alt_in;
    logic [CBUS_READ-1:0] cbus_in;

    if (PARTNER < ROWS) begin : g_alt
      assign alt_in = alt_out[PARTNER];
    end else begin : g_noalt
      assign alt_in = '0;
    end

    for (genvar k = 0; k < CBUS_READ; k++) begin : g_cb
      assign cbus_in[k] = cbus[(r + k + 1) % ROWS];
    end

    flecha_row #(.CELLS(CELLS)) u_row (
      .clk       (clk),
      .run       (run),
      .cfg_shift (cfg_shift),
      .cfg_sin   (chain[r]),
      .cfg_sout  (chain[r+1]),
      .pad_in    (pad_in [r*CELLS +: CELLS]),
      .pad_out   (pad_out[r*CELLS +: CELLS]),
      .pad_oe    (pad_oe [r*CELLS +: CELLS]),
      .alt_in    (alt_in),
      .alt_out   (alt_out[r]),
      .cbus_in   (cbus_in),
      .cbus_out  (cbus[r])
    );
  end

endmodule
