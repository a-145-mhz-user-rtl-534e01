// cfg_shift_reg: one segment of the configuration memory.
//
// The configuration of the matrix lives in static cells chained into one long
// shift register. While shift_en is high every rising clock edge moves the
// segment by one place: the serial input enters bit 0 and bit W-1 leaves on
// sout, feeding the next segment. While shift_en is low the bits hold and are
// read in parallel on q. There is no reset: the contents are whatever was
// last loaded, as for the static cells of the original chain.
//
// The original clocks the chain with a gated two-phase clock (CK1/CK2); here
// the single-edge clock plus an enable does the same job.
module cfg_shift_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         shift_en,
  input  logic         sin,
  output logic         sout,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (shift_en) begin
      q <= W'({q, sin}); // drop the old top bit, shift sin in at bit 0
    end
  end

  assign sout = q[W-1];

endmodule
