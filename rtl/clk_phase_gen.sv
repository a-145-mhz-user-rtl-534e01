// clk_phase_gen: switched two-phase clock generator.
//
// Produces a clock phase ck = CLK and its complement ckb = NOT(CLK) while
// enabled, and parks them in a stable state (ck low, ckb high) while not,
// as the original FLECHA clock generation blocks do for the configuration chain
// (CK1/CK2) and for the cell flip-flops (CKFF1/CKFF2). The switch is a
// latch that is transparent while CLK is low and holds while CLK is high, so
// it never chops a high phase: a pulse appears in every CLK high phase whose
// enable was high at the rising edge. rst_n clears the switch. The latch is
// intentional (it is the usual glitch-free clock gate) and is the only
// latch of the design.
// The original design gives the function and the stop state; the latch-based
// switch is this design's own.
module clk_phase_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic ck,
  output logic ckb
);

  logic en_q;

  always_latch begin
    if (!rst_n)   en_q = 1'b0;
    else if (!clk) en_q = en;
  end

  assign ck  = clk & en_q;
  assign ckb = ~ck;

endmodule
