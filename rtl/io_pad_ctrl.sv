// io_pad_ctrl: configuration structure of one programmable I/O pad.
//
// The pad circuit proper (bidirectional buffer and input filter) is a
// library cell kept outside this module; this block is the separate control
// circuit that decides what the buffer does, from a 2-bit segment of the
// configuration chain:
//   PAD_OFF    output buffer off, the pin does not reach the array
//   PAD_IN     the pin drives its pad line in its own row
//   PAD_OUT    the pad line drives the pin (output enable high)
//   PAD_IN_ALT the pin drives the pad line at the same place in the partner
//              row, an alternative path that lets a row borrow pins another
//              row does not need without using the central bus.
// The output enable is held low until the array runs, so no pin is driven
// while the chain is loading. All paths are combinational.
// The split of buffer and configuration, and the existence of alternative
// paths, follow the original FLECHA design; the mode encoding and the choice of the partner
// row as the alternative path are this design's own.
module io_pad_ctrl
  import flecha_pkg::*;
(
  input  logic clk,
  input  logic run,
  input  logic cfg_shift,
  input  logic cfg_sin,
  output logic cfg_sout,
  // to / from the pad buffer
  input  logic pad_in,
  output logic pad_out,
  output logic pad_oe,
  // to / from the array
  input  logic line,        // own row's pad line at this position
  output logic to_line,     // contribution to the own row's pad line
  output logic to_partner   // contribution to the partner row's pad line
);

  logic [PAD_CFG_W-1:0] cfg_bits;
  pad_mode_e            mode;

  cfg_shift_reg #(.W(PAD_CFG_W)) u_cfg (
    .clk      (clk),
    .shift_en (cfg_shift),
    .sin      (cfg_sin),
    .sout     (cfg_sout),
    .q        (cfg_bits)
  );
  assign mode = pad_mode_e'(cfg_bits);

  assign pad_out    = line;
  assign pad_oe     = run && (mode == PAD_OUT);
  assign to_line    = run && (mode == PAD_IN) && pad_in;
  assign to_partner = run && (mode == PAD_IN_ALT) && pad_in;

endmodule
