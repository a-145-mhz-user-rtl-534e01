// flecha_ctrl: control circuit of the FLECHA matrix.
//
// Supervises the loading of the configuration chain and then starts the
// array. The external RESET pin (reset_n, active low) clears a counter of
// CNT_W bits plus a done bit. While reset_n is high and done is clear the
// controller enables the external serial PROM (menable) and lets the chain
// shift (cfg_shift), counting one configuration bit per clock. After 2**CNT_W
// clocks (1024 by default) the counter rolls into the done bit: menable and
// the chain clock stop. One clock later the internal reset RST is released
// (run goes high), the cell flip-flops leave reset and their clock starts.
// This state holds until reset_n falls again, which forces run low at once
// and starts a new load when it rises.
//
// No decoder compares the count with the chain length: the counter always
// runs to its full range and the PROM stream is padded with leading zeros
// that fall off the far end of the chain (1024 - 776 = 248 of them).
// ck1/ck2 and ckff1/ckff2 are the two-phase clocks of the chain and of the
// flip-flops, parked at (low, high) while stopped. Inside the matrix the
// same timing is obtained with cfg_shift and run as clock enables.
//
// The counter, the full-range count, the stop of CK1/CK2, the delayed RST
// and the clock phases follow the original FLECHA design; the one-clock delay before RST
// and the asynchronous reset are this design's own. The two latches found
// under this module are the clock switches of clk_phase_gen, on purpose.
module flecha_ctrl #(
  parameter int unsigned CNT_W = 10
) (
  input  logic clk,
  input  logic reset_n,
  output logic menable,
  output logic cfg_shift,
  output logic run,
  output logic ck1,
  output logic ck2,
  output logic ckff1,
  output logic ckff2
);

  logic [CNT_W:0] cnt;   // cnt[CNT_W] is the done bit
  logic           done;
  logic           run_q;

  assign done = cnt[CNT_W];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      cnt   <= '0;
      run_q <= 1'b0;
    end else begin
      if (!done) cnt <= cnt + 1'b1;
      run_q <= done;
    end
  end

  // the PROM is never enabled while the array runs, and the chain never
  // shifts under a running array
  always_ff @(posedge clk) begin
    assert (!(run_q && done && (menable || cfg_shift)) && !(run && !done))
      else $error("configuration active while the array runs");
  end

  assign cfg_shift = reset_n & ~done;
  assign menable   = cfg_shift;
  assign run       = reset_n & run_q;

  clk_phase_gen u_ck_chain (
    .clk   (clk),
    .rst_n (reset_n),
    .en    (cfg_shift),
    .ck    (ck1),
    .ckb   (ck2)
  );

  clk_phase_gen u_ck_ff (
    .clk   (clk),
    .rst_n (reset_n),
    .en    (run),
    .ck    (ckff1),
    .ckb   (ckff2)
  );

endmodule
