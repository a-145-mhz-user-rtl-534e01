// tb_flecha_top: whole-matrix test at the default size (4 rows x 10 cells,
// 776-bit chain, 10-bit load counter), fed by a serial PROM model.
//
// Load 1 configures, across all four rows:
//   a '164-style 8-bit serial-in/parallel-out shift register: row 0 cells
//   0..7 are registered AND gates, Q[k] <= Q[k-1] & CLR_n, Q[0] <= A & B &
//   CLR_n, driving pins 0..7;
//   CLR_n enters on pin 9 (row 0) in alternative mode, is picked up by row 1
//   cell 9 and put on row 1's central bus line, read by row 0;
//   A (pin 20) and B (pin 21) are ANDed by row 2 cell 0, sent over row 2's
//   central bus line;
//   row 3 computes x^y^z of pins 30..32 combinationally onto pin 34.
// Load 2 (a reconfiguration through reset_n) changes row 3 to x&y&z.
// Each load is checked to take 1024 chain clocks with RST released one
// clock later, and the flip-flops to start from 0. Counted mechanisms:
// loads, reconfiguration, shifts of a 1 through the register, synchronous
// clears, central bus transfers, alternative-path transfers, combinational
// row 3 results; each must occur at least once.
module tb_flecha_top;
  import flecha_pkg::*;
  import tb_flecha_bits_pkg::*;

  localparam int unsigned ROWS   = 4;
  localparam int unsigned PINS   = ROWS * CELLS;
  localparam int unsigned CHAIN  = ROWS * ROW_W;   // 776
  localparam int unsigned NLOAD  = 1024;

  logic clk = 0, reset_n = 0, din, menable;
  logic [PINS-1:0] pad_in = '0, pad_out, pad_oe;
  logic ck1, ck2, ckff1, ckff2, running;
  logic [CHAIN-1:0] img;
  int checks = 0, failures = 0;
  int n_load = 0, n_reconfig = 0, n_shift1 = 0, n_clear = 0;
  int n_cbus = 0, n_alt = 0, n_comb = 0, n_ck1 = 0;

  flecha_top dut (.*);
  serial_prom_model #(.DEPTH(NLOAD)) u_prom (.clk(clk), .ce(menable), .data(din));

  always #5 clk = ~clk;
  always @(posedge ck1) n_ck1++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic void build(input bit and3);
    img = '0;
    // row 0: shift register
    for (int k = 0; k < 8; k++) begin
      if (k == 0) img[cell_pos(0,0) +: CELL_CFG_W] = mk_cell(LUT_AND01, 1'b1, 2'd3, 2'd3, 2'd0, OUT_SAME);
      else        img[cell_pos(0,k) +: CELL_CFG_W] = mk_cell(LUT_AND01, 1'b1, 2'd3, 2'd1, 2'd0, OUT_SAME);
      img[pad_pos(0,k) +: 2] = PAD_OUT;
    end
    img[pad_pos(0,9) +: 2] = PAD_IN_ALT;                      // CLR_n pin
    // row 1: CLR_n from partner line 9 onto central bus line 1
    img[cell_pos(1,9) +: CELL_CFG_W] = mk_cell(LUT_IN0, 1'b0, 2'd0, 2'd0, 2'd0, OUT_NONE);
    img[cbus_pos(1) +: 4] = 4'd10;
    // row 2: A & B onto central bus line 2
    img[pad_pos(2,0) +: 2] = PAD_IN;
    img[pad_pos(2,1) +: 2] = PAD_IN;
    img[cell_pos(2,0) +: CELL_CFG_W] = mk_cell(LUT_AND01, 1'b0, 2'd0, 2'd0, 2'd0, OUT_NONE);
    img[cbus_pos(2) +: 4] = 4'd1;
    // row 3: three-input function on pin 34
    for (int k = 0; k < 3; k++) img[pad_pos(3,k) +: 2] = PAD_IN;
    img[pad_pos(3,4) +: 2] = PAD_OUT;
    img[cell_pos(3,0) +: CELL_CFG_W] =
      mk_cell(and3 ? 8'h80 : LUT_XOR3, 1'b0, 2'd0, 2'd0, 2'd0, OUT_PREV);
  endfunction

  // put the stream in the PROM, reset, and wait for the array to run
  task automatic load(input bit and3);
    int cyc = 0;
    build(and3);
    for (int i = 0; i < NLOAD; i++)
      u_prom.mem[i] = (i < NLOAD - CHAIN) ? 1'b0 : img[NLOAD - 1 - i];
    @(negedge clk) reset_n = 0;
    repeat (3) @(negedge clk);
    #1 check(!running && pad_oe == '0, "array stopped and pins released in reset");
    n_ck1 = 0;
    reset_n = 1;
    while (!running && cyc < 5000) begin
      @(posedge clk); cyc++; #1;
      if (!running) check(pad_oe == '0, "no pin driven while loading");
    end
    check(cyc == NLOAD + 1, $sformatf("load took %0d clocks, expected %0d", cyc, NLOAD + 1));
    check(n_ck1 == NLOAD, $sformatf("%0d chain clock pulses", n_ck1));
    check(!menable && ck1 == 1'b0, "memory disabled, chain clock stopped");
    check(pad_oe == ((PINS'(1) << 34) | PINS'(8'hFF)), "pin directions");
    check(pad_out[7:0] == 8'h00, "cell flip-flops start from 0");
    n_load++;
  endtask

  initial begin
    logic [7:0] q;
    logic a, b, clr, x, y, z;
    load(1'b0);
    q = '0;
    for (int k = 0; k < 400; k++) begin
      a   = 1'($urandom); b = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 15) != 0);
      x = 1'($urandom); y = 1'($urandom); z = 1'($urandom);
      pad_in = '0;
      pad_in[9] = clr; pad_in[20] = a; pad_in[21] = b;
      pad_in[30] = x;  pad_in[31] = y; pad_in[32] = z;
      #1;
      check(pad_out[34] == (x ^ y ^ z), "row 3 XOR3");
      n_comb++;
      @(posedge clk);
      if (!clr && q != 0) n_clear++;
      if (clr && (a & b)) n_cbus++;
      if (!clr) n_alt++;
      if (clr && q[6:0] != 0) n_shift1++;
      q = clr ? {q[6:0], a & b} : 8'h00;
      #1 check(pad_out[7:0] == q, $sformatf("shift register %h expected %h", pad_out[7:0], q));
    end
    // reconfiguration: row 3 becomes AND3, register restarts cleared
    load(1'b1);
    n_reconfig++;
    for (int k = 0; k < 16; k++) begin
      {x, y, z} = 3'(k);
      pad_in = '0;
      pad_in[30] = x; pad_in[31] = y; pad_in[32] = z;
      #1 check(pad_out[34] == (x & y & z), "row 3 AND3 after reconfiguration");
      @(posedge clk); #1;
    end
    check(n_load == 2,     "two loads");
    check(n_reconfig == 1, "reconfiguration");
    check(n_shift1 > 0,    "data shifted");
    check(n_clear > 0,     "synchronous clear");
    check(n_cbus > 0,      "central bus transfer");
    check(n_alt > 0,       "alternative path");
    check(n_comb > 0,      "combinational row");
    $display("mechanisms: loads=%0d reconfig=%0d shifts=%0d clears=%0d cbus=%0d alt=%0d comb=%0d",
             n_load, n_reconfig, n_shift1, n_clear, n_cbus, n_alt, n_comb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
