// tb_flecha_mux151: runs an 8-to-1 multiplexer with enable and
// complementary output ('151 style) on the full-size array, loaded from the
// serial PROM model. Hand placement (pin = 10*row + column):
//   row 2 cell 5 buffers select A (pin 25) onto central bus line 2,
//   row 3 cell 0 buffers select B (pin 30) onto central bus line 3;
//   row 0 cells 3/5 are A-controlled 2:1 multiplexers over D0,D1 (pins 3,0)
//   and D2,D3 (pins 5,7); cell 4, between them, chooses with B and drives
//   central bus line 0;
//   row 1 does the same for D4..D7 (pins 14,10,16,17) onto line 1;
//   row 2 cell 0 chooses between lines 0 and 1 with C (pin 20), cell 1
//   gates it with the active-low enable G (pin 22) onto Y (pin 21), and
//   cell 2 inverts Y onto W (pin 23).
// Eleven cells are used. Random input vectors are compared with the
// reference Y = !G & D[{C,B,A}], W = !Y.
module tb_flecha_mux151;
  import flecha_pkg::*;
  import tb_flecha_bits_pkg::*;

  localparam int unsigned ROWS  = 4;
  localparam int unsigned PINS  = ROWS * CELLS;
  localparam int unsigned CHAIN = ROWS * ROW_W;
  localparam int unsigned NLOAD = 1024;
  localparam int unsigned D_PIN [8] = '{3, 0, 5, 7, 14, 10, 16, 17};
  localparam int unsigned A_PIN = 25, B_PIN = 30, C_PIN = 20, G_PIN = 22;
  localparam int unsigned Y_PIN = 21, W_PIN = 23;

  logic clk = 0, reset_n = 0, din, menable;
  logic [PINS-1:0] pad_in = '0, pad_out, pad_oe;
  logic ck1, ck2, ckff1, ckff2, running;
  logic [CHAIN-1:0] img;
  int checks = 0, failures = 0, ones = 0, disabled = 0;

  flecha_top dut (.*);
  serial_prom_model #(.DEPTH(NLOAD)) u_prom (.clk(clk), .ce(menable), .data(din));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  task automatic set_cell(input int unsigned r, c, input cell_cfg_t w);
    img[cell_pos(r, c) +: CELL_CFG_W] = w;
  endtask

  task automatic set_pad(input int unsigned pin, input pad_mode_e m);
    img[pad_pos(pin / CELLS, pin % CELLS) +: PAD_CFG_W] = m;
  endtask

  initial begin
    int cyc = 0;
    img = '0;
    // select buffers onto the central bus
    set_cell(2, 5, mk_cell(LUT_IN0, 1'b0, 2'd0, 2'd3, 2'd3, OUT_NONE));
    img[cbus_pos(2) +: 4] = 4'd6;
    set_cell(3, 0, mk_cell(LUT_IN0, 1'b0, 2'd0, 2'd3, 2'd3, OUT_NONE));
    img[cbus_pos(3) +: 4] = 4'd1;
    // row 0: in1 slot reads line 2 (A), in2 slot reads line 3 (B)
    set_cell(0, 3, mk_cell(8'hE2, 1'b0, 2'd0, 2'd3, 2'd0, OUT_NONE));   // A ? D1 : D0
    set_cell(0, 5, mk_cell(8'hE2, 1'b0, 2'd0, 2'd3, 2'd0, OUT_NONE));   // A ? D3 : D2
    set_cell(0, 4, mk_cell(8'hAC, 1'b0, 2'd2, 2'd1, 2'd3, OUT_NONE));   // B ? right : left
    img[cbus_pos(0) +: 4] = 4'd5;
    // row 1: in0 slot reads line 2 (A), in1 slot reads line 3 (B)
    set_cell(1, 3, mk_cell(8'hE4, 1'b0, 2'd3, 2'd0, 2'd0, OUT_NONE));   // A ? D5 : D4
    set_cell(1, 5, mk_cell(8'hE4, 1'b0, 2'd3, 2'd0, 2'd0, OUT_NONE));   // A ? D7 : D6
    set_cell(1, 4, mk_cell(8'hE2, 1'b0, 2'd1, 2'd3, 2'd1, OUT_NONE));   // B ? right : left
    img[cbus_pos(1) +: 4] = 4'd5;
    // row 2: final selection, enable, complementary output
    set_cell(2, 0, mk_cell(8'hE4, 1'b0, 2'd0, 2'd3, 2'd3, OUT_NONE));   // C ? line1 : line0
    set_cell(2, 1, mk_cell(8'h22, 1'b0, 2'd1, 2'd0, 2'd3, OUT_SAME));   // mux & !G -> Y
    set_cell(2, 2, mk_cell(LUT_NOT0, 1'b0, 2'd1, 2'd3, 2'd3, OUT_NEXT)); // !Y -> W
    for (int i = 0; i < 8; i++) set_pad(D_PIN[i], PAD_IN);
    set_pad(A_PIN, PAD_IN); set_pad(B_PIN, PAD_IN); set_pad(C_PIN, PAD_IN); set_pad(G_PIN, PAD_IN);
    set_pad(Y_PIN, PAD_OUT); set_pad(W_PIN, PAD_OUT);

    for (int i = 0; i < NLOAD; i++)
      u_prom.mem[i] = (i < NLOAD - CHAIN) ? 1'b0 : img[NLOAD - 1 - i];
    repeat (2) @(negedge clk);
    reset_n = 1;
    while (!running && cyc < 5000) begin @(posedge clk); cyc++; #1; end
    check(cyc == NLOAD + 1, $sformatf("load took %0d clocks", cyc));
    check(pad_oe == ((PINS'(1) << Y_PIN) | (PINS'(1) << W_PIN)), "only Y and W are outputs");

    for (int k = 0; k < 1000; k++) begin
      logic [7:0] d;
      logic [2:0] s;
      logic g, y;
      d = 8'($urandom); s = 3'($urandom); g = ($urandom_range(0, 7) == 0);
      pad_in = PINS'($urandom) ^ (PINS'($urandom) << 32);   // unused pins toggle too
      for (int i = 0; i < 8; i++) pad_in[D_PIN[i]] = d[i];
      pad_in[A_PIN] = s[0]; pad_in[B_PIN] = s[1]; pad_in[C_PIN] = s[2]; pad_in[G_PIN] = g;
      #1;
      y = !g & d[s];
      if (y) ones++;
      if (g) disabled++;
      check(pad_out[Y_PIN] == y && pad_out[W_PIN] == !y,
            $sformatf("d=%h s=%0d g=%b Y=%b W=%b", d, s, g, pad_out[Y_PIN], pad_out[W_PIN]));
      @(posedge clk); #1;
    end
    check(ones > 0 && disabled > 0, "both output values and the disabled case occurred");
    $display("outputs high: %0d, disabled: %0d", ones, disabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
