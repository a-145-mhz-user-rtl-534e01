// tb_flecha_dec138: runs a 3-to-8 decoder with three enables ('138 style,
// active-low outputs) on the full-size array, loaded from the serial PROM
// model. Each row owns one input of the decoder and puts it on its central
// bus line, so every row sees all four of A, B, C and EN = G1 & !G2A & !G2B
// (three over the bus, its own locally):
//   row 0: pin A (3) -> line 0;  row 1: pin B (13) -> line 1;
//   row 2: pin C (20) -> line 2; row 3: G1, G2A, G2B (35..37) -> EN -> line 3.
// Row k then decodes {C,B} == k into a local enable and drives the two
// outputs with that {C,B}: Y0,Y1 on pins 0,1; Y2,Y3 on 10,12; Y4,Y5 on
// 22,24; Y6,Y7 on 33,32. Sixteen cells are used. All 64 input combinations
// are applied (with the unused pins random) and Y[i] = !(EN & {C,B,A} == i)
// is checked.
module tb_flecha_dec138;
  import flecha_pkg::*;
  import tb_flecha_bits_pkg::*;

  localparam int unsigned ROWS  = 4;
  localparam int unsigned PINS  = ROWS * CELLS;
  localparam int unsigned CHAIN = ROWS * ROW_W;
  localparam int unsigned NLOAD = 1024;
  localparam int unsigned Y_PIN [8] = '{0, 1, 10, 12, 22, 24, 33, 32};
  localparam int unsigned A_PIN = 3, B_PIN = 13, C_PIN = 20;
  localparam int unsigned G1_PIN = 35, G2A_PIN = 36, G2B_PIN = 37;

  logic clk = 0, reset_n = 0, din, menable;
  logic [PINS-1:0] pad_in = '0, pad_out, pad_oe;
  logic ck1, ck2, ckff1, ckff2, running;
  logic [CHAIN-1:0] img;
  int checks = 0, failures = 0, selected = 0;

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
    logic [PINS-1:0] oe_exp = '0;
    img = '0;
    // row 0: bus slots in0=B in1=C in2=EN; local A
    set_cell(0, 3, mk_cell(LUT_IN0, 1'b0, 2'd0, 2'd3, 2'd3, OUT_PREV)); // A buffer, copy on line 2
    img[cbus_pos(0) +: 4] = 4'd4;
    set_cell(0, 1, mk_cell(8'h10, 1'b0, 2'd3, 2'd3, 2'd3, OUT_NONE));   // EN & !C & !B
    set_cell(0, 0, mk_cell(8'hF5, 1'b0, 2'd2, 2'd3, 2'd0, OUT_SAME));   // Y0
    set_cell(0, 2, mk_cell(8'h77, 1'b0, 2'd1, 2'd0, 2'd3, OUT_PREV));   // Y1
    // row 1: bus slots in0=C in1=EN in2=A; local B
    set_cell(1, 3, mk_cell(LUT_IN0, 1'b0, 2'd0, 2'd3, 2'd3, OUT_NONE));
    img[cbus_pos(1) +: 4] = 4'd4;
    set_cell(1, 1, mk_cell(8'h40, 1'b0, 2'd3, 2'd3, 2'd0, OUT_NONE));   // EN & !C & B
    set_cell(1, 0, mk_cell(8'hF5, 1'b0, 2'd2, 2'd3, 2'd3, OUT_SAME));   // Y2
    set_cell(1, 2, mk_cell(8'h5F, 1'b0, 2'd1, 2'd3, 2'd3, OUT_SAME));   // Y3
    // row 2: bus slots in0=EN in1=A in2=B; local C
    set_cell(2, 0, mk_cell(LUT_IN0, 1'b0, 2'd0, 2'd3, 2'd3, OUT_NONE));
    img[cbus_pos(2) +: 4] = 4'd1;
    set_cell(2, 1, mk_cell(8'h08, 1'b0, 2'd3, 2'd1, 2'd3, OUT_SAME));   // EN & C & !B on line 1
    set_cell(2, 2, mk_cell(8'hDD, 1'b0, 2'd1, 2'd3, 2'd3, OUT_SAME));   // Y4
    set_cell(2, 4, mk_cell(8'h3F, 1'b0, 2'd3, 2'd3, 2'd0, OUT_SAME));   // Y5
    // row 3: bus slots in0=A in1=B in2=C; local enables
    set_cell(3, 5, mk_cell(8'h02, 1'b0, 2'd0, 2'd0, 2'd0, OUT_NONE));   // G1 & !G2A & !G2B
    img[cbus_pos(3) +: 4] = 4'd6;
    set_cell(3, 4, mk_cell(8'h80, 1'b0, 2'd2, 2'd3, 2'd3, OUT_SAME));   // EN & C & B on line 4
    set_cell(3, 3, mk_cell(8'hAF, 1'b0, 2'd3, 2'd3, 2'd1, OUT_SAME));   // Y6
    set_cell(3, 2, mk_cell(8'h5F, 1'b0, 2'd3, 2'd3, 2'd0, OUT_SAME));   // Y7
    foreach (Y_PIN[i]) begin
      set_pad(Y_PIN[i], PAD_OUT);
      oe_exp[Y_PIN[i]] = 1'b1;
    end
    set_pad(A_PIN, PAD_IN); set_pad(B_PIN, PAD_IN); set_pad(C_PIN, PAD_IN);
    set_pad(G1_PIN, PAD_IN); set_pad(G2A_PIN, PAD_IN); set_pad(G2B_PIN, PAD_IN);

    for (int i = 0; i < NLOAD; i++)
      u_prom.mem[i] = (i < NLOAD - CHAIN) ? 1'b0 : img[NLOAD - 1 - i];
    repeat (2) @(negedge clk);
    reset_n = 1;
    while (!running && cyc < 5000) begin @(posedge clk); cyc++; #1; end
    check(cyc == NLOAD + 1, $sformatf("load took %0d clocks", cyc));
    check(pad_oe == oe_exp, "only Y0..Y7 are outputs");

    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 64; v++) begin
        logic [2:0] s;
        logic g1, g2a, g2b, en;
        logic [7:0] y, y_exp;
        {g2b, g2a, g1, s} = 6'(v);
        pad_in = PINS'($urandom) ^ (PINS'($urandom) << 32);
        pad_in[A_PIN] = s[0]; pad_in[B_PIN] = s[1]; pad_in[C_PIN] = s[2];
        pad_in[G1_PIN] = g1; pad_in[G2A_PIN] = g2a; pad_in[G2B_PIN] = g2b;
        #1;
        en = g1 & !g2a & !g2b;
        y_exp = en ? ~(8'(1) << s) : 8'hFF;
        foreach (Y_PIN[i]) y[i] = pad_out[Y_PIN[i]];
        if (en) selected++;
        check(y == y_exp, $sformatf("s=%0d g=%b%b%b Y=%b expected %b", s, g1, g2a, g2b, y, y_exp));
        @(posedge clk); #1;
      end
    end
    check(selected > 0, "an enabled selection occurred");
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
