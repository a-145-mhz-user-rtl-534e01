// tb_flecha_row: end-to-end test of one row (ten cells, ten pads).
// Streams a 194-bit configuration through the row's chain and then checks a
// small circuit that uses each kind of routing the row offers:
//   x,y,z on pads 5,6,7 -> cell 5: XOR3 over its group's pad lines
//   cell 4: toggle flip-flop (registered, own output fed back) toggled by
//           cell 5 through the right-neighbour link, driven to pad 4
//   cell 3: AND of cell 4 (right neighbour) and central bus input 1, pad 3
//   cell 9: inverts the partner row's pin arriving on pad line 9, drives
//           pad line 8 through its "previous" output multiplexer, pad 8
//   pad 2 in alternative mode passes its pin to the partner row
//   the central bus selector puts cell 5 on the row's bus line.
// Outputs are compared with a reference model cycle by cycle.
module tb_flecha_row;
  import flecha_pkg::*;
  import tb_flecha_bits_pkg::*;

  logic clk = 0, run = 0, cfg_shift = 0, cfg_sin = 0, cfg_sout;
  logic [CELLS-1:0] pad_in = '0, pad_out, pad_oe, alt_in = '0, alt_out;
  logic [CBUS_READ-1:0] cbus_in = '0;
  logic cbus_out;
  logic [ROW_W-1:0] img = '0;
  int checks = 0, failures = 0;

  flecha_row #(.CELLS(CELLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    logic t_q;
    logic x, y, z;
    img[cell_pos(0,5) +: CELL_CFG_W] = mk_cell(LUT_XOR3, 1'b0, 2'd0, 2'd0, 2'd0, OUT_NONE);
    img[cell_pos(0,4) +: CELL_CFG_W] = mk_cell(LUT_XOR01, 1'b1, 2'd2, 2'd2, 2'd3, OUT_SAME);
    img[cell_pos(0,3) +: CELL_CFG_W] = mk_cell(LUT_AND01, 1'b0, 2'd2, 2'd3, 2'd3, OUT_SAME);
    img[cell_pos(0,9) +: CELL_CFG_W] = mk_cell(LUT_NOT0, 1'b0, 2'd0, 2'd3, 2'd3, OUT_PREV);
    img[pad_pos(0,5) +: 2] = PAD_IN;
    img[pad_pos(0,6) +: 2] = PAD_IN;
    img[pad_pos(0,7) +: 2] = PAD_IN;
    img[pad_pos(0,3) +: 2] = PAD_OUT;
    img[pad_pos(0,4) +: 2] = PAD_OUT;
    img[pad_pos(0,8) +: 2] = PAD_OUT;
    img[pad_pos(0,2) +: 2] = PAD_IN_ALT;
    img[cbus_pos(0) +: 4] = 4'd6;   // cell 5

    cfg_shift = 1;
    for (int i = ROW_W - 1; i >= 0; i--) begin
      cfg_sin = img[i];
      @(posedge clk); #1;
      check(pad_oe == '0, "no pad driven while loading");
    end
    cfg_shift = 0;
    check(cfg_sout == img[ROW_W-1], "chain output carries the row's last bit");
    run = 1;
    t_q = 0;
    for (int k = 0; k < 300; k++) begin
      pad_in  = CELLS'($urandom);
      alt_in  = CELLS'($urandom & 32'h200);  // partner drives only line 9
      cbus_in = CBUS_READ'($urandom);
      #1;
      x = pad_in[5]; y = pad_in[6]; z = pad_in[7];
      check(pad_oe == 10'b01_0001_1000, "pad output enables");
      check(cbus_out == (x ^ y ^ z), "central bus line carries XOR3");
      check(pad_out[4] == t_q, "toggle flip-flop on pad 4");
      check(pad_out[3] == (t_q & cbus_in[1]), "AND with central bus on pad 3");
      check(pad_out[8] == ~alt_in[9], "partner pin inverted on pad 8");
      check(alt_out == (CELLS'(pad_in[2]) << 2), "alternative path out of pad 2");
      @(posedge clk);
      t_q = t_q ^ (x ^ y ^ z);
      #1;
    end
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
