// tb_logic_cell: self-checking test of the programmable logic cell.
// Loads random configurations through the cell's serial chain, then drives
// random candidate sources and checks, against a reference computed here:
// the input multiplexers and the 3-input truth table (combinational mode),
// the one-clock delay of the registered mode, the pad-bus output
// multiplexer, the serial pass-through of the chain, and that the output and
// flip-flop are held at 0 while run is low.
module tb_logic_cell;
  import flecha_pkg::*;
  logic clk = 0, run = 0, cfg_shift = 0, cfg_sin = 0, cfg_sout;
  logic [3:0] src0 = '0, src1 = '0, src2 = '0;
  logic out;
  logic [2:0] drive;
  int checks = 0, failures = 0;

  logic_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // shift a configuration in, last bit sent lands at index 0
  task automatic load(input cell_cfg_t c);
    logic [CELL_CFG_W-1:0] b = c;
    cfg_shift = 1;
    for (int i = CELL_CFG_W - 1; i >= 0; i--) begin
      cfg_sin = b[i];
      @(posedge clk); #1;
    end
    cfg_shift = 0;
  endtask

  function automatic logic ref_f(input cell_cfg_t c, input logic [3:0] s0, s1, s2);
    logic [2:0] a;
    a = {s2[c.in2_sel], s1[c.in1_sel], s0[c.in0_sel]};
    return c.lut[a];
  endfunction

  function automatic logic [2:0] ref_drive(input cell_cfg_t c, input logic o);
    case (c.out_sel)
      OUT_SAME: return {2'b00, o};
      OUT_NEXT: return {1'b0, o, 1'b0};
      OUT_PREV: return {o, 2'b00};
      default:  return 3'b000;
    endcase
  endfunction

  initial begin
    cell_cfg_t c, prev;
    logic exp_q;
    // chain pass-through: a loaded word appears on cfg_sout MSB first
    c = cell_cfg_t'(17'h1A5C3);
    load(c);
    check(cfg_sout == c[CELL_CFG_W-1], "cfg_sout is the top bit of the segment");
    prev = c;
    cfg_shift = 1; cfg_sin = 0;
    for (int i = CELL_CFG_W - 1; i >= 0; i--) begin
      check(cfg_sout == prev[i], $sformatf("serial out bit %0d", i));
      @(posedge clk); #1;
    end
    cfg_shift = 0;

    for (int t = 0; t < 60; t++) begin
      c = cell_cfg_t'($urandom);
      load(c);
      run = 0;
      src0 = 4'($urandom); src1 = 4'($urandom); src2 = 4'($urandom);
      @(posedge clk); #1;
      check(out == 1'b0 && drive == 3'b000, "output held at 0 while run is low");
      run = 1;
      exp_q = 1'b0;  // flip-flop cleared while run was low
      for (int k = 0; k < 16; k++) begin
        src0 = 4'($urandom); src1 = 4'($urandom); src2 = 4'($urandom);
        #1;
        if (c.reg_en) check(out == exp_q, $sformatf("registered out cfg=%h", c));
        else          check(out == ref_f(c, src0, src1, src2), $sformatf("comb out cfg=%h", c));
        check(drive == ref_drive(c, out), "output multiplexer");
        exp_q = ref_f(c, src0, src1, src2);
        @(posedge clk); #1;
      end
    end
    // exhaustive truth-table check of one function through input source 0
    c = '0; c.lut = 8'b1001_0110;  // XOR3
    load(c);
    run = 1;
    for (int a = 0; a < 8; a++) begin
      src0 = {3'b000, a[0]}; src1 = {3'b000, a[1]}; src2 = {3'b000, a[2]};
      #1 check(out == ^a[2:0], $sformatf("xor3 row %0d", a));
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
