// tb_cfg_shift_reg: self-checking test of one configuration chain segment.
// Shifts random bits into a 13-bit segment, compares the parallel contents
// and the serial output with a reference queue after every clock, and checks
// that the contents hold while shift_en is low.
module tb_cfg_shift_reg;
  localparam int unsigned W = 13;
  logic clk = 0, shift_en = 0, sin = 0, sout;
  logic [W-1:0] q, model = '0;
  int checks = 0, failures = 0;

  cfg_shift_reg #(.W(W)) dut (.clk, .shift_en, .sin, .sout, .q);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp);
    checks++;
    if (q !== exp || sout !== exp[W-1]) begin
      failures++;
      $display("FAIL q=%h exp=%h sout=%b", q, exp, sout);
    end
  endtask

  initial begin
    // fill with a known pattern first (contents start random)
    shift_en = 1;
    for (int i = 0; i < W; i++) begin
      sin = 1'b0; @(posedge clk); #1;
    end
    check('0);
    for (int i = 0; i < 200; i++) begin
      shift_en = ($urandom_range(0, 3) != 0);
      sin      = 1'($urandom);
      @(posedge clk); #1;
      if (shift_en) model = {model[W-2:0], sin};
      check(model);
    end
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
