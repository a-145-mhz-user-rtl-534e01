// tb_flecha_ctrl: checks the configuration controller's sequence and timing.
// After reset_n rises, menable and cfg_shift must stay high for exactly
// 2**CNT_W clocks (1024 at the default width), the chain clock ck1 must
// pulse once per configuration bit, run must rise one clock after the count
// ends and the flip-flop clock ckff1 start then. A second reset in normal
// operation must drop run at once and start a fresh load of the same length.
module tb_flecha_ctrl;
  localparam int unsigned CNT_W = 10;
  localparam int unsigned NBITS = 1 << CNT_W;
  logic clk = 0, reset_n = 0;
  logic menable, cfg_shift, run, ck1, ck2, ckff1, ckff2;
  int checks = 0, failures = 0;
  int ck1_pulses = 0, ckff_pulses = 0;

  flecha_ctrl #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge ck1)   ck1_pulses++;
  always @(posedge ckff1) ckff_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_load();
    int shifts = 0, waitc = 0;
    ck1_pulses = 0;
    @(negedge clk) reset_n = 1;
    #1 check(menable && cfg_shift && !run, "load starts right after reset");
    // count the clock edges at which the chain shifts
    while (cfg_shift && shifts < 5000) begin
      @(posedge clk); shifts++;
      #1;
    end
    check(shifts == NBITS, $sformatf("shift count %0d, expected %0d", shifts, NBITS));
    check(ck1_pulses == NBITS, $sformatf("ck1 pulses %0d", ck1_pulses));
    check(!menable, "memory disabled after load");
    check(!run, "RST still active right after the count ends");
    @(posedge clk); #1;
    check(run, "RST released one clock after the count");
    check(ck2 == 1'b1 && ck1 == 1'b0, "chain clock parked low/high");
    ckff_pulses = 0;
    repeat (20) @(posedge clk);
    #1 check(ckff_pulses == 20, $sformatf("ckff1 pulses %0d", ckff_pulses));
    check(run && !menable, "normal operation holds");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(!menable && !cfg_shift && !run, "idle while reset_n low");
    one_load();
    // reconfiguration command
    @(negedge clk) reset_n = 0;
    #1 check(!run && !menable, "reset stops the array at once");
    repeat (2) @(posedge clk);
    one_load();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
