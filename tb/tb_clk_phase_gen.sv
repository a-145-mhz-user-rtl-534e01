// tb_clk_phase_gen: checks the switched two-phase clock generator.
// While enabled, ck must follow CLK and ckb its complement; when the enable
// drops (sampled on a falling edge) both must park at ck=0, ckb=1 for whole
// periods, and a new enable must restart pulses on the next high phase.
module tb_clk_phase_gen;
  logic clk = 0, rst_n = 0, en = 0, ck, ckb;
  int checks = 0, failures = 0, pulses = 0;

  clk_phase_gen dut (.clk, .rst_n, .en, .ck, .ckb);

  always #5 clk = ~clk;
  always @(posedge ck) pulses++;

  task automatic expect_phase(input logic exp_ck);
    checks++;
    if (ck !== exp_ck || ckb !== ~exp_ck) begin
      failures++;
      $display("FAIL t=%0t clk=%b ck=%b ckb=%b exp_ck=%b", $time, clk, ck, ckb, exp_ck);
    end
  endtask

  initial begin
    #2 expect_phase(1'b0);          // in reset: parked
    rst_n = 1;
    @(negedge clk); #1 expect_phase(1'b0);
    @(posedge clk); #1 expect_phase(1'b0);   // en still low
    // enable while clk high: takes effect from the next high phase
    en = 1;
    #1 expect_phase(1'b0);
    @(negedge clk); #1 expect_phase(1'b0);
    pulses = 0;
    repeat (8) begin
      @(posedge clk); #1 expect_phase(1'b1);
      @(negedge clk); #1 expect_phase(1'b0);
    end
    checks++;
    if (pulses != 8) begin failures++; $display("FAIL pulses=%0d", pulses); end
    // disable while clk is high: sampled at the next falling edge, after
    // which no high phase may pass
    @(posedge clk); #1 en = 0;
    @(negedge clk); #1 expect_phase(1'b0);
    pulses = 0;
    repeat (5) begin
      @(posedge clk); #1 expect_phase(1'b0);
      @(negedge clk); #1 expect_phase(1'b0);
    end
    checks++;
    if (pulses != 0) begin failures++; $display("FAIL pulses while stopped=%0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
