// tb_io_pad_ctrl: checks the four pad modes of the pad control circuit.
// For each mode, loaded through the 2-bit chain segment, every combination
// of pin value, pad-line value and run is applied and the output enable,
// pin output and the contributions to the own and partner rows' pad lines
// are compared with the expected values.
module tb_io_pad_ctrl;
  import flecha_pkg::*;
  logic clk = 0, run = 0, cfg_shift = 0, cfg_sin = 0, cfg_sout;
  logic pad_in = 0, pad_out, pad_oe, line = 0, to_line, to_partner;
  int checks = 0, failures = 0;

  io_pad_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) begin
      logic [1:0] mb;
      mb = 2'(m);
      cfg_shift = 1;
      for (int i = 1; i >= 0; i--) begin
        cfg_sin = mb[i];
        @(posedge clk); #1;
      end
      cfg_shift = 0;
      check(cfg_sout == mb[1], "chain output");
      for (int v = 0; v < 8; v++) begin
        {run, pad_in, line} = 3'(v);
        #1;
        check(pad_oe     == (run && m == PAD_OUT),              $sformatf("oe mode %0d v %0d", m, v));
        check(pad_out    == line,                               $sformatf("out mode %0d v %0d", m, v));
        check(to_line    == (run && m == PAD_IN && pad_in),     $sformatf("to_line mode %0d v %0d", m, v));
        check(to_partner == (run && m == PAD_IN_ALT && pad_in), $sformatf("to_partner mode %0d v %0d", m, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
