// tb_cbus_driver: checks the row's central bus selector. Every selection
// code 0..15 is loaded through the 4-bit chain segment and, for random cell
// outputs, the bus line must carry cell (code-1) for codes 1..10 and 0
// otherwise.
module tb_cbus_driver;
  import flecha_pkg::*;
  localparam int unsigned CELLS = 10;
  logic clk = 0, cfg_shift = 0, cfg_sin = 0, cfg_sout;
  logic [CELLS-1:0] cell_out = '0;
  logic line;
  int checks = 0, failures = 0;

  cbus_driver #(.CELLS(CELLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int s = 0; s < 16; s++) begin
      logic [3:0] sb;
      sb = 4'(s);
      cfg_shift = 1;
      for (int i = 3; i >= 0; i--) begin
        cfg_sin = sb[i];
        @(posedge clk); #1;
      end
      cfg_shift = 0;
      for (int k = 0; k < 20; k++) begin
        logic exp;
        cell_out = CELLS'($urandom);
        #1;
        exp = (s >= 1 && s <= CELLS) ? cell_out[s-1] : 1'b0;
        checks++;
        if (line !== exp) begin
          failures++;
          $display("FAIL sel=%0d cells=%b line=%b", s, cell_out, line);
        end
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
