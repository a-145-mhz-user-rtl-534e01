// serial_prom_model: behavioural model of the external serial configuration
// PROM (a 1-bit-wide serial memory of the XC17xx kind). While ce is low its
// address counter is held at 0; while ce is high every rising clock edge
// advances it. data always shows the bit at the current address. The
// contents are written by the testbench through the mem array.
module serial_prom_model #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic clk,
  input  logic ce,
  output logic data
);
  logic mem [DEPTH];
  int unsigned addr;

  always_ff @(posedge clk or negedge ce) begin
    if (!ce)                  addr <= 0;
    else if (addr < DEPTH - 1) addr <= addr + 1;
  end

  assign data = ce ? mem[addr] : 1'b0;
endmodule
