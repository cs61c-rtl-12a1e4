// register_we: N-bit register with write enable.
//
// Like a D flip-flop but N bits wide and with a Write Enable: while
// Write Enable is 0 Data Out does not change; while it is 1 Data Out takes
// Data In at the active clock edge. The clock input carries an inversion
// bubble in the building-block symbol, so the register updates on the
// falling edge of clk, like every storage element of this CPU.
// The synchronous, active-high reset to RESET_VALUE is this design's
// addition (the program counter needs a start address).
module register_we #(
  parameter int unsigned  N           = 32,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(negedge clk) begin
    if (rst)
      q <= RESET_VALUE;
    else if (we)
      q <= d;
  end

endmodule
