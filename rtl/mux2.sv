// mux2: W-bit two-input multiplexer.
//
// Y = A when Select is 0, Y = B when Select is 1. Combinational. The
// 32-bit default width follows the building-block symbol; which input
// value of Select picks A is this design's choice.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  always_comb begin
    y = sel ? b : a;
  end

endmodule
