// adder: W-bit binary adder with carry in and carry out.
//
// Sum = A + B + CarryIn, CarryOut is the carry out of the top bit. Purely
// combinational. Port names and the 32-bit default width follow the
// building-block symbol of the datapath; the carry chain itself is left to
// synthesis (a single behavioural add), which is this design's choice.
module adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         carry_in,
  output logic [W-1:0] sum,
  output logic         carry_out
);

  always_comb begin
    {carry_out, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, carry_in};
  end

endmodule
