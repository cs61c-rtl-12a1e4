// alu: W-bit arithmetic logic unit of the MIPS-lite datapath.
//
// ALUctr selects the operation: ALU_ADD (addu, lw/sw address), ALU_SUB
// (subu, and beq's comparison), ALU_OR (ori), ALU_AND and ALU_SLT (set
// less than, signed: 1 if A < B else 0). Zero is 1 when Result is 0 for
// any operation, which gives beq its equality test from a subtraction.
// Add and subtract share one adder: subtraction is A + ~B + 1. Set less
// than takes the sign of A - B corrected by the signed overflow.
// Combinational. The operation list and the Zero test follow the MIPS-lite
// requirements (AND and SLT are the extra operations a full MIPS ALU has);
// the encoding of ALUctr is this design's choice (see mipslite_pkg).
module alu
  import mipslite_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_ctr_e     alu_ctr,
  output logic [W-1:0] result,
  output logic         zero
);

  logic         sub;
  logic [W-1:0] b_in;
  logic [W-1:0] sum;
  logic         carry_out;
  logic         overflow;

  always_comb begin
    sub  = (alu_ctr == ALU_SUB) || (alu_ctr == ALU_SLT);
    b_in = sub ? ~b : b;
  end

  adder #(.W(W)) u_adder (
    .a        (a),
    .b        (b_in),
    .carry_in (sub),
    .sum      (sum),
    .carry_out(carry_out)
  );

  always_comb begin
    overflow = (a[W-1] == b_in[W-1]) && (sum[W-1] != a[W-1]);
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      ALU_AND:          result = a & b;
      ALU_SLT:          result = {{(W-1){1'b0}}, sum[W-1] ^ overflow};
      default:          result = sum;
    endcase
    zero = (result == '0);
  end

  // carry_out is not needed by any MIPS-lite instruction (addu/subu ignore it)
  logic unused_carry;
  assign unused_carry = carry_out;

endmodule
