// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ExtOp = EXT_SIGN replicates bit 15 (lw, sw, beq use sign_ext(Imm16));
// ExtOp = EXT_ZERO fills with zeros (ori uses zero_ext(Imm16)).
// Combinational. Both modes are required by the instruction semantics;
// the one-bit select is this design's choice.
module extender
  import mipslite_pkg::*;
(
  input  logic [15:0] imm16,
  input  ext_op_e     ext_op,
  output logic [31:0] imm32
);

  always_comb begin
    imm32 = {{16{(ext_op == EXT_SIGN) & imm16[15]}}, imm16};
  end

endmodule
