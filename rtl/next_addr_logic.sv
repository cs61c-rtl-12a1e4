// next_addr_logic: computes the program counter of the next instruction.
//
// Sequential code: next_pc = PC + 4. For beq with equal operands
// (branch = 1 and the ALU's zero = 1):
//   next_pc = PC + 4 + (sign_ext(imm16) || 00).
// Two dedicated adders do this work, so the main ALU stays free for the
// instruction's own operation. Combinational. The register transfers follow
// the instruction semantics; building it from two adders, an extender and a
// multiplexer is this design's choice.
module next_addr_logic
  import mipslite_pkg::*;
(
  input  logic [31:0] pc,
  input  logic [15:0] imm16,
  input  logic        branch,
  input  logic        zero,
  output logic [31:0] next_pc
);

  logic [31:0] pc_plus4;
  logic [31:0] imm32;
  logic [31:0] target;
  logic        take;
  logic        unused_c0, unused_c1;

  adder #(.W(32)) u_inc (
    .a(pc), .b(32'd4), .carry_in(1'b0), .sum(pc_plus4), .carry_out(unused_c0)
  );

  extender u_ext (
    .imm16(imm16), .ext_op(EXT_SIGN), .imm32(imm32)
  );

  adder #(.W(32)) u_br (
    .a(pc_plus4), .b({imm32[29:0], 2'b00}), .carry_in(1'b0),
    .sum(target), .carry_out(unused_c1)
  );

  always_comb take = branch & zero;

  mux2 #(.W(32)) u_sel (
    .sel(take), .a(pc_plus4), .b(target), .y(next_pc)
  );

endmodule
