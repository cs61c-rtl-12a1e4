// control: decoder that sets the control points of the single-cycle
// datapath from the opcode and funct fields.
//
//   instr  reg_dst alu_src mem_to_reg reg_wr mem_wr branch ext_op alu_ctr
//   addu     1       0        0         1      0      0      -     ADD
//   subu     1       0        0         1      0      0      -     SUB
//   ori      0       1        0         1      0      0     ZERO   OR
//   lw       0       1        1         1      0      0     SIGN   ADD
//   sw       -       1        -         0      1      0     SIGN   ADD
//   beq      -       0        -         0      0      1      -     SUB
//
// Any other opcode or funct sets illegal and performs no
// register or memory write and no branch, so it acts as a no-op.
// Combinational. Which control point each instruction needs follows from
// its register transfer; the decoder's form, the encodings and the no-op
// treatment of unknown instructions are this design's choices.
module control
  import mipslite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl,
  output logic       illegal
);

  always_comb begin
    ctrl    = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_wr: 1'b0,
                mem_wr: 1'b0, branch: 1'b0, ext_op: EXT_ZERO, alu_ctr: ALU_ADD};
    illegal = 1'b0;
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        unique case (funct)
          FUNCT_ADDU: begin ctrl.reg_wr = 1'b1; ctrl.alu_ctr = ALU_ADD; end
          FUNCT_SUBU: begin ctrl.reg_wr = 1'b1; ctrl.alu_ctr = ALU_SUB; end
          default:    illegal = 1'b1;
        endcase
      end
      OP_ORI: begin
        ctrl.alu_src = 1'b1;
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = EXT_ZERO;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = EXT_SIGN;
        ctrl.alu_ctr    = ALU_ADD;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
        ctrl.ext_op  = EXT_SIGN;
        ctrl.alu_ctr = ALU_ADD;
      end
      OP_BEQ: begin
        ctrl.branch  = 1'b1;
        ctrl.ext_op  = EXT_SIGN;
        ctrl.alu_ctr = ALU_SUB;
      end
      default: illegal = 1'b1;
    endcase
  end

  // Each instruction of the subset has exactly one kind of effect: a register
  // write, a memory write or a branch; an unknown instruction has none.
  always_comb begin
    assert ($countones({ctrl.reg_wr, ctrl.mem_wr, ctrl.branch}) == (illegal ? 0 : 1))
      else $error("control: inconsistent control word for op=%h funct=%h", op, funct);
  end

endmodule
