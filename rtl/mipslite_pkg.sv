// mipslite_pkg: types and constants shared by the MIPS-lite single-cycle CPU.
//
// All instructions are 32 bits wide and come in three formats (R, I, J);
// the field positions below (op 31:26, rs 25:21, rt 20:16, rd 15:11,
// shamt 10:6, funct 5:0, imm16 15:0, target 25:0) are the MIPS formats.
// The numeric opcode and funct values are the standard MIPS-I encodings;
// the ALU control encoding follows the common textbook 3-bit convention.
// Both are choices of this design; the field layout is the ISA's own.
package mipslite_pkg;

  localparam int unsigned NREGS    = 32;  // architectural registers
  localparam int unsigned REG_BITS = 5;   // register specifier width

  // Primary opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // funct field values for R-type (bits 5:0)
  localparam logic [5:0] FUNCT_ADDU = 6'h21;
  localparam logic [5:0] FUNCT_SUBU = 6'h23;

  // ALU operation select (ALUctr)
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctr_e;

  // Immediate extension select (ExtOp)
  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } ext_op_e;

  // Instruction formats
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } instr_r_t;

  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [15:0] imm16;
  } instr_i_t;

  typedef struct packed {
    logic [5:0]  op;
    logic [25:0] target;
  } instr_j_t;

  // Control points of the single-cycle datapath
  typedef struct packed {
    logic     reg_dst;     // 1: write rd, 0: write rt
    logic     alu_src;     // 1: ALU B input is the extended immediate
    logic     mem_to_reg;  // 1: write back data memory output
    logic     reg_wr;      // register file write enable
    logic     mem_wr;      // data memory write enable
    logic     branch;      // instruction is beq
    ext_op_e  ext_op;      // immediate extension
    alu_ctr_e alu_ctr;     // ALU operation
  } ctrl_t;

endpackage
