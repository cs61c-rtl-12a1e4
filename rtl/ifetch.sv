// ifetch: instruction fetch unit.
//
// Holds the program counter, fetches the instruction word mem[PC] from the
// instruction memory and updates PC every cycle through the next address
// logic: PC + 4, or the beq target when branch and zero are both 1. The PC
// register and the instruction memory are clocked on the falling edge of
// clk, like all storage of this CPU.
//
// Interface: while rst is 1, PC is set to RESET_PC and the instruction
// memory is addressed by load_addr instead of PC, so a program can be
// written into it through load_we / load_data. The load port, the reset
// and the reset address are this design's additions: the fetch unit itself
// only reads its memory.
module ifetch
  import mipslite_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 10,
  parameter logic [31:0] RESET_PC  = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        branch,
  input  logic        zero,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  logic [31:0] next_pc;
  logic [31:0] imem_addr;
  instr_i_t    instr_i;

  register_we #(.N(32), .RESET_VALUE(RESET_PC)) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(next_pc), .q(pc)
  );

  always_comb instr_i = instr_i_t'(instr);

  next_addr_logic u_nal (
    .pc(pc), .imm16(instr_i.imm16), .branch(branch), .zero(zero), .next_pc(next_pc)
  );

  mux2 #(.W(32)) u_addr_sel (
    .sel(rst), .a(pc), .b(load_addr), .y(imem_addr)
  );

  ideal_mem #(.ADDR_BITS(ADDR_BITS), .W(32)) u_imem (
    .clk(clk), .we(rst & load_we), .addr(imem_addr), .din(load_data), .dout(instr)
  );

endmodule
