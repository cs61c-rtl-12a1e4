// mipslite_cpu: single-cycle processor for the MIPS-lite subset
// (addu, subu, ori, lw, sw, beq).
//
// Every instruction completes in one clock cycle. In each cycle the fetch
// unit presents mem[PC]; the decoder sets the control points; the register
// file reads rs onto busA and rt onto busB; the ALU combines busA with busB
// or with the extended immediate; the data memory is read or written at the
// ALU result; and at the falling clock edge the result (or the loaded word)
// is written to rd or rt, the store is written to memory and PC moves to
// PC + 4 or to the branch target. All state (PC, registers, both memories)
// is written on the falling edge of clk; inputs and outputs are
// combinational between falling edges.
//
//   addu  R[rd] = R[rs] + R[rt]
//   subu  R[rd] = R[rs] - R[rt]
//   ori   R[rt] = R[rs] | zero_ext(imm16)
//   lw    R[rt] = MEM[R[rs] + sign_ext(imm16)]
//   sw    MEM[R[rs] + sign_ext(imm16)] = R[rt]
//   beq   if (R[rs] == R[rt]) PC = PC + 4 + (sign_ext(imm16) || 00)
//
// Interface: rst (synchronous to the falling edge, active high) holds PC at
// RESET_PC; while it is high, prog_we/prog_addr/prog_data write words into
// the instruction memory. The outputs expose the architectural effects of
// the current instruction (register write, memory write) so the processor
// can be observed from outside. Instructions and data live in two separate
// memories, as a single-cycle design needs one instruction fetch and one
// data access in the same cycle. Memory depths, the program load port, the
// reset and the observation outputs are this design's choices.
module mipslite_cpu
  import mipslite_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_BITS = 10,
  parameter int unsigned DMEM_ADDR_BITS = 10,
  parameter logic [31:0] RESET_PC       = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // program load (only while rst = 1)
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  // observation of the current instruction
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        illegal,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        branch_taken
);

  instr_r_t    ir;
  instr_i_t    ii;
  ctrl_t       ctrl;
  logic        illegal_dec;
  logic [4:0]  rw;
  logic [31:0] busa, busb, busw;
  logic [31:0] imm32;
  logic [31:0] alu_b;
  logic [31:0] alu_result;
  logic        zero;
  logic [31:0] dmem_rdata;
  logic        run;

  always_comb begin
    ir  = instr_r_t'(instr);
    ii  = instr_i_t'(instr);
    run = ~rst;
  end

  ifetch #(.ADDR_BITS(IMEM_ADDR_BITS), .RESET_PC(RESET_PC)) u_ifetch (
    .clk      (clk),
    .rst      (rst),
    .branch   (ctrl.branch & run),
    .zero     (zero),
    .load_we  (prog_we),
    .load_addr(prog_addr),
    .load_data(prog_data),
    .pc       (pc),
    .instr    (instr)
  );

  control u_control (
    .op     (ir.op),
    .funct  (ir.funct),
    .ctrl   (ctrl),
    .illegal(illegal_dec)
  );

  // Destination register: rd for R-type, rt for I-type
  mux2 #(.W(5)) u_regdst_mux (
    .sel(ctrl.reg_dst), .a(ir.rt), .b(ir.rd), .y(rw)
  );

  regfile u_regfile (
    .clk (clk),
    .we  (ctrl.reg_wr & run),
    .rw  (rw),
    .ra  (ir.rs),
    .rb  (ir.rt),
    .busw(busw),
    .busa(busa),
    .busb(busb)
  );

  extender u_ext (
    .imm16(ii.imm16), .ext_op(ctrl.ext_op), .imm32(imm32)
  );

  // ALU B input: register rt or extended immediate
  mux2 #(.W(32)) u_alusrc_mux (
    .sel(ctrl.alu_src), .a(busb), .b(imm32), .y(alu_b)
  );

  alu #(.W(32)) u_alu (
    .a(busa), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .result(alu_result), .zero(zero)
  );

  ideal_mem #(.ADDR_BITS(DMEM_ADDR_BITS), .W(32)) u_dmem (
    .clk (clk),
    .we  (ctrl.mem_wr & run),
    .addr(alu_result),
    .din (busb),
    .dout(dmem_rdata)
  );

  // Write-back value: ALU result or loaded word
  mux2 #(.W(32)) u_memtoreg_mux (
    .sel(ctrl.mem_to_reg), .a(alu_result), .b(dmem_rdata), .y(busw)
  );

  always_comb begin
    illegal      = illegal_dec & run;
    reg_we       = ctrl.reg_wr & run & (rw != 5'd0);
    reg_waddr    = rw;
    reg_wdata    = busw;
    dmem_we      = ctrl.mem_wr & run;
    dmem_addr    = alu_result;
    dmem_wdata   = busb;
    branch_taken = ctrl.branch & zero & run;
  end

endmodule
