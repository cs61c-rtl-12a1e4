// tb_mipslite_cpu: end-to-end test of the single-cycle MIPS-lite CPU at its
// default sizes (1024-word instruction and data memories).
//
// The testbench assembles a program, loads it through the program port
// during reset and runs it against an instruction-level reference model
// kept in the testbench (registers, data memory, PC). Every cycle it
// compares the CPU's PC, instruction word, register write (enable,
// register, value), data memory write (enable, address, value), branch
// decision and illegal flag with the model, then advances the model by one
// instruction: one instruction must complete per clock.
//
// Program: 128 stores clear data words 0..127; a directed part exercises
// every instruction, ori's zero extension, subu wrap-around, negative
// load/store offsets, a counting loop with a backward branch (taken and
// not taken), a skipped instruction, a write to register 0 and an
// unknown opcode; then 600 random instructions (registers 1..6 written,
// register 7 holds a data base address, branches forward by 0..3). The
// program ends in a branch to itself, which the test detects as halt.
// Each mechanism is counted and must occur at least once.
module tb_mipslite_cpu;
  import mipslite_pkg::*;

  localparam int IWORDS = 1024;
  localparam int NRAND  = 600;
  localparam logic [31:0] HALT = {OP_BEQ, 5'd0, 5'd0, 16'hFFFF};  // beq r0,r0,-1

  logic        clk = 1'b1;
  logic        rst, prog_we;
  logic [31:0] prog_addr, prog_data;
  logic [31:0] pc, instr, reg_wdata, dmem_addr, dmem_wdata;
  logic        illegal, reg_we, dmem_we, branch_taken;
  logic [4:0]  reg_waddr;
  always #5 clk = ~clk;   // state changes at falling edges

  mipslite_cpu dut (
    .clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .pc(pc), .instr(instr), .illegal(illegal), .reg_we(reg_we), .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata), .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata),
    .branch_taken(branch_taken));

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- assembler
  logic [31:0] prog [IWORDS];
  int          plen = 0;

  function automatic logic [31:0] r_type(logic [5:0] funct, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rt, int rs, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction
  task automatic emit(logic [31:0] w);
    prog[plen] = w;
    plen++;
  endtask
  task automatic addu(int rd, int rs, int rt); emit(r_type(FUNCT_ADDU, rd, rs, rt)); endtask
  task automatic subu(int rd, int rs, int rt); emit(r_type(FUNCT_SUBU, rd, rs, rt)); endtask
  task automatic ori(int rt, int rs, logic [15:0] imm); emit(i_type(OP_ORI, rt, rs, imm)); endtask
  task automatic lw(int rt, logic [15:0] off, int rs); emit(i_type(OP_LW, rt, rs, off)); endtask
  task automatic sw(int rt, logic [15:0] off, int rs); emit(i_type(OP_SW, rt, rs, off)); endtask
  task automatic beq(int rs, int rt, logic [15:0] off); emit(i_type(OP_BEQ, rt, rs, off)); endtask

  task automatic build_program();
    // clear data words 0..127
    for (int i = 0; i < 128; i++) sw(0, 16'(i * 4), 0);
    // directed part
    ori(1, 0, 16'h0005);          // r1 = 5
    ori(2, 0, 16'h0001);          // r2 = 1
    ori(7, 0, 16'h0100);          // r7 = 0x100, data base
    ori(3, 0, 16'h8001);          // r3 = 0x00008001 (zero extension)
    addu(4, 1, 3);                // r4 = 0x8006
    subu(5, 2, 1);                // r5 = 1 - 5 = 0xFFFFFFFC
    sw(5, 16'hFFFC, 7);           // MEM[0xFC]  = r5 (negative offset)
    sw(4, 16'h0008, 7);           // MEM[0x108] = r4
    lw(6, 16'hFFFC, 7);           // r6 = MEM[0xFC]
    lw(3, 16'h0008, 7);           // r3 = MEM[0x108]
    subu(1, 1, 2);                // loop: r1 = r1 - 1
    beq(1, 0, 16'h0001);          //   if r1 == 0 leave the loop
    beq(0, 0, 16'hFFFD);          //   back to loop
    addu(0, 1, 2);                // write to r0 has no effect
    beq(6, 5, 16'h0001);          // r6 == r5: skip next
    ori(1, 0, 16'hDEAD);          // skipped
    emit(32'hFC00_0000);          // unknown opcode: no-op
    addu(1, 0, 0);                // r1 = 0 (r0 reads as zero)
    // give r1..r6 random values
    for (int r = 1; r <= 6; r++) ori(r, 0, 16'($urandom));
    // random part
    for (int i = 0; i < NRAND; i++) begin
      int kind, rd, rs, rt, base;
      logic [15:0] off;
      kind = $urandom % 100;
      rd   = ($urandom % 10 == 0) ? 0 : 1 + ($urandom % 6);
      rs   = $urandom % 8;
      rt   = $urandom % 8;
      base = (($urandom % 2) != 0) ? 7 : 0;
      off  = (base == 7) ? 16'(($urandom % 128) * 4 - 256) : 16'(($urandom % 128) * 4);
      if      (kind < 20) addu(rd, rs, rt);
      else if (kind < 40) subu(rd, rs, rt);
      else if (kind < 55) ori(rd, rs, 16'($urandom));
      else if (kind < 70) lw(rd, off, base);
      else if (kind < 85) sw(rt, off, base);
      else if (kind < 98) beq(rs, ($urandom % 3 == 0) ? rs : rt, 16'($urandom % 4));
      else                emit(r_type(6'h3F, rd, rs, rt));   // unknown funct
    end
    while (plen < IWORDS) emit(HALT);
  endtask

  // ---------------------------------------------------------------- reference model
  logic [31:0] m_pc;
  logic [31:0] m_regs [32];
  logic [31:0] m_mem  [int];

  // mechanism counters
  int n_addu = 0, n_subu = 0, n_ori = 0, n_lw = 0, n_sw = 0;
  int n_beq_taken = 0, n_beq_not_taken = 0, n_backward = 0;
  int n_r0_write = 0, n_illegal = 0, n_neg_offset = 0, n_ori_high = 0;

  task automatic fail(string what, logic [31:0] got, logic [31:0] expv);
    failures++;
    if (failures < 30) $display("FAIL pc=%h %s: got %h exp %h", m_pc, what, got, expv);
  endtask

  // compare the CPU's outputs for the current instruction, then step the model
  task automatic check_and_step();
    logic [31:0] w, a, b, imm_s, imm_z, res, nxt;
    logic        e_rwe, e_mwe, e_br, e_ill;
    logic [4:0]  e_rw;
    instr_r_t    ir;
    w  = prog[m_pc[11:2]];
    ir = instr_r_t'(w);
    a  = m_regs[ir.rs];
    b  = m_regs[ir.rt];
    imm_s = 32'($signed(w[15:0]));
    imm_z = {16'h0, w[15:0]};
    e_rwe = 1'b0; e_mwe = 1'b0; e_br = 1'b0; e_ill = 1'b0; e_rw = '0; res = '0;
    nxt = m_pc + 32'd4;
    case (ir.op)
      6'h00: begin
        e_rw = ir.rd;
        if (ir.funct == 6'h21)      begin res = a + b; e_rwe = 1'b1; n_addu++; end
        else if (ir.funct == 6'h23) begin res = a - b; e_rwe = 1'b1; n_subu++; end
        else e_ill = 1'b1;
      end
      6'h0D: begin e_rw = ir.rt; res = a | imm_z; e_rwe = 1'b1; n_ori++; if (w[15]) n_ori_high++; end
      6'h23: begin
        e_rw = ir.rt; e_rwe = 1'b1; n_lw++;
        if (!m_mem.exists((a + imm_s) >> 2)) $display("model: load from unwritten word %h", a + imm_s);
        res = m_mem[(a + imm_s) >> 2];
        if (w[15]) n_neg_offset++;
      end
      6'h2B: begin e_mwe = 1'b1; n_sw++; if (w[15]) n_neg_offset++; end
      6'h04: begin
        if (a == b) begin
          e_br = 1'b1; nxt = m_pc + 32'd4 + (imm_s << 2);
          if (w != HALT) n_beq_taken++;
          if (imm_s[31] && w != HALT) n_backward++;
        end else n_beq_not_taken++;
      end
      default: e_ill = 1'b1;
    endcase
    if (e_ill) n_illegal++;
    if (e_rwe && e_rw == 0) n_r0_write++;
    if (e_rw == 0) e_rwe = 1'b0;

    checks += 10;   // one per compared output below
    if (pc !== m_pc)                 fail("pc", pc, m_pc);
    if (instr !== w)                 fail("instr", instr, w);
    if (reg_we !== e_rwe)            fail("reg_we", 32'(reg_we), 32'(e_rwe));
    if (e_rwe && reg_waddr !== e_rw) fail("reg_waddr", 32'(reg_waddr), 32'(e_rw));
    if (e_rwe && reg_wdata !== res)  fail("reg_wdata", reg_wdata, res);
    if (dmem_we !== e_mwe)           fail("dmem_we", 32'(dmem_we), 32'(e_mwe));
    if (e_mwe && dmem_addr !== a + imm_s) fail("dmem_addr", dmem_addr, a + imm_s);
    if (e_mwe && dmem_wdata !== b)   fail("dmem_wdata", dmem_wdata, b);
    if (branch_taken !== e_br)       fail("branch_taken", 32'(branch_taken), 32'(e_br));
    if (illegal !== e_ill)           fail("illegal", 32'(illegal), 32'(e_ill));

    if (e_rwe) m_regs[e_rw] = res;
    if (e_mwe) m_mem[(a + imm_s) >> 2] = b;
    m_pc = nxt;
  endtask

  // ---------------------------------------------------------------- run
  int cycles = 0, retired = 0, run_edges = 0;

  // falling edges seen while the CPU runs: each must retire one instruction
  always @(negedge clk) if (!rst) run_edges++;

  initial begin
    build_program();
    rst = 1'b1; prog_we = 1'b0; prog_addr = '0; prog_data = '0;
    for (int i = 0; i < IWORDS; i++) begin
      @(posedge clk); #1;
      prog_we = 1'b1; prog_addr = 32'(i * 4); prog_data = prog[i];
      @(negedge clk);
    end
    @(posedge clk); #1;
    prog_we = 1'b0;
    rst = 1'b0;
    m_pc = 32'h0;
    for (int r = 0; r < 32; r++) m_regs[r] = '0;
    // run until the model reaches the final self-branch
    while (prog[m_pc[11:2]] != HALT) begin
      #1;
      check_and_step();
      retired++;
      @(negedge clk);
      @(posedge clk);
      if (retired > 20000) break;
    end
    cycles = run_edges;
    // a few cycles on the halt loop: PC must stay put
    for (int i = 0; i < 4; i++) begin
      #1;
      check_and_step();
      @(negedge clk);
      @(posedge clk);
    end
    $display("cycles=%0d instructions=%0d", cycles, retired);
    checks++;
    if (cycles != retired) begin
      failures++;
      $display("FAIL cycles per instruction is not 1");
    end
    $display("addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d backward=%0d",
             n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_taken, n_beq_not_taken, n_backward);
    $display("r0_write=%0d illegal=%0d neg_offset=%0d ori_imm_bit15=%0d",
             n_r0_write, n_illegal, n_neg_offset, n_ori_high);
    begin
      int cnt [12];
      cnt = '{n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_taken, n_beq_not_taken, n_backward,
              n_r0_write, n_illegal, n_neg_offset, n_ori_high};
      foreach (cnt[k]) begin
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
