// tb_control: self-checking test of the main decoder.
// Every opcode (64) with a set of funct values is applied. The expected
// control word is written out per instruction from its register transfer:
// which register is written (rd or rt), whether the ALU takes the
// immediate, whether memory is read or written, the extension mode and the
// ALU operation. Unknown instructions must set illegal and write nothing.
module tb_control;
  import mipslite_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      ctrl;
  logic       illegal;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  control dut (.op(op), .funct(funct), .ctrl(ctrl), .illegal(illegal));

  task automatic check_one(logic [5:0] o, logic [5:0] f);
    logic exp_ill, bad;
    op = o; funct = f; #1;
    checks++;
    exp_ill = 1'b0;
    bad = 1'b0;
    if (o == 6'h00 && f == 6'h21) begin          // addu rd = rs + rt
      if (!(ctrl.reg_dst && !ctrl.alu_src && !ctrl.mem_to_reg && ctrl.reg_wr &&
            !ctrl.mem_wr && !ctrl.branch && ctrl.alu_ctr == ALU_ADD)) bad = 1'b1;
    end else if (o == 6'h00 && f == 6'h23) begin // subu rd = rs - rt
      if (!(ctrl.reg_dst && !ctrl.alu_src && !ctrl.mem_to_reg && ctrl.reg_wr &&
            !ctrl.mem_wr && !ctrl.branch && ctrl.alu_ctr == ALU_SUB)) bad = 1'b1;
    end else if (o == 6'h0D) begin               // ori rt = rs | zext(imm)
      if (!(!ctrl.reg_dst && ctrl.alu_src && !ctrl.mem_to_reg && ctrl.reg_wr &&
            !ctrl.mem_wr && !ctrl.branch && ctrl.ext_op == EXT_ZERO &&
            ctrl.alu_ctr == ALU_OR)) bad = 1'b1;
    end else if (o == 6'h23) begin               // lw rt = MEM[rs + sext(imm)]
      if (!(!ctrl.reg_dst && ctrl.alu_src && ctrl.mem_to_reg && ctrl.reg_wr &&
            !ctrl.mem_wr && !ctrl.branch && ctrl.ext_op == EXT_SIGN &&
            ctrl.alu_ctr == ALU_ADD)) bad = 1'b1;
    end else if (o == 6'h2B) begin               // sw MEM[rs + sext(imm)] = rt
      if (!(ctrl.alu_src && !ctrl.reg_wr && ctrl.mem_wr && !ctrl.branch &&
            ctrl.ext_op == EXT_SIGN && ctrl.alu_ctr == ALU_ADD)) bad = 1'b1;
    end else if (o == 6'h04) begin               // beq: compare by subtraction
      if (!(!ctrl.alu_src && !ctrl.reg_wr && !ctrl.mem_wr && ctrl.branch &&
            ctrl.alu_ctr == ALU_SUB)) bad = 1'b1;
    end else begin
      exp_ill = 1'b1;
      if (ctrl.reg_wr || ctrl.mem_wr || ctrl.branch) bad = 1'b1;
    end
    if (bad || illegal !== exp_ill) begin
      failures++;
      if (failures < 20) $display("FAIL op=%h funct=%h ctrl=%p illegal=%b", o, f, ctrl, illegal);
    end
  endtask

  initial begin
    for (int o = 0; o < 64; o++) begin
      check_one(6'(o), 6'h21);
      check_one(6'(o), 6'h23);
      for (int k = 0; k < 20; k++) check_one(6'(o), 6'($urandom));
    end
    for (int f = 0; f < 64; f++) check_one(6'h00, 6'(f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
