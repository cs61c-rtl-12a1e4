// tb_next_addr_logic: self-checking test of the next address logic.
// Random PCs and immediates with all four branch/zero combinations; the
// expected next PC is PC + 4, or PC + 4 + 4 * signed(imm16) when both
// branch and zero are 1. Includes backward branches and PC wrap-around.
module tb_next_addr_logic;
  logic [31:0] pc, next_pc, expv;
  logic [15:0] imm16;
  logic        branch, zero;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  next_addr_logic dut (.pc(pc), .imm16(imm16), .branch(branch), .zero(zero), .next_pc(next_pc));

  initial begin
    for (int i = 0; i < 4000; i++) begin
      pc     = (i < 8) ? 32'hFFFF_FFF0 + 32'(i * 4) : (32'($urandom) << 2);
      imm16  = (i % 5 == 0) ? 16'h8000 : 16'($urandom);
      branch = 1'(i);
      zero   = 1'(i >> 1);
      #1;
      expv = (branch && zero) ? pc + 32'd4 + (32'($signed(imm16)) * 32'd4) : pc + 32'd4;
      checks++;
      if (next_pc !== expv) begin
        failures++;
        if (failures < 20)
          $display("FAIL pc=%h imm=%h br=%b z=%b got %h exp %h", pc, imm16, branch, zero, next_pc, expv);
      end
    end
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
