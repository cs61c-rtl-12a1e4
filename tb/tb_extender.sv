// tb_extender: self-checking test of the immediate extender.
// Sweeps all 65536 immediates in both modes and compares with sign
// extension through a signed cast (EXT_SIGN) and plain zero padding
// (EXT_ZERO).
module tb_extender;
  import mipslite_pkg::*;
  logic [15:0] imm16;
  ext_op_e     ext_op;
  logic [31:0] imm32, expv;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    for (int i = 0; i < 65536; i++) begin
      for (int m = 0; m < 2; m++) begin
        imm16  = 16'(i);
        ext_op = (m == 1) ? EXT_SIGN : EXT_ZERO;
        #1;
        expv = (m == 1) ? 32'($signed(imm16)) : {16'h0000, imm16};
        checks++;
        if (imm32 !== expv) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h mode=%0d got %h exp %h", imm16, m, imm32, expv);
        end
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
