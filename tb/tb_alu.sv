// tb_alu: self-checking test of the ALU.
// For every operation, corner operands (zero, one, most negative, most
// positive, all ones, equal operands) and random operands are applied and
// Result and Zero are compared with a reference written with SystemVerilog
// operators (+, -, |, &, signed <).
module tb_alu;
  import mipslite_pkg::*;
  logic [31:0] a, b, result;
  alu_ctr_e    ctr;
  logic        zero;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  alu #(.W(32)) dut (.a(a), .b(b), .alu_ctr(ctr), .result(result), .zero(zero));

  function automatic logic [31:0] ref_alu(alu_ctr_e c, logic [31:0] x, logic [31:0] y);
    case (c)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_OR:  return x | y;
      ALU_AND: return x & y;
      ALU_SLT: return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: return 'x;
    endcase
  endfunction

  task automatic check(alu_ctr_e c, logic [31:0] x, logic [31:0] y);
    logic [31:0] r;
    ctr = c; a = x; b = y;
    #1;
    r = ref_alu(c, x, y);
    checks++;
    if (result !== r || zero !== (r == 0)) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%s a=%h b=%h got %h z=%b exp %h", c.name(), x, y, result, zero, r);
    end
  endtask

  localparam logic [31:0] CORNERS [7] = '{32'h0, 32'h1, 32'h8000_0000, 32'h7FFF_FFFF,
                                           32'hFFFF_FFFF, 32'h1234_5678, 32'h8000_0001};
  localparam alu_ctr_e OPS [5] = '{ALU_ADD, ALU_SUB, ALU_OR, ALU_AND, ALU_SLT};

  initial begin
    foreach (OPS[o]) begin
      foreach (CORNERS[i]) foreach (CORNERS[j]) check(OPS[o], CORNERS[i], CORNERS[j]);
      for (int k = 0; k < 1000; k++) begin
        logic [31:0] x;
        x = $urandom;
        check(OPS[o], x, $urandom);
        check(OPS[o], x, x);   // equal operands: SUB must give Zero
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
