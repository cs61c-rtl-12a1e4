// tb_adder: self-checking test of the W-bit adder.
// Drives corner cases (zero, all ones, carry propagation) and random
// operands with both carry-in values, and compares Sum and CarryOut with a
// 33-bit reference addition computed in the testbench.
module tb_adder;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  adder #(.W(32)) dut (.a(a), .b(b), .carry_in(cin), .sum(sum), .carry_out(cout));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] ref33;
    a = ta; b = tb_; cin = tc;
    #1;
    ref33 = 33'(ta) + 33'(tb_) + 33'(tc);
    checks++;
    if ({cout, sum} !== ref33) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", ta, tb_, tc, cout, sum, ref33);
    end
  endtask

  initial begin
    check(32'h0, 32'h0, 1'b0);
    check(32'hFFFF_FFFF, 32'h0, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h7FFF_FFFF, 32'h1, 1'b0);
    check(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
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
