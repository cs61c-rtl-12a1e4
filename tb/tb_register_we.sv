// tb_register_we: self-checking test of the N-bit register with write
// enable. Inputs change after the rising edge; the register must take
// Data In only at a falling edge with Write Enable = 1, hold its value
// with Write Enable = 0 and across rising edges, and go to RESET_VALUE on
// reset.
module tb_register_we;
  localparam logic [31:0] RV = 32'hCAFE_0004;
  logic        clk = 1'b1;
  logic        rst, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;   // falling edges at 5, 15, ...

  register_we #(.N(32), .RESET_VALUE(RV)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  task automatic expect_q(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h exp %h", what, q, model);
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; d = '0;
    @(negedge clk); #1;
    model = RV;
    expect_q("reset");
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      we = 1'($urandom); d = $urandom;
      rst = ($urandom % 50) == 0;
      #1;
      expect_q("no change before falling edge");
      @(negedge clk); #1;
      if (rst) model = RV;
      else if (we) model = d;
      expect_q("after falling edge");
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
