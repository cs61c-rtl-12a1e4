// tb_ideal_mem: self-checking test of the idealized memory (small depth).
// First every word is written once so the contents are known, then random
// reads and writes follow. Checks: Data Out follows Address without a clock
// (combinational read); a write takes effect only at the falling edge and
// only with Write Enable = 1; address bits 1:0 do not matter.
module tb_ideal_mem;
  localparam int AB = 6;
  localparam int DEPTH = 1 << AB;
  logic        clk = 1'b1;
  logic        we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ideal_mem #(.ADDR_BITS(AB), .W(32)) dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  task automatic expect_read(logic [31:0] ad, string what);
    addr = ad; #1;
    checks++;
    if (dout !== model[ad[AB+1:2]]) begin
      failures++;
      $display("FAIL %s addr=%h dout=%h exp %h", what, ad, dout, model[ad[AB+1:2]]);
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; din = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(posedge clk); #1;
      we = 1'b1; addr = 32'(i * 4); din = $urandom; model[i] = din;
      @(negedge clk); #1;
      we = 1'b0;
    end
    for (int i = 0; i < DEPTH; i++) expect_read(32'(i * 4) | 32'($urandom % 4), "initial readback");
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ad;
      @(posedge clk); #1;
      ad = 32'($urandom % (DEPTH * 4));
      we = 1'($urandom); din = $urandom; addr = ad;
      #1;
      // before the falling edge the old word is still read
      checks++;
      if (dout !== model[ad[AB+1:2]]) begin
        failures++;
        $display("FAIL write before edge addr=%h dout=%h exp %h", ad, dout, model[ad[AB+1:2]]);
      end
      @(negedge clk); #1;
      if (we) model[ad[AB+1:2]] = din;
      we = 1'b0;
      expect_read(ad, "after edge");
      expect_read(32'($urandom % (DEPTH * 4)), "random read");
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
