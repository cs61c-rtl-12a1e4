// tb_regfile: self-checking test of the 32 x 32-bit register file.
// All registers are written first, then each cycle reads two random
// registers and writes a third one, as a single-cycle instruction does.
// Checks: busA/busB match a reference array combinationally; a write
// lands only at the falling edge with Write Enable = 1; register 0 always
// reads zero, even after a write to it.
module tb_regfile;
  logic        clk = 1'b1;
  logic        we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int r0_writes = 0;
  always #5 clk = ~clk;

  regfile dut (.clk(clk), .we(we), .rw(rw), .ra(ra), .rb(rb), .busw(busw), .busa(busa), .busb(busb));

  task automatic check_reads(string what);
    #1;
    checks++;
    if (busa !== model[ra] || busb !== model[rb]) begin
      failures++;
      $display("FAIL %s ra=%0d busa=%h exp %h rb=%0d busb=%h exp %h",
               what, ra, busa, model[ra], rb, busb, model[rb]);
    end
  endtask

  initial begin
    we = 1'b0; rw = '0; ra = '0; rb = '0; busw = '0;
    model[0] = '0;
    for (int i = 1; i < 32; i++) begin
      @(posedge clk); #1;
      we = 1'b1; rw = 5'(i); busw = $urandom; model[i] = busw;
      @(negedge clk); #1;
    end
    we = 1'b0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i);
      check_reads("initial readback");
    end
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk); #1;
      we = 1'($urandom); rw = 5'($urandom); busw = $urandom;
      ra = (i % 8 == 0) ? rw : 5'($urandom); rb = 5'($urandom);
      check_reads("before edge");
      @(negedge clk);
      if (we && rw != 0) model[rw] = busw;
      if (we && rw == 0) r0_writes++;
      check_reads("after edge");
    end
    checks++;
    if (r0_writes == 0) begin
      failures++;
      $display("FAIL no write to register 0 was attempted");
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
