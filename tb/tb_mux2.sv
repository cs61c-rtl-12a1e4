// tb_mux2: self-checking test of the two-input multiplexer.
// Random data on both inputs with both select values; Y must equal A for
// Select = 0 and B for Select = 1.
module tb_mux2;
  logic [31:0] a, b, y;
  logic        sel;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mux2 #(.W(32)) dut (.sel(sel), .a(a), .b(b), .y(y));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom; sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
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
