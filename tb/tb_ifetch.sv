// tb_ifetch: self-checking test of the instruction fetch unit (64-word
// instruction memory). A random program is written through the load port
// during reset, then the unit runs with random branch/zero inputs. Each
// cycle the testbench checks PC against its own model and the instruction
// word against its copy of the memory; the model's next PC is PC + 4, or
// PC + 4 + 4 * signed(instr[15:0]) when branch and zero are both 1. Load
// writes attempted while running must be ignored. One instruction is
// fetched per cycle, so the PC must advance at every falling edge.
module tb_ifetch;
  localparam int AB = 6;
  localparam int DEPTH = 1 << AB;
  localparam logic [31:0] RPC = 32'h0000_0040;
  logic        clk = 1'b1;
  logic        rst, branch, zero, load_we;
  logic [31:0] load_addr, load_data, pc, instr;
  logic [31:0] mem_model [DEPTH];
  logic [31:0] pc_model;
  int checks = 0, failures = 0;
  int taken = 0, not_taken = 0;
  always #5 clk = ~clk;

  ifetch #(.ADDR_BITS(AB), .RESET_PC(RPC)) dut (
    .clk(clk), .rst(rst), .branch(branch), .zero(zero), .load_we(load_we),
    .load_addr(load_addr), .load_data(load_data), .pc(pc), .instr(instr));

  initial begin
    rst = 1'b1; branch = 1'b0; zero = 1'b0; load_we = 1'b0; load_addr = '0; load_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(posedge clk); #1;
      load_we = 1'b1; load_addr = 32'(i * 4); load_data = $urandom;
      mem_model[i] = load_data;
      @(negedge clk); #1;
    end
    load_we = 1'b0;
    checks++;
    if (pc !== RPC) begin
      failures++;
      $display("FAIL reset PC %h exp %h", pc, RPC);
    end
    @(posedge clk); #1;
    rst = 1'b0;
    pc_model = RPC;
    for (int i = 0; i < 3000; i++) begin
      branch = 1'($urandom); zero = 1'($urandom);
      load_we = 1'($urandom); load_addr = (32'($urandom) << 2); load_data = $urandom;
      #1;
      checks++;
      if (pc !== pc_model || instr !== mem_model[pc_model[AB+1:2]]) begin
        failures++;
        if (failures < 20)
          $display("FAIL cycle %0d pc=%h exp %h instr=%h exp %h", i, pc, pc_model, instr,
                   mem_model[pc_model[AB+1:2]]);
      end
      if (branch && zero) begin
        pc_model = pc_model + 32'd4 + 32'($signed(mem_model[pc_model[AB+1:2]][15:0])) * 32'd4;
        taken++;
      end else begin
        pc_model = pc_model + 32'd4;
        not_taken++;
      end
      @(negedge clk); #1;
    end
    checks++;
    if (taken == 0 || not_taken == 0) failures++;
    $display("taken=%0d sequential=%0d", taken, not_taken);
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
