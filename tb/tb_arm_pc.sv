// tb_arm_pc: test of the program counter. A reference PC is advanced by
// the rules of the next-PC multiplexer (hold, load a word-aligned target,
// or add 4) under random control for many cycles, after a reset check.
module tb_arm_pc;
  logic        clk = 0, rst_n = 0, nhold = 1, load = 0;
  logic [31:0] target = 0, pc, pc_plus4, model;
  int          checks = 0, failures = 0;

  arm_pc #(.RESET_PC(32'h0000_0100)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (pc !== 32'h100) begin failures++; $display("FAIL reset pc %h", pc); end
    rst_n = 1; model = 32'h100;
    for (int i = 0; i < 2000; i++) begin
      nhold = ($urandom_range(0, 4) != 0); load = 1'($urandom); target = $urandom;
      @(negedge clk);
      if (nhold) model = load ? (target & ~32'd3) : model + 4;
      checks++;
      if (pc !== model || pc_plus4 !== model + 4) begin
        failures++;
        $display("FAIL cycle %0d: pc %h expected %h", i, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
