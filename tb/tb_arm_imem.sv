// tb_arm_imem: test of the instruction memory: the whole memory is
// written through the load port with an address-dependent pattern and read
// back combinationally, including wrap-around of addresses beyond the size
// and the unused low address bits.
module tb_arm_imem;
  localparam int WORDS = 256;
  logic        clk = 0, we = 0;
  logic [31:0] addr = 0, rdata, waddr = 0, wdata = 0;
  int          checks = 0, failures = 0;

  arm_imem #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] pat(int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'hA5A5_0000;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; #1;
    checks++;
    if (rdata !== 0) begin failures++; $display("FAIL not cleared"); end
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = 32'(4 * i); wdata = pat(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2 * WORDS; i++) begin
      addr = 32'(4 * i) | 32'(i % 4); #1;
      checks++;
      if (rdata !== pat(i % WORDS)) begin
        failures++;
        $display("FAIL addr %h: %h expected %h", addr, rdata, pat(i % WORDS));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
