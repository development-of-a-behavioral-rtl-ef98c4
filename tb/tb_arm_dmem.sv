// tb_arm_dmem: random test of the data memory against a byte-array model:
// byte-lane writes, one-cycle read latency (the word appears the cycle
// after the request), and `err` with no write for addresses outside the
// window at BASE.
module tb_arm_dmem;
  localparam int          WORDS = 64;
  localparam logic [31:0] BASE  = 32'h2000_0000;
  logic        clk = 0, en = 0, we = 0, err;
  logic [3:0]  be = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [7:0]  model [4 * WORDS];
  int          checks = 0, failures = 0;

  arm_dmem #(.WORDS(WORDS), .BASE(BASE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      int w; logic out;
      @(negedge clk);
      out = ($urandom_range(0, 9) == 0);
      w = $urandom_range(0, WORDS - 1);
      addr = out ? (($urandom_range(0, 1) != 0) ? BASE - 4 : BASE + 32'(4 * WORDS) + 32'(4 * w))
                 : BASE + 32'(4 * w) + 32'($urandom_range(0, 3));
      en = 1; we = 1'($urandom); be = 4'($urandom); wdata = $urandom;
      #1;
      checks++;
      if (err !== out) begin failures++; $display("FAIL err at %h", addr); end
      if (we && !out)
        for (int b = 0; b < 4; b++) if (be[b]) model[4 * w + b] = wdata[8 * b +: 8];
      if (!we) begin
        @(negedge clk);
        en = 0;
        checks++;
        if (out) begin
          if (rdata !== 0) begin failures++; $display("FAIL out-of-range read %h", rdata); end
        end else if (rdata !== {model[4*w+3], model[4*w+2], model[4*w+1], model[4*w]}) begin
          failures++;
          $display("FAIL read %h: %h", addr, rdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
