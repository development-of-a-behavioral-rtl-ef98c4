// tb_arm_shifter: random and corner-case test of the barrel shifter.
// A reference model computes every shift bit by bit in a loop (one-bit
// steps), which is independent of the shifter's single-expression shifts,
// and follows the ARM rules for amount 0 (LSR/ASR #32, RRX), register
// amounts of 32 and more, and the rotated 8-bit immediate.
module tb_arm_shifter;
  logic [11:0] op2;
  logic        imm, cin, cout;
  logic [31:0] rm, out;
  logic [7:0]  rs;
  int          checks = 0, failures = 0;

  arm_shifter dut (.op2, .imm, .rm, .rs, .cin, .out, .cout);

  // shift by one bit n times
  task automatic ref_shift(input logic [1:0] t, input int n, input logic [31:0] v,
                           input logic c0, output logic [31:0] r, output logic c);
    r = v; c = c0;
    for (int i = 0; i < n; i++) begin
      case (t)
        2'd0: begin c = r[31]; r = {r[30:0], 1'b0}; end
        2'd1: begin c = r[0];  r = {1'b0, r[31:1]}; end
        2'd2: begin c = r[0];  r = {r[31], r[31:1]}; end
        default: begin c = r[0]; r = {r[0], r[31:1]}; end
      endcase
    end
  endtask

  task automatic one();
    logic [31:0] er; logic ec; int n;
    if (imm) begin
      ref_shift(2'd3, 2 * int'(op2[11:8]), {24'd0, op2[7:0]}, cin, er, ec);
      if (op2[11:8] == 0) ec = cin;
    end else if (!op2[4]) begin
      n = int'(op2[11:7]);
      if (n == 0) begin
        case (op2[6:5])
          2'd0: begin er = rm; ec = cin; end
          2'd1: ref_shift(2'd1, 32, rm, cin, er, ec);
          2'd2: ref_shift(2'd2, 32, rm, cin, er, ec);
          default: begin er = {cin, rm[31:1]}; ec = rm[0]; end
        endcase
      end else ref_shift(op2[6:5], n, rm, cin, er, ec);
    end else begin
      n = int'(rs);
      if (op2[6:5] == 2'd3 && n != 0) begin
        ref_shift(2'd3, n % 32, rm, cin, er, ec);
        if (n % 32 == 0) ec = rm[31];
      end else ref_shift(op2[6:5], n, rm, cin, er, ec);
    end
    #1;
    checks++;
    if (out !== er || cout !== ec) begin
      failures++;
      $display("FAIL imm=%b op2=%h rm=%h rs=%0d cin=%b: %h/%b expected %h/%b",
               imm, op2, rm, rs, cin, out, cout, er, ec);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // register amounts around 0, 31, 32, 33 and above for every type
    for (int t = 0; t < 4; t++)
      for (int a = 0; a < 70; a++) begin
        imm = 0; op2 = {5'd0, 2'(t), 1'b1, 4'd0};
        rs = 8'(a); rm = $urandom; cin = 1'($urandom);
        one();
      end
    for (int i = 0; i < 3000; i++) begin
      imm = 1'($urandom); op2 = 12'($urandom); rm = $urandom;
      rs = (i % 3 == 0) ? 8'($urandom) : 8'($urandom_range(0, 40));
      cin = 1'($urandom);
      if (!imm && op2[4]) op2[7] = 1'b0;
      one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
