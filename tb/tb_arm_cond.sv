// tb_arm_cond: exhaustive test of the condition check. All 16 condition
// codes are applied with all 16 combinations of N, Z, C, V, and `pass` is
// compared with the condition's definition written out as a truth table
// of the signed/unsigned comparisons it stands for.
module tb_arm_cond;
  logic [3:0] cond, nzcv;
  logic       pass, exp;
  int         checks = 0, failures = 0;

  arm_cond dut (.cond, .nzcv, .pass);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int f = 0; f < 16; f++) begin
        logic n, z, cy, v;
        cond = 4'(c); nzcv = 4'(f);
        {n, z, cy, v} = nzcv;
        case (c)
          0:  exp = z == 1;                 // equal
          1:  exp = z == 0;                 // not equal
          2:  exp = cy == 1;                // unsigned >=
          3:  exp = cy == 0;                // unsigned <
          4:  exp = n == 1;                 // negative
          5:  exp = n == 0;                 // positive or zero
          6:  exp = v == 1;                 // overflow
          7:  exp = v == 0;                 // no overflow
          8:  exp = cy == 1 && z == 0;      // unsigned >
          9:  exp = !(cy == 1 && z == 0);   // unsigned <=
          10: exp = (n ^ v) == 0;           // signed >=
          11: exp = (n ^ v) == 1;           // signed <
          12: exp = z == 0 && (n ^ v) == 0; // signed >
          13: exp = !(z == 0 && (n ^ v) == 0); // signed <=
          14: exp = 1'b1;                   // always
          default: exp = 1'b0;              // never
        endcase
        #1;
        checks++;
        if (pass !== exp) begin
          failures++;
          $display("FAIL cond=%0d nzcv=%b pass=%b", c, nzcv, pass);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
