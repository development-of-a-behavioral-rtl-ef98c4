// tb_arm_mul: random test of MUL and MLA. The expected low word is taken
// from a 64-bit product (plus the addend for MLA); N and Z must follow the
// result and C, V must pass through.
module tb_arm_mul;
  logic [31:0] rm, rs, rn, y;
  logic        acc;
  logic [1:0]  cv_in;
  logic [3:0]  nzcv;
  int          checks = 0, failures = 0;

  arm_mul dut (.rm, .rs, .rn, .acc, .cv_in, .y, .nzcv);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint unsigned p;
      logic [31:0] e;
      rm = (i % 7 == 0) ? 32'd0 : $urandom;
      rs = (i % 5 == 0) ? 32'($urandom_range(0, 9)) : $urandom;
      rn = $urandom; acc = 1'($urandom); cv_in = 2'($urandom);
      p = longint'(rm) * longint'(rs);
      if (acc) p = p + longint'(rn);
      e = p[31:0];
      #1;
      checks++;
      if (y !== e || nzcv !== {e[31], e == 0, cv_in}) begin
        failures++;
        $display("FAIL %h*%h+%b*%h = %h expected %h", rm, rs, acc, rn, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
