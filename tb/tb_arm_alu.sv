// tb_arm_alu: random test of the sixteen data-processing operations.
// The reference computes results with 64-bit signed and unsigned integer
// arithmetic: C is "no unsigned overflow" for additions and "no borrow"
// for subtractions, V is the signed result leaving the 32-bit range.
// Logical operations must copy the shifter carry into C and keep V. Edge
// operands (0, 1, 0x7fffffff, 0x80000000, 0xffffffff) are mixed in.
module tb_arm_alu;
  import arm_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        cin, sh_c, vin, wr;
  logic [3:0]  nzcv;
  int          checks = 0, failures = 0;

  arm_alu dut (.op, .a, .b, .cin, .sh_c, .vin, .y, .nzcv, .wr);

  function automatic logic [31:0] pick();
    logic [31:0] e [5] = '{32'd0, 32'd1, 32'h7fffffff, 32'h80000000, 32'hffffffff};
    return ($urandom_range(0, 3) == 0) ? e[$urandom_range(0, 4)] : $urandom;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8000; i++) begin
      longint ua, ub, uc, us; longint sa, sb, sc, ss;
      logic [31:0] ey; logic ec, ev, ewr, arith;
      op = alu_op_e'(i % 16); a = pick(); b = pick();
      cin = 1'($urandom); sh_c = 1'($urandom); vin = 1'($urandom);
      ua = longint'(a); ub = longint'(b); uc = longint'(cin);
      sa = longint'($signed(a)); sb = longint'($signed(b)); sc = uc;
      arith = 1'b1; us = 0; ss = 0;
      case (op)
        OP_ADD, OP_CMN: begin us = ua + ub;          ss = sa + sb;          end
        OP_ADC:         begin us = ua + ub + uc;     ss = sa + sb + sc;     end
        OP_SUB, OP_CMP: begin us = ua - ub;          ss = sa - sb;          end
        OP_SBC:         begin us = ua - ub - 1 + uc; ss = sa - sb - 1 + sc; end
        OP_RSB:         begin us = ub - ua;          ss = sb - sa;          end
        OP_RSC:         begin us = ub - ua - 1 + uc; ss = sb - sa - 1 + sc; end
        default: arith = 1'b0;
      endcase
      case (op)
        OP_AND, OP_TST: ey = a & b;
        OP_EOR, OP_TEQ: ey = a ^ b;
        OP_ORR: ey = a | b;
        OP_MOV: ey = b;
        OP_BIC: ey = a & ~b;
        OP_MVN: ey = ~b;
        default: ey = us[31:0];
      endcase
      if (arith) begin
        if (op inside {OP_ADD, OP_CMN, OP_ADC}) ec = (us > 64'hffffffff);
        else ec = (us >= 0);
        ev = (ss > 64'sh7fffffff) || (ss < -64'sh80000000);
      end else begin
        ec = sh_c; ev = vin;
      end
      ewr = !(op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN});
      #1;
      checks++;
      if (y !== ey || nzcv !== {ey[31], ey == 0, ec, ev} || wr !== ewr) begin
        failures++;
        $display("FAIL %s a=%h b=%h c=%b: y=%h nzcv=%b expected %h %b",
                 op.name(), a, b, cin, y, nzcv, ey, {ey[31], ey == 0, ec, ev});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
