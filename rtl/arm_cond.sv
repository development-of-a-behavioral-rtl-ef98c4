// arm_cond: the "execute condition" check of the core.
// Every ARM instruction carries a 4-bit condition field in bits [31:28].
// This block compares that field with the N, Z, C and V flags of the
// current program status register and raises `pass` when the instruction
// is to be executed. When `pass` is low the core only advances the program
// counter. Purely combinational. The fourteen ARM conditions and AL are the
// architecture's; treating the reserved code 4'b1111 (NV) as "never" is
// this design's choice.
module arm_cond
  import arm_pkg::*;
(
  input  logic [3:0] cond,   // instruction bits [31:28]
  input  logic [3:0] nzcv,   // CPSR[31:28]
  output logic       pass
);
  logic n, z, c, v;
  assign {n, z, c, v} = nzcv;

  always_comb begin
    unique case (cond_e'(cond))
      C_EQ: pass = z;
      C_NE: pass = !z;
      C_CS: pass = c;
      C_CC: pass = !c;
      C_MI: pass = n;
      C_PL: pass = !n;
      C_VS: pass = v;
      C_VC: pass = !v;
      C_HI: pass = c && !z;
      C_LS: pass = !c || z;
      C_GE: pass = (n == v);
      C_LT: pass = (n != v);
      C_GT: pass = !z && (n == v);
      C_LE: pass = z || (n != v);
      C_AL: pass = 1'b1;
      C_NV: pass = 1'b0;
    endcase
  end
endmodule
