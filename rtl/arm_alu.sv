// arm_alu: the arithmetic logic unit of the core.
// It performs the sixteen ARM data-processing operations (opcode =
// instruction bits [24:21]) on operand `a` (register Rn) and operand `b`
// (the barrel-shifter output) and produces the result and the N, Z, C, V
// flags the operation would set. Arithmetic operations take C and V from
// the adder; logical operations take C from the shifter carry `sh_c` and
// leave V unchanged. `wr` is low for the compare/test operations, which set
// flags only. The core also uses this unit with ADD/SUB to form load/store
// addresses. Purely combinational. The opcode table is the ARM
// architecture's; the reference paper gives the function of the block.
module arm_alu
  import arm_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,    // current C flag (ADC, SBC, RSC)
  input  logic        sh_c,   // shifter carry-out
  input  logic        vin,    // current V flag
  output logic [31:0] y,
  output logic [3:0]  nzcv,
  output logic        wr
);
  logic [32:0] sum;
  logic [31:0] x, z;
  logic        cy, arith, c_out, v_out;

  always_comb begin
    // Arithmetic operations as x + z + cy
    x = a; z = b; cy = 1'b0; arith = 1'b1;
    unique case (op)
      OP_SUB, OP_CMP: begin x = a;  z = ~b; cy = 1'b1; end
      OP_RSB:         begin x = b;  z = ~a; cy = 1'b1; end
      OP_ADD, OP_CMN: begin x = a;  z = b;  cy = 1'b0; end
      OP_ADC:         begin x = a;  z = b;  cy = cin;  end
      OP_SBC:         begin x = a;  z = ~b; cy = cin;  end
      OP_RSC:         begin x = b;  z = ~a; cy = cin;  end
      default:        arith = 1'b0;
    endcase
    sum = {1'b0, x} + {1'b0, z} + {32'd0, cy};

    unique case (op)
      OP_AND, OP_TST: y = a & b;
      OP_EOR, OP_TEQ: y = a ^ b;
      OP_ORR:         y = a | b;
      OP_MOV:         y = b;
      OP_BIC:         y = a & ~b;
      OP_MVN:         y = ~b;
      default:        y = sum[31:0];
    endcase

    if (arith) begin
      c_out = sum[32];
      v_out = (x[31] == z[31]) && (sum[31] != x[31]);
    end else begin
      c_out = sh_c;
      v_out = vin;
    end
    nzcv = {y[31], (y == 32'd0), c_out, v_out};
    wr   = !(op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN});
  end
endmodule
