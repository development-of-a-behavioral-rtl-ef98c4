// arm_mul: the multiplication unit (MUL) of the core.
// It computes the low 32 bits of Rm * Rs and, for the multiply-accumulate
// instruction (acc = 1, instruction bit 21), adds Rn. It also produces the
// N and Z flags of the result for the S form; C and V are passed through
// unchanged. The result finishes in the same clock cycle (combinational),
// which is this design's choice: the reference paper says only that a separate
// block multiplies two operands and writes the destination register.
module arm_mul (
  input  logic [31:0] rm,
  input  logic [31:0] rs,
  input  logic [31:0] rn,
  input  logic        acc,
  input  logic [1:0]  cv_in,   // current C and V
  output logic [31:0] y,
  output logic [3:0]  nzcv
);
  always_comb begin
    y    = (rm * rs) + (acc ? rn : 32'd0);
    nzcv = {y[31], (y == 32'd0), cv_in};
  end
endmodule
