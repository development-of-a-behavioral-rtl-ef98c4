// arm_shifter: the barrel shifter (SH) in front of the ALU's second input.
// It forms the flexible second operand of the ARM instruction set from the
// 12-bit operand field `op2` (instruction bits [11:0]):
//   imm = 1 : an 8-bit constant op2[7:0] rotated right by 2*op2[11:8];
//   imm = 0 : register Rm shifted by LSL, LSR, ASR or ROR (op2[6:5]) by a
//             5-bit constant op2[11:7] (op2[4] = 0) or by the low byte of
//             register Rs (op2[4] = 1).
// The encodings of shift amount 0 (LSR #32, ASR #32, RRX) and of register
// amounts of 32 and above follow the ARM architecture. `cout` is the
// shifter carry that logical operations copy into the C flag; `cin` is the
// current C flag. Purely combinational. The reference paper names this block only;
// its function here is the ARM architecture's.
module arm_shifter
  import arm_pkg::*;
(
  input  logic [11:0] op2,
  input  logic        imm,
  input  logic [31:0] rm,
  input  logic [7:0]  rs,
  input  logic        cin,
  output logic [31:0] out,
  output logic        cout
);
  logic [7:0] amt;
  logic       by_reg;
  shift_e     kind;
  logic [4:0] rot;

  always_comb begin
    by_reg = op2[4];
    kind   = shift_e'(op2[6:5]);
    amt    = by_reg ? rs : {3'b000, op2[11:7]};
    out    = rm;
    cout   = cin;
    rot    = '0;
    if (imm) begin
      rot  = {op2[11:8], 1'b0};
      out  = ({24'd0, op2[7:0]} >> rot) | ({24'd0, op2[7:0]} << (6'd32 - {1'b0, rot}));
      cout = (rot == 5'd0) ? cin : out[31];
    end else if (!by_reg && amt == 8'd0) begin
      // Immediate amount 0: LSL #0, LSR #32, ASR #32 or RRX
      unique case (kind)
        SH_LSL: begin out = rm;                 cout = cin;   end
        SH_LSR: begin out = '0;                 cout = rm[31]; end
        SH_ASR: begin out = {32{rm[31]}};       cout = rm[31]; end
        SH_ROR: begin out = {cin, rm[31:1]};    cout = rm[0];  end
      endcase
    end else if (amt == 8'd0) begin
      out  = rm;
      cout = cin;
    end else begin
      unique case (kind)
        SH_LSL: begin
          if (amt < 8'd32) begin
            out  = rm << amt[4:0];
            cout = rm[5'(6'd32 - {1'b0, amt[4:0]})];
          end else begin
            out  = '0;
            cout = (amt == 8'd32) ? rm[0] : 1'b0;
          end
        end
        SH_LSR: begin
          if (amt < 8'd32) begin
            out  = rm >> amt[4:0];
            cout = rm[amt[4:0] - 5'd1];
          end else begin
            out  = '0;
            cout = (amt == 8'd32) ? rm[31] : 1'b0;
          end
        end
        SH_ASR: begin
          if (amt < 8'd32) begin
            out  = 32'($signed(rm) >>> amt[4:0]);
            cout = rm[amt[4:0] - 5'd1];
          end else begin
            out  = {32{rm[31]}};
            cout = rm[31];
          end
        end
        SH_ROR: begin
          rot = amt[4:0];
          if (rot == 5'd0) begin
            out  = rm;
            cout = rm[31];
          end else begin
            out  = (rm >> rot) | (rm << (6'd32 - {1'b0, rot}));
            cout = rm[rot - 5'd1];
          end
        end
      endcase
    end
  end
endmodule
