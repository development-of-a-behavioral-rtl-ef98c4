// arm_decode: instruction decoder of the "register read" stage.
// It sorts a 32-bit ARM instruction into one of the classes the core
// executes (data processing, MUL/MLA, SWP, MRS, MSR, B/BL, single
// load/store of word or byte, halfword and signed-byte load/store, load/
// store multiple) or marks it undefined, and splits out the register
// fields. The class is found from the bit groups the reference paper
// names: bits [27:26] with 25 and [24:21] for data processing, [27:22]
// and [7:4] for multiply, [27:23], [21:20] and [7:4] for swap and for
// MRS/MSR, [27:25] for branch and for load/store multiple, [27:26] for
// single load/store. Multiply writes the register in bits [19:16]. Long
// multiply, BX, coprocessor and software-interrupt encodings are not
// among the instructions the core executes and come out as I_UNDEF.
// Purely combinational.
module arm_decode
  import arm_pkg::*;
(
  input  logic [31:0] instr,
  output iclass_e     iclass,
  output logic [3:0]  cond,
  output logic [3:0]  rn,      // first operand / base register
  output logic [3:0]  rd,      // destination (multiply: bits [19:16])
  output logic [3:0]  rs,      // shift-amount register / multiplier
  output logic [3:0]  rm       // second operand register
);
  logic [2:0] top3;

  always_comb begin
    top3  = instr[27:25];
    cond  = instr[31:28];
    rn    = instr[19:16];
    rd    = instr[15:12];
    rs    = instr[11:8];
    rm    = instr[3:0];
    iclass = I_UNDEF;
    unique case (top3)
      3'b000: begin
        if (instr[7:4] == 4'b1001) begin
          if (instr[24:22] == 3'b000) begin
            iclass = I_MUL;
            rd = instr[19:16];
            rn = instr[15:12];   // accumulate addend
          end else if (instr[24:23] == 2'b10 && instr[21:20] == 2'b00 && instr[11:8] == 4'b0000)
            iclass = I_SWP;
          else
            iclass = I_UNDEF;
        end else if (instr[7] && instr[4]) begin
          // halfword / signed transfers; SH = 00 is covered above
          iclass = I_LDSTH;
        end else if (instr[24:23] == 2'b10 && !instr[20]) begin
          if (!instr[21] && instr[19:16] == 4'hF && instr[11:0] == 12'h000)
            iclass = I_MRS;
          else if (instr[21] && instr[15:12] == 4'hF && instr[11:4] == 8'h00)
            iclass = I_MSR;
          else
            iclass = I_UNDEF;
        end else
          iclass = I_DP;
      end
      3'b001: begin
        if (instr[24:23] == 2'b10 && !instr[20])
          iclass = instr[21] && instr[15:12] == 4'hF ? I_MSR : I_UNDEF;
        else
          iclass = I_DP;
      end
      3'b010:  iclass = I_LDST;
      3'b011:  iclass = instr[4] ? I_UNDEF : I_LDST;
      3'b100:  iclass = I_LDSTM;
      3'b101:  iclass = I_BR;
      default: iclass = I_UNDEF;
    endcase
  end
endmodule
