// arm_regfile: the banked general-purpose registers R0-R14.
// The ARM programmer's model gives each processor mode a view of sixteen
// registers. R0-R7 are shared by all modes; FIQ mode has its own R8-R14;
// IRQ, SVC, ABT and UND modes each have their own R13 (stack pointer) and
// R14 (link register); USR and SYS share the user registers. That is 30
// physical registers here; with the program counter R15, which lives in
// arm_pc, it makes the 31 registers of the architecture.
// Four combinational read ports (a, b, c, d) see the registers through the
// bank of `rmode`. Two write ports, each with its own mode so an exception
// can write the link register of the mode it enters, write on the rising
// clock edge; when both address the same register, port 0 wins. Index 15
// reads as zero: the core substitutes the program counter. Synchronous
// active-low reset clears every register. The banking follows the
// reference paper; the port count and the reset value are this design's choices.
module arm_regfile
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  rmode,
  input  logic [3:0]  ra, rb, rc, rd,
  output logic [31:0] qa, qb, qc, qd,
  input  logic        we0,
  input  logic [4:0]  wmode0,
  input  logic [3:0]  wa0,
  input  logic [31:0] wd0,
  input  logic        we1,
  input  logic [4:0]  wmode1,
  input  logic [3:0]  wa1,
  input  logic [31:0] wd1
);
  localparam int NPHYS = 30;

  logic [31:0] regs [NPHYS];

  // Physical index of architectural register r in mode m.
  // 0-14: user R0-R14, 15-21: FIQ R8-R14, 22/23: IRQ R13/R14,
  // 24/25: SVC, 26/27: ABT, 28/29: UND.
  function automatic int phys(logic [4:0] m, logic [3:0] r);
    if (r < 4'd8) return int'(r);
    if (m == MODE_FIQ) return 15 + int'(r) - 8;
    if (r < 4'd13) return int'(r);
    case (m)
      MODE_IRQ: return 22 + int'(r) - 13;
      MODE_SVC: return 24 + int'(r) - 13;
      MODE_ABT: return 26 + int'(r) - 13;
      MODE_UND: return 28 + int'(r) - 13;
      default:  return int'(r);
    endcase
  endfunction

  function automatic logic [31:0] rd_port(logic [4:0] m, logic [3:0] r);
    if (r == 4'd15) return 32'd0;
    return regs[phys(m, r)];
  endfunction

  assign qa = rd_port(rmode, ra);
  assign qb = rd_port(rmode, rb);
  assign qc = rd_port(rmode, rc);
  assign qd = rd_port(rmode, rd);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPHYS; i++) regs[i] <= '0;
    end else begin
      if (we1 && wa1 != 4'd15) regs[phys(wmode1, wa1)] <= wd1;
      if (we0 && wa0 != 4'd15) regs[phys(wmode0, wa0)] <= wd0;
    end
  end
endmodule
