// arm_pc: the program counter R15 with its "+4" incrementer and next-PC
// multiplexer (the reference paper's datapath: PC, +4 and a mux controlled by nhold).
// On each rising clock edge the PC keeps its value while nhold is low
// (a multi-cycle instruction is still running), loads `target` when `load`
// is high (branch, write to R15, exception vector) and otherwise steps to
// the next word, pc + 4. `pc_plus4` is the incrementer output, used as the
// return address of branch-and-link. Synchronous active-low reset to
// RESET_PC. Reset value and the priority of hold over load are this
// design's choices.
module arm_pc #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        nhold,
  input  logic        load,
  input  logic [31:0] target,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);
  assign pc_plus4 = pc + 32'd4;

  always_ff @(posedge clk) begin
    if (!rst_n)      pc <= RESET_PC;
    else if (!nhold) pc <= pc;
    else if (load)   pc <= {target[31:2], 2'b00};
    else             pc <= pc_plus4;
  end
endmodule
