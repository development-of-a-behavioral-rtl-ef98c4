// arm_top: single-core ARM32 system in a Harvard arrangement (as in the
// reference paper): the core, an instruction memory on its own bus and a
// data memory on a separate data bus, with the interrupt request lines
// brought out. The instruction memory's write port is brought out as a
// program loader (prog_we / prog_addr / prog_data): the program, for
// example a compiled C routine, is written while rst_n is low and runs from
// address 0 when rst_n rises. All clocked parts use clk's rising edge and
// the synchronous active-low reset. Memory sizes and the data memory's
// address window are parameters; their defaults are this design's
// choices (the reference paper does not size the memories).
module arm_top #(
  parameter int          IMEM_WORDS = 16384,
  parameter int          DMEM_WORDS = 4096,
  parameter logic [31:0] DMEM_BASE  = 32'h2000_0000,
  parameter string       IMEM_INIT  = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        nirq,
  input  logic        nfiq,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data
);
  logic [31:0] i_addr, i_rdata;
  logic        d_en, d_we, d_err;
  logic [3:0]  d_be;
  logic [31:0] d_addr, d_wdata, d_rdata;

  arm_imem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .clk, .addr(i_addr), .rdata(i_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  arm_dmem #(.WORDS(DMEM_WORDS), .BASE(DMEM_BASE)) u_dmem (
    .clk, .en(d_en), .we(d_we), .be(d_be), .addr(d_addr),
    .wdata(d_wdata), .rdata(d_rdata), .err(d_err)
  );

  arm_core u_core (
    .clk, .rst_n,
    .i_addr, .i_rdata,
    .d_en, .d_we, .d_be, .d_addr, .d_wdata, .d_rdata, .d_err,
    .nirq, .nfiq
  );
endmodule
