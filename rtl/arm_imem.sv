// arm_imem: instruction memory of the Harvard system.
// WORDS 32-bit words, read combinationally at the word address addr[..:2]
// so that fetch, decode and execute fit in one clock cycle; addresses wrap
// modulo the memory size. A synchronous write port (we, waddr, wdata)
// lets a loader place a program before reset is released; INIT_FILE, when
// not empty, is read with $readmemh at time zero. Size, load port and
// initialisation are this design's choices: the reference paper names the block
// and its separate bus only.
module arm_imem #(
  parameter int    WORDS     = 16384,
  parameter string INIT_FILE = ""
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = 32'd0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign rdata = mem[addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end
endmodule
