// arm_dmem: data memory of the Harvard system.
// WORDS 32-bit words mapped at byte address BASE. A request (en) either
// writes the byte lanes selected by `be` (we = 1) or reads a whole word
// into `rdata`, which is valid in the clock cycle after the request
// (synchronous read; this is why a load takes two cycles). Byte lanes are
// little-endian. An access outside BASE .. BASE + 4*WORDS - 1 raises `err`
// combinationally in the request cycle, writes nothing and returns zero:
// the core treats it as a data abort. Size, base address, timing and the
// abort rule are this design's choices; the reference paper gives only the
// block's place beside the core and its separate data bus.
module arm_dmem #(
  parameter int          WORDS = 4096,
  parameter logic [31:0] BASE  = 32'h2000_0000
) (
  input  logic        clk,
  input  logic        en,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        err
);
  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [31:0] off;
  logic        hit;

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'd0;

  assign off = addr - BASE;
  assign hit = (off < 32'(WORDS * 4));
  assign err = en && !hit;

  always_ff @(posedge clk) begin
    if (en && hit) begin
      if (we) begin
        for (int b = 0; b < 4; b++)
          if (be[b]) mem[off[AW+1:2]][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[off[AW+1:2]];
      end
    end else if (en) begin
      rdata <= 32'd0;
    end
  end
endmodule
