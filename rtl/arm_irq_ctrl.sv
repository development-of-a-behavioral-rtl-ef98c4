// arm_irq_ctrl: the interrupt controller of the core.
// The active-low interrupt request lines nirq and nfiq are level
// sensitive and pass through a SYNC-stage synchroniser. At an instruction
// boundary (`boundary` high, the core about to fetch) a pending request
// that the CPSR does not mask (F bit for FIQ, I bit for IRQ) is taken:
// `take` rises for that cycle with the mode to enter and the vector to
// jump to. FIQ has priority over IRQ. The reference paper gives the function
// (test for an interrupt at fetch, switch to FIQ or IRQ mode); the
// synchroniser, the priority and the vector addresses are the ARM
// architecture's conventions chosen here.
module arm_irq_ctrl
  import arm_pkg::*;
#(
  parameter int SYNC = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        nirq,
  input  logic        nfiq,
  input  logic        i_mask,
  input  logic        f_mask,
  input  logic        boundary,
  output logic        take,
  output logic [4:0]  mode,
  output logic [31:0] vector
);
  logic [SYNC-1:0] irq_s, fiq_s;
  logic irq_req, fiq_req;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      irq_s <= '0;
      fiq_s <= '0;
    end else begin
      irq_s <= {irq_s[SYNC-2:0], !nirq};
      fiq_s <= {fiq_s[SYNC-2:0], !nfiq};
    end
  end

  assign irq_req = irq_s[SYNC-1] && !i_mask;
  assign fiq_req = fiq_s[SYNC-1] && !f_mask;

  always_comb begin
    take   = boundary && (irq_req || fiq_req);
    mode   = fiq_req ? MODE_FIQ : MODE_IRQ;
    vector = fiq_req ? VEC_FIQ  : VEC_IRQ;
  end
endmodule
