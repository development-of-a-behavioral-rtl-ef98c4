// arm_psr: the current program status register (CPSR) and the five saved
// program status registers (SPSR) of FIQ, IRQ, SVC, ABT and UND modes.
// Layout (bit 31 down): N Z C V Q, GE[19:16], E[9], A[8], I[7], F[6],
// T[5], M[4:0]. Only those bits are stored; writes to reserved bits, and to
// T and J (no Thumb or Jazelle state), are ignored.
// Updates, in order of priority, on the rising clock edge:
//   exc_enter  : SPSR of exc_mode <= CPSR; CPSR.M <= exc_mode; I <= 1;
//                F <= 1 when entering FIQ (the "save context" step);
//   restore    : CPSR <= SPSR of the current mode (exception return);
//   msr_we     : MSR write of the fields selected by msr_mask
//                (bit0 control [7:0], bit1 extension [15:8], bit2 status
//                [23:16], bit3 flags [31:24]) into CPSR, or into the
//                current SPSR when msr_spsr = 1; in USR mode only the flag
//                field of CPSR can change; a mode value that is not one of
//                the seven modes leaves M unchanged;
//   flags_we   : CPSR[31:28] <= nzcv.
// Reset puts the core in SVC mode with IRQ and FIQ masked. `spsr` reads the
// SPSR of the current mode (zero in USR and SYS). Mode encodings and the
// register layout follow the reference paper; the priority order and the reset
// value follow the ARM architecture.
module arm_psr
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flags_we,
  input  logic [3:0]  nzcv,
  input  logic        msr_we,
  input  logic        msr_spsr,
  input  logic [3:0]  msr_mask,
  input  logic [31:0] msr_val,
  input  logic        exc_enter,
  input  logic [4:0]  exc_mode,
  input  logic        restore,
  output logic [31:0] cpsr,
  output logic [31:0] spsr
);
  localparam logic [31:0] CPSR_RESET = 32'h0000_00D3;

  logic [31:0] spsr_bank [1:5];
  logic [2:0]  cur;
  logic [31:0] field_mask, new_val;

  function automatic logic valid_mode(logic [4:0] m);
    return m inside {MODE_USR, MODE_FIQ, MODE_IRQ, MODE_SVC, MODE_ABT, MODE_UND, MODE_SYS};
  endfunction

  assign cur  = spsr_index(cpsr[4:0]);
  assign spsr = (cur != 3'd0) ? spsr_bank[cur] : 32'd0;

  always_comb begin
    field_mask = {{8{msr_mask[3]}}, {8{msr_mask[2]}}, {8{msr_mask[1]}}, {8{msr_mask[0]}}} & PSR_KEEP;
    if (!msr_spsr && cpsr[4:0] == MODE_USR) field_mask &= 32'hFF00_0000;
    if (!msr_spsr && !valid_mode(msr_val[4:0])) field_mask &= ~32'h0000_001F;
    new_val = ((msr_spsr ? spsr : cpsr) & ~field_mask) | (msr_val & field_mask);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cpsr <= CPSR_RESET;
      for (int i = 1; i <= 5; i++) spsr_bank[i] <= '0;
    end else if (exc_enter) begin
      if (has_spsr(exc_mode)) spsr_bank[spsr_index(exc_mode)] <= cpsr;
      cpsr[4:0]   <= exc_mode;
      cpsr[PSR_I] <= 1'b1;
      if (exc_mode == MODE_FIQ) cpsr[PSR_F] <= 1'b1;
    end else if (restore) begin
      if (cur != 3'd0) cpsr <= spsr_bank[cur] & PSR_KEEP;
    end else if (msr_we) begin
      if (!msr_spsr) cpsr <= new_val;
      else if (cur != 3'd0) spsr_bank[cur] <= new_val;
    end else if (flags_we) begin
      cpsr[31:28] <= nzcv;
    end
  end
endmodule
