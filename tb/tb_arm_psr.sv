// tb_arm_psr: directed test of the status registers: reset value (SVC,
// I and F set); MSR control-field mode changes through every mode; flag
// updates; MSR to the flag field only; reserved and T bits ignored; an
// invalid mode value ignored; USR mode unable to change its control field;
// exception entry saving CPSR in the SPSR of the new mode and masking
// IRQ (and FIQ for FIQ entry); MSR to SPSR; and exception return copying
// the SPSR back. Expected values are written out by hand.
module tb_arm_psr;
  import arm_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        flags_we = 0, msr_we = 0, msr_spsr = 0, exc_enter = 0, restore = 0;
  logic [3:0]  nzcv = 0, msr_mask = 0;
  logic [31:0] msr_val = 0, cpsr, spsr;
  logic [4:0]  exc_mode = 0;
  int          checks = 0, failures = 0;

  arm_psr dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic step();
    @(negedge clk);
    flags_we = 0; msr_we = 0; exc_enter = 0; restore = 0; msr_spsr = 0;
  endtask

  task automatic msr(logic spsr_sel, logic [3:0] mask, logic [31:0] v);
    msr_we = 1; msr_spsr = spsr_sel; msr_mask = mask; msr_val = v; step();
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("reset", cpsr, 32'h0000_00d3);
    chk("svc spsr after reset", spsr, 0);
    // visit every privileged mode, then SYS
    msr(0, 4'b0001, 32'hD7); chk("abt", cpsr, 32'hD7);
    msr(0, 4'b0001, 32'hDB); chk("und", cpsr, 32'hDB);
    msr(0, 4'b0001, 32'hD2); chk("irq", cpsr, 32'hD2);
    msr(0, 4'b0001, 32'hD1); chk("fiq", cpsr, 32'hD1);
    msr(0, 4'b0001, 32'hFF); chk("sys, T ignored", cpsr, 32'hDF);
    msr(0, 4'b0001, 32'h15); chk("invalid mode ignored, I/F cleared", cpsr, 32'h1F);
    flags_we = 1; nzcv = 4'b1010; step(); chk("flags", cpsr, 32'hA000_001F);
    msr(0, 4'b1000, 32'h5123_45D3); chk("flag field only, J ignored", cpsr, 32'h5000_001F);
    msr(0, 4'b1111, 32'h0FFF_FE10); chk("all fields, reserved ignored", cpsr, 32'h080F_0210);
    msr(0, 4'b0001, 32'h10); chk("to usr", cpsr, 32'h080F_0210);
    msr(0, 4'b1001, 32'h6000_00D3); chk("usr: only flags change", cpsr, 32'h600F_0210);
    // IRQ entry from USR
    exc_enter = 1; exc_mode = MODE_IRQ; step();
    chk("irq entry cpsr", cpsr, 32'h600F_0292);
    chk("irq spsr", spsr, 32'h600F_0210);
    flags_we = 1; nzcv = 4'b0001; step();
    // FIQ entry from IRQ
    exc_enter = 1; exc_mode = MODE_FIQ; step();
    chk("fiq entry cpsr", cpsr, 32'h100F_02D1);
    chk("fiq spsr", spsr, 32'h100F_0292);
    msr(1, 4'b1000, 32'hF000_0000); chk("msr spsr_f", spsr, 32'hF00F_0292);
    chk("cpsr untouched by msr spsr", cpsr, 32'h100F_02D1);
    restore = 1; step(); chk("return to irq", cpsr, 32'hF00F_0292);
    chk("irq spsr kept", spsr, 32'h600F_0210);
    restore = 1; step(); chk("return to usr", cpsr, 32'h600F_0210);
    chk("usr has no spsr", spsr, 0);
    restore = 1; step(); chk("restore in usr ignored", cpsr, 32'h600F_0210);
    // Undefined and abort entries and priority of entry over flags
    exc_enter = 1; exc_mode = MODE_UND; flags_we = 1; nzcv = 4'b1111; step();
    chk("und entry wins over flags", cpsr, 32'h600F_029B);
    exc_enter = 1; exc_mode = MODE_ABT; step();
    chk("abt entry", cpsr, 32'h600F_0297);
    chk("abt spsr", spsr, 32'h600F_029B);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
