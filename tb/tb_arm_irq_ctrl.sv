// tb_arm_irq_ctrl: test of the interrupt controller. Checks that a request
// is taken exactly SYNC (2) clock edges after the line falls, only at an
// instruction boundary, not while masked by I or F, that FIQ wins over IRQ,
// and that mode and vector match the request (IRQ 0x18 / 10010, FIQ 0x1C /
// 10001).
module tb_arm_irq_ctrl;
  import arm_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        nirq = 1, nfiq = 1, i_mask = 0, f_mask = 0, boundary = 1;
  logic        take;
  logic [4:0]  mode;
  logic [31:0] vector;
  int          checks = 0, failures = 0;

  arm_irq_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b expected %b", what, got, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle", take, 0);
    // IRQ latency: two edges
    nirq = 0;
    #1 chk("irq not yet (0 edges)", take, 0);
    @(negedge clk); chk("irq not yet (1 edge)", take, 0);
    @(negedge clk); chk("irq taken (2 edges)", take, 1);
    checks++;
    if (mode !== MODE_IRQ || vector !== VEC_IRQ) begin failures++; $display("FAIL irq mode/vector"); end
    boundary = 0; #1 chk("no take off boundary", take, 0);
    boundary = 1; i_mask = 1; #1 chk("irq masked", take, 0);
    // FIQ while IRQ masked
    nfiq = 0;
    @(negedge clk); @(negedge clk); chk("fiq taken", take, 1);
    checks++;
    if (mode !== MODE_FIQ || vector !== VEC_FIQ) begin failures++; $display("FAIL fiq mode/vector"); end
    // Both unmasked: FIQ first
    i_mask = 0; #1;
    checks++;
    if (mode !== MODE_FIQ) begin failures++; $display("FAIL fiq priority"); end
    f_mask = 1; #1;
    chk("irq when fiq masked", take, 1);
    checks++;
    if (mode !== MODE_IRQ) begin failures++; $display("FAIL irq behind masked fiq"); end
    i_mask = 1; #1 chk("both masked", take, 0);
    // Release lines: request gone after two edges
    i_mask = 0; f_mask = 0; nirq = 1; nfiq = 1;
    @(negedge clk); chk("still synchronised", take, 1);
    @(negedge clk); chk("released", take, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
