// tb_arm_regfile: random test of the banked register file. A reference
// model keeps the registers as named banks (usr[0:14], fiq[8:14],
// irq/svc/abt/und[13:14]) and resolves which bank a mode sees with an
// explicit table. Random writes through both ports in random modes are
// followed by reads of all four ports in random modes; R15 must read zero
// and writes to it must be ignored; port 0 wins when both ports write
// the same register.
module tb_arm_regfile;
  import arm_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  rmode, wmode0, wmode1;
  logic [3:0]  ra, rb, rc, rd, wa0, wa1;
  logic [31:0] qa, qb, qc, qd, wd0, wd1;
  logic        we0, we1;
  int          checks = 0, failures = 0;

  arm_regfile dut (.*);
  always #5 clk = ~clk;

  logic [31:0] usr [15];
  logic [31:0] fiq [8:14];
  logic [31:0] bank13 [4], bank14 [4];   // irq, svc, abt, und

  logic [4:0] modes [7] = '{MODE_USR, MODE_FIQ, MODE_IRQ, MODE_SVC, MODE_ABT, MODE_UND, MODE_SYS};

  function automatic int bidx(logic [4:0] m);
    case (m) MODE_IRQ: return 0; MODE_SVC: return 1; MODE_ABT: return 2; MODE_UND: return 3; default: return -1; endcase
  endfunction

  function automatic logic [31:0] mread(logic [4:0] m, logic [3:0] r);
    if (r == 15) return 0;
    if (m == MODE_FIQ && r >= 8) return fiq[r];
    if (bidx(m) >= 0 && r == 13) return bank13[bidx(m)];
    if (bidx(m) >= 0 && r == 14) return bank14[bidx(m)];
    return usr[r];
  endfunction

  task automatic mwrite(logic [4:0] m, logic [3:0] r, logic [31:0] v);
    if (r == 15) return;
    if (m == MODE_FIQ && r >= 8) fiq[r] = v;
    else if (bidx(m) >= 0 && r == 13) bank13[bidx(m)] = v;
    else if (bidx(m) >= 0 && r == 14) bank14[bidx(m)] = v;
    else usr[r] = v;
  endtask

  task automatic cmp(string p, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL port %s mode %b: %h expected %h", p, rmode, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (usr[i]) usr[i] = 0;
    foreach (fiq[i]) fiq[i] = 0;
    foreach (bank13[i]) begin bank13[i] = 0; bank14[i] = 0; end
    we0 = 0; we1 = 0; rmode = MODE_USR; wmode0 = MODE_USR; wmode1 = MODE_USR;
    wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0; ra = 0; rb = 0; rc = 0; rd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we0 = 1'($urandom); we1 = 1'($urandom);
      wmode0 = modes[$urandom_range(0, 6)]; wmode1 = modes[$urandom_range(0, 6)];
      wa0 = 4'($urandom); wa1 = (i % 4 == 0) ? wa0 : 4'($urandom);
      if (i % 4 == 0) wmode1 = wmode0;
      wd0 = $urandom; wd1 = $urandom;
      @(negedge clk);
      if (we1) mwrite(wmode1, wa1, wd1);
      if (we0) mwrite(wmode0, wa0, wd0);
      we0 = 0; we1 = 0;
      rmode = modes[$urandom_range(0, 6)];
      ra = 4'($urandom); rb = 4'($urandom); rc = 4'($urandom); rd = 4'($urandom);
      #1;
      cmp("a", qa, mread(rmode, ra));
      cmp("b", qb, mread(rmode, rb));
      cmp("c", qc, mread(rmode, rc));
      cmp("d", qd, mread(rmode, rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
