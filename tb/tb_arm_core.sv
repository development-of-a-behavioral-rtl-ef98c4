// tb_arm_core: instruction-level test of the core with behavioural
// instruction and data memories (combinational instruction read, data read
// one cycle after the request, abort outside 0x20000000-0x200003ff).
//
// Part 1, random: the core loads r0-r12 from memory with one LDMIA, then
// runs NRAND random data-processing and multiply instructions (all
// opcodes, immediate and register operands, shifts by constant and by
// register, random S bit and condition). A reference model in this file,
// with its own shifter and 64-bit arithmetic, executes each instruction as
// the core fetches it; after every instruction all of r0-r12 and N, Z, C,
// V are compared.
// Part 2, directed: STMIB with writeback, LDMDA, STMDB, pre-indexed and
// post-indexed LDR with writeback, an unaligned LDR (rotated word), a
// register-offset LDR with a subtracted shifted index, STR of PC, SWPB,
// MRS/MSR of CPSR and SPSR, user-bank STM/LDM (^) from SVC mode and a
// conditional instruction that must not execute; results are checked in
// registers and memory. A last section sets CPSR.E and checks that
// STR, LDRB, LDRH, LDR and LDM see big-endian data, then clears it.
// Throughout, the number of cycles each instruction holds the PC is
// compared with the counts of the design: 1 for data processing, branch
// and store, 2 for load and swap, n+1 for STM and n+2 for LDM.
module tb_arm_core;
  import arm_pkg::*;
  localparam int NRAND = 3000;

  logic        clk = 0, rst_n = 0, nirq = 1, nfiq = 1;
  logic [31:0] i_addr, i_rdata, d_addr, d_wdata, d_rdata;
  logic        d_en, d_we, d_err;
  logic [3:0]  d_be;
  int          checks = 0, failures = 0;

  arm_core dut (.*);
  always #5 clk = ~clk;

  // ---------------- memories
  logic [31:0] imem [4096];
  logic [31:0] dmem [256];
  assign i_rdata = imem[i_addr[13:2]];
  assign d_err   = d_en && (d_addr[31:10] != 22'h080000);
  always @(posedge clk) if (d_en && !d_err) begin
    if (d_we) begin
      for (int b = 0; b < 4; b++) if (d_be[b]) dmem[d_addr[9:2]][8*b +: 8] <= d_wdata[8*b +: 8];
    end else d_rdata <= dmem[d_addr[9:2]];
  end

  task automatic put(logic [31:0] a, logic [31:0] w);
    imem[a[13:2]] = w;
  endtask

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- reference model
  logic [31:0] m [13];
  logic [3:0]  mf;   // N Z C V

  function automatic logic cond_ok(logic [3:0] c, logic [3:0] f);
    logic n, z, cy, v;
    {n, z, cy, v} = f;
    case (c)
      0: return z;   1: return !z;  2: return cy;  3: return !cy;
      4: return n;   5: return !n;  6: return v;   7: return !v;
      8: return cy & !z;  9: return !cy | z;  10: return n == v;  11: return n != v;
      12: return !z & (n == v);  13: return z | (n != v);  14: return 1;  default: return 0;
    endcase
  endfunction

  task automatic sh1(input logic [1:0] t, input int n, inout logic [31:0] r, inout logic c);
    for (int i = 0; i < n; i++)
      case (t)
        0: begin c = r[31]; r = {r[30:0], 1'b0}; end
        1: begin c = r[0];  r = {1'b0, r[31:1]}; end
        2: begin c = r[0];  r = {r[31], r[31:1]}; end
        default: begin c = r[0]; r = {r[0], r[31:1]}; end
      endcase
  endtask

  task automatic model_exec(logic [31:0] w);
    logic [31:0] op2, a, res; logic sc, c, v; longint us, ss; int n;
    if (!cond_ok(w[31:28], mf)) return;
    if (w[27:22] == 0 && w[7:4] == 4'b1001) begin
      res = m[w[3:0]] * m[w[11:8]] + (w[21] ? m[w[15:12]] : 0);
      m[w[19:16]] = res;
      if (w[20]) mf[3:2] = {res[31], res == 0};
      return;
    end
    sc = mf[1];
    if (w[25]) begin
      op2 = {24'd0, w[7:0]};
      sh1(2'd3, 2 * int'(w[11:8]), op2, sc);
      if (w[11:8] == 0) sc = mf[1];
    end else begin
      op2 = m[w[3:0]];
      if (w[4]) begin
        n = int'(m[w[11:8]][7:0]);
        if (w[6:5] == 3 && n != 0) begin sh1(2'd3, n % 32, op2, sc); if (n % 32 == 0) sc = op2[31]; end
        else sh1(w[6:5], n, op2, sc);
      end else begin
        n = int'(w[11:7]);
        if (n == 0 && w[6:5] == 3) begin sc = op2[0]; op2 = {mf[1], op2[31:1]}; end
        else if (n == 0 && w[6:5] != 0) sh1(w[6:5], 32, op2, sc);
        else sh1(w[6:5], n, op2, sc);
      end
    end
    a = m[w[19:16]];
    c = sc; v = mf[0];
    case (w[24:21])
      0, 8:  res = a & op2;
      1, 9:  res = a ^ op2;
      12:    res = a | op2;
      13:    res = op2;
      14:    res = a & ~op2;
      15:    res = ~op2;
      default: begin
        case (w[24:21])
          2, 10: begin us = longint'(a) - longint'(op2); ss = longint'($signed(a)) - longint'($signed(op2)); c = us >= 0; end
          3:     begin us = longint'(op2) - longint'(a); ss = longint'($signed(op2)) - longint'($signed(a)); c = us >= 0; end
          4, 11: begin us = longint'(a) + longint'(op2); ss = longint'($signed(a)) + longint'($signed(op2)); c = us > 64'hffffffff; end
          5:     begin us = longint'(a) + longint'(op2) + longint'(mf[1]); ss = longint'($signed(a)) + longint'($signed(op2)) + longint'(mf[1]); c = us > 64'hffffffff; end
          6:     begin us = longint'(a) - longint'(op2) - 1 + longint'(mf[1]); ss = longint'($signed(a)) - longint'($signed(op2)) - 1 + longint'(mf[1]); c = us >= 0; end
          default: begin us = longint'(op2) - longint'(a) - 1 + longint'(mf[1]); ss = longint'($signed(op2)) - longint'($signed(a)) - 1 + longint'(mf[1]); c = us >= 0; end
        endcase
        res = us[31:0];
        v = (ss > 64'sh7fffffff) || (ss < -64'sh80000000);
      end
    endcase
    if (!(w[24:21] inside {[8:11]})) m[w[15:12]] = res;
    if (w[20]) mf = {res[31], res == 0, c, v};
  endtask

  function automatic logic [31:0] rand_instr();
    logic [31:0] w;
    logic [3:0]  c;
    c = ($urandom_range(0, 2) == 0) ? 4'($urandom_range(0, 13)) : 4'hE;
    if ($urandom_range(0, 5) == 0) begin
      w = {c, 6'b000000, 1'($urandom), 1'($urandom), 4'($urandom_range(0, 12)),
           4'($urandom_range(0, 12)), 4'($urandom_range(0, 12)), 4'b1001, 4'($urandom_range(0, 12))};
    end else begin
      logic [3:0] op;
      op = 4'($urandom);
      w = {c, 2'b00, 1'($urandom), op, 1'($urandom), 4'($urandom_range(0, 12)),
           4'($urandom_range(0, 12)), 12'($urandom)};
      if (op inside {[8:11]}) w[20] = 1'b1;
      if (!w[25]) begin
        w[3:0] = 4'($urandom_range(0, 12));
        if (w[4]) begin w[7] = 1'b0; w[11:8] = 4'($urandom_range(0, 12)); end
      end
    end
    return w;
  endfunction

  // ---------------- per-instruction checks
  localparam logic [31:0] RAND_START = 32'h8;
  localparam logic [31:0] RAND_END   = RAND_START + 4 * NRAND;
  logic        cmp_pending = 0;
  logic [31:0] pc_q = '1, instr_q;
  int          hold = 0, exp_hold = 0, n_timed = 0, n_cond_fail = 0;

  function automatic int cycles_of(logic [31:0] w);
    if (!cond_ok(w[31:28], dut.cpsr[31:28])) return 1;
    if (w[27:25] == 3'b100) return w[20] ? $countones(w[15:0]) + 2 : $countones(w[15:0]) + 1;
    if (w[27:26] == 2'b01) return w[20] ? 2 : 1;
    if (w[27:23] == 5'b00010 && w[21:20] == 0 && w[7:4] == 4'b1001) return 2;
    if (w[27:25] == 3'b000 && w[7] && w[4] && w[6:5] != 0) return w[20] ? 2 : 1;
    return 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.pc >= RAND_START && dut.pc < RAND_END && int'(dut.state) == 0) begin
      model_exec(i_rdata);
      cmp_pending <= 1'b1;
    end else cmp_pending <= 1'b0;
    if (int'(dut.state) == 0 && !dut.cond_ok) n_cond_fail++;
    if (dut.pc != pc_q) begin
      if (hold != 0) begin
        checks++; n_timed++;
        if (hold != exp_hold) begin
          failures++;
          $display("FAIL %h at %h held PC %0d cycles, expected %0d", instr_q, pc_q, hold, exp_hold);
        end
      end
      pc_q <= dut.pc; instr_q <= i_rdata; exp_hold <= cycles_of(i_rdata); hold <= 1;
    end else hold <= hold + 1;
  end

  always @(negedge clk) if (cmp_pending) begin
    for (int r = 0; r < 13; r++) chk($sformatf("r%0d after %h", r, instr_q), dut.u_rf.regs[r], m[r]);
    chk($sformatf("nzcv after %h", instr_q), {28'd0, dut.cpsr[31:28]}, {28'd0, mf});
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (imem[i]) imem[i] = 32'he1a00000;   // mov r0, r0
    foreach (dmem[i]) dmem[i] = (i % 3 == 0) ? 32'($urandom_range(0, 40)) : $urandom;
    for (int r = 0; r < 13; r++) m[r] = dmem[r];
    mf = 4'b0000;
    put(32'h0, 32'he3a0d202);                  // mov sp, #0x20000000
    put(32'h4, 32'he89d1fff);                  // ldmia sp, {r0-r12}
    for (int i = 0; i < NRAND; i++) put(RAND_START + 4 * i, rand_instr());
    put(RAND_END, 32'hea000000 | ((32'h3000 - RAND_END - 8) >> 2));  // b 0x3000
    put(32'h3000, 32'he3a0d202);  // mov sp, #0x20000000
    put(32'h3004, 32'he28ddc01);  // add sp, sp, #0x100
    put(32'h3008, 32'he3a00001);  // mov r0, #1
    put(32'h300c, 32'he3a01002);  // mov r1, #2
    put(32'h3010, 32'he3a02003);  // mov r2, #3
    put(32'h3014, 32'he9ad0007);  // stmib sp!, {r0-r2}
    put(32'h3018, 32'he81d0070);  // ldmda sp, {r4-r6}
    put(32'h301c, 32'he90d0005);  // stmdb sp, {r0, r2}
    put(32'h3020, 32'he53d7004);  // ldr r7, [sp, #-4]!
    put(32'h3024, 32'he49d8004);  // ldr r8, [sp], #4
    put(32'h3028, 32'he51d9007);  // ldr r9, [sp, #-7]
    put(32'h302c, 32'he3a0a002);  // mov r10, #2
    put(32'h3030, 32'he71db10a);  // ldr r11, [sp, -r10, lsl #2]
    put(32'h3034, 32'he58df000);  // str pc, [sp]
    put(32'h3038, 32'he14dc090);  // swpb r12, r0, [sp]
    put(32'h303c, 32'he10f0000);  // mrs r0, cpsr
    put(32'h3040, 32'he3a0101f);  // mov r1, #0x1f
    put(32'h3044, 32'he16ff001);  // msr spsr_fsxc, r1
    put(32'h3048, 32'he14f2000);  // mrs r2, spsr
    put(32'h304c, 32'he321f0df);  // msr cpsr_c, #0xdf
    put(32'h3050, 32'he3a0d044);  // mov sp, #0x44          @ user/system sp
    put(32'h3054, 32'he321f0d3);  // msr cpsr_c, #0xd3
    put(32'h3058, 32'he8cd2000);  // stmia sp, {sp}^        @ stores the user sp
    put(32'h305c, 32'he59d3000);  // ldr r3, [sp]
    put(32'h3060, 32'he8dd4000);  // ldmia sp, {lr}^        @ loads the user lr
    put(32'h3064, 32'he3a0e077);  // mov lr, #0x77          @ svc lr
    put(32'h3068, 32'he35e0077);  // cmp lr, #0x77
    put(32'h306c, 32'h13a05009);  // movne r5, #9          @ not executed
    put(32'h3070, 32'he3a0a412);  // mov r10, #0x12000000
    put(32'h3074, 32'he38aa70d);  // orr r10, r10, #0x340000
    put(32'h3078, 32'he38aac56);  // orr r10, r10, #0x5600
    put(32'h307c, 32'he38aa078);  // orr r10, r10, #0x78
    put(32'h3080, 32'he322fc02);  // msr cpsr_x, #0x200       @ E = 1: big-endian data
    put(32'h3084, 32'he58da004);  // str r10, [sp, #4]
    put(32'h3088, 32'he5dd1004);  // ldrb r1, [sp, #4]
    put(32'h308c, 32'he1dd20b6);  // ldrh r2, [sp, #6]
    put(32'h3090, 32'he59d3004);  // ldr r3, [sp, #4]
    put(32'h3094, 32'he99d0040);  // ldmib sp, {r6}
    put(32'h3098, 32'he322f000);  // msr cpsr_x, #0           @ E = 0: little-endian
    put(32'h309c, 32'he59d4004);  // ldr r4, [sp, #4]
    put(32'h30a0, 32'heafffffe);  // done: b done
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (dut.pc == 32'h3070);
    @(negedge clk);
    chk("r0 = cpsr", dut.u_rf.regs[0], {mf, 28'h00000D3});
    chk("r1", dut.u_rf.regs[1], 32'h1f);
    chk("r2 = spsr", dut.u_rf.regs[2], 32'h1f);
    chk("r3 user sp via stm^", dut.u_rf.regs[3], 32'h44);
    chk("r4 ldmda", dut.u_rf.regs[4], 32'd1);
    chk("r5 ldmda / movne skipped", dut.u_rf.regs[5], 32'd2);
    chk("r6 ldmda", dut.u_rf.regs[6], 32'd3);
    chk("r7 pre-index", dut.u_rf.regs[7], 32'd3);
    chk("r8 post-index", dut.u_rf.regs[8], 32'd3);
    chk("r9 unaligned", dut.u_rf.regs[9], 32'h0100_0000);
    chk("r10", dut.u_rf.regs[10], 32'd2);
    chk("r11 reg offset", dut.u_rf.regs[11], 32'd1);
    chk("r12 swpb", dut.u_rf.regs[12], 32'h3c);
    chk("user sp", dut.u_rf.regs[13], 32'h44);
    chk("user lr via ldm^", dut.u_rf.regs[14], 32'h44);
    chk("svc sp writebacks", dut.u_rf.regs[24], 32'h2000_010c);
    chk("svc lr", dut.u_rf.regs[25], 32'h77);
    chk("mem 0x104", dmem[8'h41], 32'd1);
    chk("mem 0x108 stmdb", dmem[8'h42], 32'd3);
    chk("mem 0x10c", dmem[8'h43], 32'h44);
    // big-endian section
    wait (dut.pc == 32'h30a0);
    repeat (3) @(negedge clk);
    chk("mem 0x110 written big-endian", dmem[8'h44], 32'h7856_3412);
    chk("ldrb, E=1", dut.u_rf.regs[1], 32'h12);
    chk("ldrh, E=1", dut.u_rf.regs[2], 32'h5678);
    chk("ldr, E=1", dut.u_rf.regs[3], 32'h1234_5678);
    chk("ldm, E=1", dut.u_rf.regs[6], 32'h1234_5678);
    chk("ldr, E=0", dut.u_rf.regs[4], 32'h7856_3412);
    chk("E cleared", {31'd0, dut.cpsr[9]}, 32'd0);
    checks++;
    if (n_cond_fail == 0) begin failures++; $display("FAIL no failed condition seen"); end
    $display("random instructions %0d, timed instructions %0d, failed conditions %0d", NRAND, n_timed, n_cond_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
