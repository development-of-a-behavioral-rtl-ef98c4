// tb_arm_top: end-to-end test of the single-core system at its default
// sizes. The program is written through the instruction-memory loader port
// while reset is held. It
//   * sets the stack pointer of every mode in the order SVC, ABT, UND,
//     IRQ, FIQ, then SYS/USR (the same values as the reference start-up
//     sequence: 0x200000ac, 0x20000044, 0x20000078, 0x20000270,
//     0x200000e0, 0x200003f8), switching modes with MSR;
//   * calls a recursive factorial routine with argument 5; its machine code
//     is the output of a standard ARM C compiler for
//       int factorial(int a) { if (a <= 1) return 1; else return a * factorial(a - 1); }
//     and it uses push/pop (STMDB/LDMIA with writeback, LDM loading PC),
//     STR/LDR with negative offsets, CMP, BGT, BL and MUL;
//   * tests SWP, STRB/LDRB/LDRSB and STRH/LDRH/LDRSH;
//   * spins until an IRQ and then an FIQ (driven by this testbench) have
//     each incremented r0; the FIQ handler also counts in its banked r8;
//   * executes an undefined instruction and a load outside the data memory
//     (data abort); the handlers add 1 and 0x10 to r2 and return.
// Checks: after every MUL in the factorial the values of r2, r3, fp and sp
// (the 5! trace: r3 = 2, 6, 24, 120 with fp/sp descending by 12 bytes per
// frame from 0x200003f4/0x200003ec); sp back at 0x200003f8 after the final
// pop; every register result; the banked stack pointers; the number of
// cycles each executed instruction holds the PC (1 for data processing,
// branch and store, 2 for load and swap, n+1 for STM and n+2 for LDM of n
// registers); and that each mechanism occurred at least once.
module tb_arm_top;
  import arm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        nirq = 1'b1, nfiq = 1'b1;
  logic        prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_data = '0;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  arm_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic put(logic [31:0] a, logic [31:0] w);
    @(negedge clk);
    prog_we = 1'b1; prog_addr = a; prog_data = w;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  // Physical register of user/system register r (0-14) and banked ones
  function automatic logic [31:0] ureg(int r);
    return dut.u_core.u_rf.regs[r];
  endfunction

  // ---------------------------------------------------------------
  // Instruction timing and mechanism counters
  logic [31:0] pc_q;
  logic [31:0] instr_q;
  int          hold_cycles;
  logic        exc_seen;
  int          n_cond_fail = 0, n_branch = 0, n_bl = 0, n_load = 0, n_store = 0,
               n_swap = 0, n_ldm = 0, n_stm = 0, n_ldm_pc = 0, n_mul = 0, n_msr = 0,
               n_mrs_free = 0, n_half = 0, n_byte = 0, n_irq = 0, n_fiq = 0,
               n_und = 0, n_abt = 0, n_restore = 0, n_timed = 0;
  int          mul_seen = 0;
  logic [31:0] exp_r3 [4] = '{32'd2, 32'd6, 32'd24, 32'd120};

  function automatic int expected_cycles(logic [31:0] w, logic cond_ok);
    iclass_e c;
    if (!cond_ok) return 1;
    c = dut.u_core.iclass;
    case (c)
      I_LDST, I_LDSTH: return w[20] ? 2 : 1;
      I_SWP:           return 2;
      I_LDSTM:         return w[20] ? $countones(w[15:0]) + 2 : $countones(w[15:0]) + 1;
      default:         return 1;
    endcase
  endfunction

  int exp_cycles;

  always @(posedge clk) if (rst_n) begin
    // mechanism counters, sampled in the cycle they happen
    if (int'(dut.u_core.state) == 0) begin
      if (dut.u_core.irq_take) begin
        if (dut.u_core.irq_mode == MODE_FIQ) n_fiq++; else n_irq++;
      end else if (!dut.u_core.cond_ok) n_cond_fail++;
      else begin
        case (dut.u_core.iclass)
          I_BR:    begin n_branch++; if (dut.u_core.instr[24]) n_bl++; end
          I_LDST:  begin if (dut.u_core.instr[20]) n_load++; else n_store++;
                         if (dut.u_core.instr[22]) n_byte++; end
          I_LDSTH: n_half++;
          I_SWP:   n_swap++;
          I_LDSTM: begin if (dut.u_core.instr[20]) n_ldm++; else n_stm++;
                         if (dut.u_core.instr[20] && dut.u_core.instr[15]) n_ldm_pc++; end
          I_MUL:   n_mul++;
          I_MSR:   n_msr++;
          default: ;
        endcase
      end
    end
    if (dut.u_core.exc_enter && dut.u_core.exc_mode == MODE_UND) n_und++;
    if (dut.u_core.exc_enter && dut.u_core.exc_mode == MODE_ABT) n_abt++;
    if (dut.u_core.psr_restore) n_restore++;

    // cycles per instruction: count the cycles one PC value is held
    if (dut.u_core.exc_enter) exc_seen <= 1'b1;
    if (dut.u_core.pc != pc_q || hold_cycles == 0) begin
      if (hold_cycles != 0 && !exc_seen) begin
        checks++; n_timed++;
        if (hold_cycles != exp_cycles) begin
          failures++;
          $display("FAIL cycles of %h at %h: %0d, expected %0d", instr_q, pc_q, hold_cycles, exp_cycles);
        end
      end
      pc_q        <= dut.u_core.pc;
      instr_q     <= dut.u_core.instr;
      exp_cycles  <= expected_cycles(dut.u_core.instr, dut.u_core.cond_ok);
      hold_cycles <= 1;
      exc_seen    <= dut.u_core.exc_enter;
    end else begin
      hold_cycles <= hold_cycles + 1;
    end
  end

  // The 5! trace: state right after each MUL of the factorial
  always @(posedge clk) if (rst_n && dut.u_core.pc == 32'h8040 && pc_q == 32'h803c && mul_seen < 4) begin
    check("r3 after mul", ureg(3), exp_r3[mul_seen]);
    check("r2 after mul", ureg(2), 32'(mul_seen + 2));
    check("fp after mul", ureg(11), 32'h200003d0 + 32'(12 * mul_seen));
    check("sp after mul", ureg(13), 32'h200003c8 + 32'(12 * mul_seen));
    mul_seen++;
  end

  // Interrupt stimulus: IRQ while the program waits, then FIQ
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.pc == 32'h00d8 && nirq && nfiq && ureg(0) == 0) nirq <= 1'b0;
    if (dut.u_core.irq_take && dut.u_core.irq_mode == MODE_IRQ) begin
      nirq <= 1'b1;
      nfiq <= 1'b0;
    end
    if (dut.u_core.irq_take && dut.u_core.irq_mode == MODE_FIQ) nfiq <= 1'b1;
  end

  // Watchdog (the main sequence gives up on its own after 20000 cycles and
  // still runs its final checks; this one only guards against a stuck run)
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("  %-28s %0d", what, n);
  endtask

  initial begin
    hold_cycles = 0;
    pc_q = '1;
    exc_seen = 1'b0;
    put(32'h0000, 32'hea00000e);  // b   reset
    put(32'h0004, 32'hea00007d);  // b   und_handler
    put(32'h0008, 32'heafffffe);  // b   .
    put(32'h000c, 32'heafffffe);  // b   .
    put(32'h0010, 32'hea00007e);  // b   abt_handler
    put(32'h0014, 32'heafffffe);  // b   .
    put(32'h0018, 32'hea000080);  // b   irq_handler
    put(32'h001c, 32'he2888001);  // add r8, r8, #1      @ FIQ-banked r8
    put(32'h0020, 32'he2800001);  // add r0, r0, #1
    put(32'h0024, 32'he25ef004);  // subs pc, lr, #4
    put(32'h0040, 32'he321f0d3);  // msr cpsr_c, #0xd3   @ svc mode
    put(32'h0044, 32'he3a0d202);  // mov sp, #0x20000000
    put(32'h0048, 32'he28dd0ac);  // add sp, sp, #0xac
    put(32'h004c, 32'he321f0d7);  // msr cpsr_c, #0xd7   @ abt mode
    put(32'h0050, 32'he3a0d202);  // mov sp, #0x20000000
    put(32'h0054, 32'he28dd044);  // add sp, sp, #0x44
    put(32'h0058, 32'he321f0db);  // msr cpsr_c, #0xdb   @ und mode
    put(32'h005c, 32'he3a0d202);  // mov sp, #0x20000000
    put(32'h0060, 32'he28dd078);  // add sp, sp, #0x78
    put(32'h0064, 32'he321f0d2);  // msr cpsr_c, #0xd2   @ irq mode
    put(32'h0068, 32'he3a0d202);  // mov sp, #0x20000000
    put(32'h006c, 32'he28dde27);  // add sp, sp, #0x270
    put(32'h0070, 32'he321f0d1);  // msr cpsr_c, #0xd1   @ fiq mode
    put(32'h0074, 32'he3a0d202);  // mov sp, #0x20000000
    put(32'h0078, 32'he28dd0e0);  // add sp, sp, #0xe0
    put(32'h007c, 32'he321f01f);  // msr cpsr_c, #0x1f   @ sys mode, interrupts enabled
    put(32'h0080, 32'he3a0d202);  // mov sp, #0x20000000
    put(32'h0084, 32'he28ddffe);  // add sp, sp, #0x3f8
    put(32'h0088, 32'he28db004);  // add fp, sp, #4      @ caller's frame pointer
    put(32'h008c, 32'he3a00005);  // mov r0, #5
    put(32'h0090, 32'heb001fda);  // bl  factorial
    put(32'h0094, 32'he1a04000);  // mov r4, r0
    put(32'h0098, 32'he3a01202);  // mov r1, #0x20000000
    put(32'h009c, 32'he2811b02);  // add r1, r1, #0x800
    put(32'h00a0, 32'he3a02055);  // mov r2, #0x55
    put(32'h00a4, 32'he5812000);  // str r2, [r1]
    put(32'h00a8, 32'he3a030aa);  // mov r3, #0xaa
    put(32'h00ac, 32'he1015093);  // swp r5, r3, [r1]
    put(32'h00b0, 32'he5916000);  // ldr r6, [r1]
    put(32'h00b4, 32'he5c13005);  // strb r3, [r1, #5]
    put(32'h00b8, 32'he5d17005);  // ldrb r7, [r1, #5]
    put(32'h00bc, 32'he1d180d5);  // ldrsb r8, [r1, #5]
    put(32'h00c0, 32'he3a09902);  // mov r9, #0x8000
    put(32'h00c4, 32'he1c190b6);  // strh r9, [r1, #6]
    put(32'h00c8, 32'he1d1a0f6);  // ldrsh r10, [r1, #6]
    put(32'h00cc, 32'he1d1c0b6);  // ldrh r12, [r1, #6]
    put(32'h00d0, 32'he3a00000);  // mov r0, #0
    put(32'h00d4, 32'he3a02000);  // mov r2, #0
    put(32'h00d8, 32'he3500002);  // wait: cmp r0, #2      @ IRQ and FIQ each add 1
    put(32'h00dc, 32'h1afffffd);  // bne wait
    put(32'h00e0, 32'he7f000f0);  // udf                 @ undefined instruction
    put(32'h00e4, 32'he3a03201);  // mov r3, #0x10000000
    put(32'h00e8, 32'he593b000);  // ldr r11, [r3]       @ outside data memory: abort
    put(32'h00ec, 32'heafffffe);  // done: b done
    put(32'h0200, 32'he2822001);  // und_handler: add r2, r2, #1
    put(32'h0204, 32'he1b0f00e);  // movs pc, lr
    put(32'h0210, 32'he2822010);  // abt_handler: add r2, r2, #0x10
    put(32'h0214, 32'he25ef004);  // subs pc, lr, #4
    put(32'h0220, 32'he2800001);  // irq_handler: add r0, r0, #1
    put(32'h0224, 32'he25ef004);  // subs pc, lr, #4
    put(32'h8000, 32'he92d4800);  // factorial: push {fp, lr}
    put(32'h8004, 32'he28db004);  // add fp, sp, #4
    put(32'h8008, 32'he24dd004);  // sub sp, sp, #4
    put(32'h800c, 32'he50b0008);  // str r0, [fp, #-8]
    put(32'h8010, 32'he51b3008);  // ldr r3, [fp, #-8]
    put(32'h8014, 32'he3530001);  // cmp r3, #1
    put(32'h8018, 32'hca000001);  // bgt 0x8024
    put(32'h801c, 32'he3a03001);  // mov r3, #1
    put(32'h8020, 32'hea000006);  // b 0x8040
    put(32'h8024, 32'he51b3008);  // ldr r3, [fp, #-8]
    put(32'h8028, 32'he2433001);  // sub r3, r3, #1
    put(32'h802c, 32'he1a00003);  // mov r0, r3
    put(32'h8030, 32'hebfffff2);  // bl factorial
    put(32'h8034, 32'he1a03000);  // mov r3, r0
    put(32'h8038, 32'he51b2008);  // ldr r2, [fp, #-8]
    put(32'h803c, 32'he0030392);  // mul r3, r2, r3
    put(32'h8040, 32'he1a00003);  // mov r0, r3
    put(32'h8044, 32'he24bd004);  // sub sp, fp, #4
    put(32'h8048, 32'he8bd8800);  // pop {fp, pc}
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      wait (dut.u_core.pc == 32'h00ec);
      begin
        repeat (20000) @(posedge clk);
        checks++; failures++;
        $display("FAIL program did not reach its end; checking the state it left");
      end
    join_any
    disable fork;
    repeat (4) @(posedge clk);
    #1;
    $display("program finished after %0d cycles", cycle);

    check("r0 interrupt count", ureg(0), 32'd2);
    check("r4 = 5!", ureg(4), 32'd120);
    check("r5 swapped-out word", ureg(5), 32'h55);
    check("r6 swapped-in word", ureg(6), 32'hAA);
    check("r7 ldrb", ureg(7), 32'hAA);
    check("r8 ldrsb", ureg(8), 32'hFFFF_FFAA);
    check("r10 ldrsh", ureg(10), 32'hFFFF_8000);
    check("r12 ldrh", ureg(12), 32'h0000_8000);
    check("r2 und+abt handlers", ureg(2), 32'h11);
    check("fp unchanged by aborted load", ureg(11), 32'h2000_03fc);
    check("sp sys back at start", ureg(13), 32'h2000_03f8);
    check("lr sys = last bl in factorial", ureg(14), 32'h0000_8034);
    check("r8 fiq bank", dut.u_core.u_rf.regs[15], 32'd1);
    check("sp fiq", dut.u_core.u_rf.regs[20], 32'h2000_00e0);
    check("sp irq", dut.u_core.u_rf.regs[22], 32'h2000_0270);
    check("sp svc", dut.u_core.u_rf.regs[24], 32'h2000_00ac);
    check("sp abt", dut.u_core.u_rf.regs[26], 32'h2000_0044);
    check("sp und", dut.u_core.u_rf.regs[28], 32'h2000_0078);
    check("lr abt = aborted ldr + 8", dut.u_core.u_rf.regs[27], 32'h0000_00f0);
    check("lr und = udf + 4", dut.u_core.u_rf.regs[29], 32'h0000_00e4);
    check("cpsr mode sys", {27'd0, dut.u_core.cpsr[4:0]}, {27'd0, MODE_SYS});
    check("spsr abt saved sys", {27'd0, dut.u_core.u_psr.spsr_bank[4][4:0]}, {27'd0, MODE_SYS});
    check("mul trace rows", 32'(mul_seen), 32'd4);

    expect_count("condition failed", n_cond_fail);
    expect_count("branch taken", n_branch);
    expect_count("branch and link", n_bl);
    expect_count("load (2 cycles)", n_load);
    expect_count("store (1 cycle)", n_store);
    expect_count("byte transfer", n_byte);
    expect_count("halfword transfer", n_half);
    expect_count("swap (2 cycles)", n_swap);
    expect_count("store multiple", n_stm);
    expect_count("load multiple", n_ldm);
    expect_count("load multiple into pc", n_ldm_pc);
    expect_count("multiply", n_mul);
    expect_count("msr mode switch", n_msr);
    expect_count("irq taken", n_irq);
    expect_count("fiq taken", n_fiq);
    expect_count("undefined instruction", n_und);
    expect_count("data abort", n_abt);
    expect_count("cpsr restored", n_restore);
    expect_count("instructions timed", n_timed);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
