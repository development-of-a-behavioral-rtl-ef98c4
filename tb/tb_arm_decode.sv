// tb_arm_decode: test of the instruction decoder against a list of
// hand-encoded instructions of every class (including the machine code of
// a compiled recursive factorial routine) and encodings that must be
// undefined (long multiply, BX, coprocessor, software interrupt, media
// space). Register fields, including multiply's destination in bits
// [19:16], are checked too.
module tb_arm_decode;
  import arm_pkg::*;
  logic [31:0] instr;
  iclass_e     iclass;
  logic [3:0]  cond, rn, rd, rs, rm;
  int          checks = 0, failures = 0;

  arm_decode dut (.*);

  task automatic t(logic [31:0] w, iclass_e c, int ern = -1, int erd = -1);
    instr = w; #1;
    checks++;
    if (iclass !== c || cond !== w[31:28] || rs !== w[11:8] || rm !== w[3:0]
        || (ern >= 0 && rn !== 4'(ern)) || (erd >= 0 && rd !== 4'(erd))) begin
      failures++;
      $display("FAIL %h: class %s rn %0d rd %0d, expected %s", w, iclass.name(), rn, rd, c.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t(32'he92d4800, I_LDSTM, 13);     // push {fp, lr}
    t(32'he28db004, I_DP, 13, 11);    // add fp, sp, #4
    t(32'he24dd004, I_DP, 13, 13);    // sub sp, sp, #4
    t(32'he50b0008, I_LDST, 11, 0);   // str r0, [fp, #-8]
    t(32'he51b3008, I_LDST, 11, 3);   // ldr r3, [fp, #-8]
    t(32'he3530001, I_DP, 3, 0);      // cmp r3, #1
    t(32'hca000001, I_BR);            // bgt
    t(32'hebfffff2, I_BR);            // bl
    t(32'he0030392, I_MUL, 0, 3);     // mul r3, r2, r3
    t(32'he0234192, I_MUL, 4, 3); // mla r3, r2, r1, r4
    t(32'he8bd8800, I_LDSTM, 13);     // pop {fp, pc}
    t(32'he1a00003, I_DP, 0, 0);      // mov r0, r3
    t(32'he0812263, I_DP, 1, 2);      // add r2, r1, r3, ror #4
    t(32'he0812313, I_DP, 1, 2);      // add r2, r1, r3, lsl r3
    t(32'he1015093, I_SWP, 1, 5);     // swp r5, r3, [r1]
    t(32'he1415093, I_SWP, 1, 5);     // swpb
    t(32'he10f3000, I_MRS, 15, 3);    // mrs r3, cpsr
    t(32'he14f3000, I_MRS, 15, 3);    // mrs r3, spsr
    t(32'he129f003, I_MSR);           // msr cpsr_fc, r3
    t(32'he321f0d3, I_MSR);           // msr cpsr_c, #0xd3
    t(32'he1d180d5, I_LDSTH, 1, 8);   // ldrsb r8, [r1, #5]
    t(32'he1c190b6, I_LDSTH, 1, 9);   // strh r9, [r1, #6]
    t(32'he7912103, I_LDST, 1, 2);    // ldr r2, [r1, r3, lsl #2]
    t(32'he5c13005, I_LDST, 1, 3);    // strb r3, [r1, #5]
    t(32'h03a03001, I_DP, 0, 3);      // moveq r3, #1
    t(32'he0821394, I_UNDEF);         // umull
    t(32'he12fff1e, I_UNDEF);         // bx lr
    t(32'hee010f10, I_UNDEF);         // mcr
    t(32'hef000000, I_UNDEF);         // swi
    t(32'he7f000f0, I_UNDEF);         // udf (media space)
    t(32'he3400002, I_UNDEF);         // compare-class opcode without S
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
