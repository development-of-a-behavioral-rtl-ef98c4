// arm_core: a non-pipelined ARM32 processor core (Harvard interface).
//
// Each instruction is fetched, tested against its condition, decoded and
// executed in one clock cycle where it can be (the reference paper's
// execution flowchart): at an instruction boundary the core first asks the interrupt
// controller whether an FIQ or IRQ is to be taken; if so it saves the
// context (return address into the banked R14, CPSR into the SPSR of the
// new mode) and jumps to the vector. Otherwise it evaluates the condition;
// a failed condition only advances R15 by 4. A passed instruction reads
// Rn, Rm, Rs and Rd from the banked register file and executes in the
// barrel shifter, ALU, multiplier or status-register logic; branches and
// writes to R15 load the PC instead of incrementing it.
//
// Instructions that need the data memory take more cycles, as the
// reference paper states: a store takes one cycle; a load takes two (address,
// then write-back of the synchronously read word); a swap takes two (read,
// then write memory and register); load/store multiple spend one cycle
// setting the address latch and writing back the base, then one cycle per
// register, plus one final write-back cycle for a load. While such an
// instruction runs, the PC is held (nhold low) and interrupts wait.
//
// Reads of R15 return the address of the current instruction plus 8, as
// the ARM architecture defines, so code produced by standard ARM compilers
// (branch offsets, PC-relative addressing) runs unchanged. Undefined
// instructions enter UND mode (vector 0x04); an access outside the data
// memory (err) enters ABT mode (vector 0x10) with R14 = address + 8.
// Unaligned word loads rotate the word. Data are little-endian, or
// big-endian while CPSR.E is set: words and halfwords then have their
// bytes reversed, byte addresses stay the same.
//
// Interface: instruction bus i_addr / i_rdata (combinational read), data
// bus d_en / d_we / d_be / d_addr / d_wdata with d_rdata valid the cycle
// after a read request and d_err in the request cycle, active-low
// interrupt lines nirq / nfiq, synchronous active-low reset rst_n that
// starts execution at address 0 in SVC mode.
//
// From the reference paper: the single-cycle, non-pipelined organisation, the
// instruction groups and their cycle counts, the register banking, the
// mode encodings and the interrupt sequence. This design's own choices:
// the vectors, the abort rule, the halfword transfers' encoding details
// and the R15 read offset (the ARM architecture's), and the state machine
// that sequences the multi-cycle instructions.
module arm_core
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic [31:0] i_addr,
  input  logic [31:0] i_rdata,
  // data memory
  output logic        d_en,
  output logic        d_we,
  output logic [3:0]  d_be,
  output logic [31:0] d_addr,
  output logic [31:0] d_wdata,
  input  logic [31:0] d_rdata,
  input  logic        d_err,
  // interrupt request lines
  input  logic        nirq,
  input  logic        nfiq
);
  typedef enum logic [2:0] {
    S_EXEC, S_LD2, S_SWP2, S_LDM, S_LDM_LAST, S_STM
  } state_e;

  state_e state, state_nx;

  // ------------------------------------------------------------------
  // Program counter, status registers, decode
  logic        nhold, pc_load;
  logic [31:0] pc, pc_plus4, pc_target, r15;
  logic [31:0] cpsr, spsr;
  logic [4:0]  mode;

  logic [31:0] instr;
  iclass_e     iclass;
  logic [3:0]  f_cond, f_rn, f_rd, f_rs, f_rm;
  logic        cond_ok;

  assign instr  = i_rdata;
  assign i_addr = pc;
  assign r15    = pc + 32'd8;
  assign mode   = cpsr[4:0];

  arm_pc u_pc (
    .clk, .rst_n, .nhold, .load(pc_load), .target(pc_target),
    .pc, .pc_plus4
  );

  arm_decode u_dec (
    .instr, .iclass, .cond(f_cond), .rn(f_rn), .rd(f_rd), .rs(f_rs), .rm(f_rm)
  );

  arm_cond u_cond (.cond(f_cond), .nzcv(cpsr[31:28]), .pass(cond_ok));

  // ------------------------------------------------------------------
  // Interrupt controller
  logic        irq_take;
  logic [4:0]  irq_mode;
  logic [31:0] irq_vector;

  arm_irq_ctrl u_irq (
    .clk, .rst_n, .nirq, .nfiq,
    .i_mask(cpsr[PSR_I]), .f_mask(cpsr[PSR_F]),
    .boundary(state == S_EXEC),
    .take(irq_take), .mode(irq_mode), .vector(irq_vector)
  );

  // ------------------------------------------------------------------
  // Register file
  logic [4:0]  rmode;
  logic [3:0]  rd_sel;
  logic [31:0] qa, qb, qc, qd;
  logic        we0, we1;
  logic [4:0]  wmode0;
  logic [3:0]  wa0, wa1;
  logic [31:0] wd0, wd1;

  arm_regfile u_rf (
    .clk, .rst_n, .rmode,
    .ra(f_rn), .rb(f_rm), .rc(f_rs), .rd(rd_sel),
    .qa, .qb, .qc, .qd,
    .we0, .wmode0, .wa0, .wd0,
    .we1, .wmode1(mode), .wa1, .wd1
  );

  logic [31:0] rn_v, rm_v, rs_v, rd_v;
  assign rn_v = (f_rn == 4'd15) ? r15 : qa;
  assign rm_v = (f_rm == 4'd15) ? r15 : qb;
  assign rs_v = (f_rs == 4'd15) ? r15 : qc;
  assign rd_v = (rd_sel == 4'd15) ? r15 : qd;

  // ------------------------------------------------------------------
  // Barrel shifter, ALU, multiplier
  logic        sh_imm, sh_c;
  logic [31:0] sh_out;
  alu_op_e     alu_op;
  logic [31:0] alu_b, alu_y;
  logic [3:0]  alu_nzcv;
  logic        alu_wr;
  logic [31:0] mul_y;
  logic [3:0]  mul_nzcv;

  arm_shifter u_sh (
    .op2(instr[11:0]), .imm(sh_imm), .rm(rm_v), .rs(rs_v[7:0]),
    .cin(cpsr[PSR_C]), .out(sh_out), .cout(sh_c)
  );

  arm_alu u_alu (
    .op(alu_op), .a(rn_v), .b(alu_b), .cin(cpsr[PSR_C]), .sh_c,
    .vin(cpsr[PSR_V]), .y(alu_y), .nzcv(alu_nzcv), .wr(alu_wr)
  );

  arm_mul u_mul (
    .rm(rm_v), .rs(rs_v), .rn(rn_v), .acc(instr[21]),
    .cv_in(cpsr[29:28]), .y(mul_y), .nzcv(mul_nzcv)
  );

  // ------------------------------------------------------------------
  // Status register control
  logic        flags_we, msr_we, exc_enter, psr_restore;
  logic [3:0]  flags_v;
  logic [4:0]  exc_mode;

  arm_psr u_psr (
    .clk, .rst_n,
    .flags_we, .nzcv(flags_v),
    .msr_we, .msr_spsr(instr[22]), .msr_mask(instr[19:16]),
    .msr_val(instr[25] ? sh_out : rm_v),
    .exc_enter, .exc_mode, .restore(psr_restore),
    .cpsr, .spsr
  );

  // ------------------------------------------------------------------
  // Multi-cycle state
  logic [3:0]  ls_rd;        // load / swap destination
  logic [1:0]  ls_lo;        // address bits [1:0]
  logic [1:0]  ls_kind;      // 0 word, 1 byte, 2 halfword, 3 signed byte/half
  logic        ls_half;      // signed transfer is a halfword
  logic [31:0] swp_addr, swp_data;
  logic        swp_byte;
  logic [15:0] m_list;
  logic [31:0] m_addr;
  logic        m_user, m_restore, m_abort, m_pend;
  logic [3:0]  m_pend_reg;

  // Lowest set register of the remaining list
  logic [3:0]  m_idx;
  logic        m_last;
  always_comb begin
    m_idx = 4'd0;
    for (int i = 15; i >= 0; i--) if (m_list[i]) m_idx = 4'(i);
    m_last = (m_list & (m_list - 16'd1)) == 16'd0;
  end

  // Byte order of data: CPSR.E = 1 selects big-endian words and halfwords
  // (byte addresses are unchanged, the bytes inside a word are reversed).
  logic big;
  assign big = cpsr[PSR_E];

  function automatic logic [31:0] bswap32(logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction

  function automatic logic [15:0] bswap16(logic [15:0] h);
    return {h[7:0], h[15:8]};
  endfunction

  // Load data alignment
  function automatic logic [31:0] load_align(logic [31:0] mw, logic [1:0] lo,
                                             logic [1:0] kind, logic half, logic be);
    logic [31:0] w, rot;
    logic [7:0]  b;
    logic [15:0] h;
    w   = be ? bswap32(mw) : mw;
    rot = (w >> (8 * lo)) | (w << (32 - 8 * lo));
    b   = mw[8 * lo +: 8];
    h   = lo[1] ? mw[31:16] : mw[15:0];
    if (be) h = bswap16(h);
    case (kind)
      2'd0:    return (lo == 2'd0) ? w : rot;
      2'd1:    return {24'd0, b};
      2'd2:    return {16'd0, h};
      default: return half ? {{16{h[15]}}, h} : {{24{b[7]}}, b};
    endcase
  endfunction

  // Block transfer geometry
  logic [4:0]  m_n;
  logic [31:0] m_start, m_wb;
  always_comb begin
    m_n = 5'($countones(instr[15:0]));
    if (instr[23]) begin
      m_start = instr[24] ? rn_v + 32'd4 : rn_v;
      m_wb    = rn_v + {25'd0, m_n, 2'b00};
    end else begin
      m_wb    = rn_v - {25'd0, m_n, 2'b00};
      m_start = instr[24] ? m_wb : m_wb + 32'd4;
    end
  end

  // Single transfer address
  logic [31:0] ls_addr;
  logic [31:0] ls_off;
  logic        ls_wb;
  always_comb begin
    if (iclass == I_LDSTH)
      ls_off = instr[22] ? {24'd0, instr[11:8], instr[3:0]} : rm_v;
    else
      ls_off = instr[25] ? sh_out : {20'd0, instr[11:0]};
    ls_addr = instr[24] ? alu_y : rn_v;
    ls_wb   = !instr[24] || instr[21];
  end

  // ------------------------------------------------------------------
  // Control
  logic take_abort;

  always_comb begin
    state_nx    = state;
    nhold       = 1'b1;
    pc_load     = 1'b0;
    pc_target   = '0;
    rmode       = mode;
    rd_sel      = f_rd;
    we0 = 1'b0; wa0 = f_rd; wd0 = '0; wmode0 = mode;
    we1 = 1'b0; wa1 = f_rn; wd1 = '0;
    flags_we    = 1'b0;
    flags_v     = alu_nzcv;
    msr_we      = 1'b0;
    exc_enter   = 1'b0;
    exc_mode    = MODE_UND;
    psr_restore = 1'b0;
    sh_imm      = instr[25];
    alu_op      = alu_op_e'(instr[24:21]);
    alu_b       = sh_out;
    d_en = 1'b0; d_we = 1'b0; d_be = 4'hF; d_addr = '0; d_wdata = '0;
    take_abort  = 1'b0;

    unique case (state)
      S_EXEC: begin
        if (irq_take) begin
          // Save context and enter FIQ / IRQ
          exc_enter = 1'b1; exc_mode = irq_mode;
          we0 = 1'b1; wa0 = 4'd14; wd0 = pc_plus4; wmode0 = irq_mode;
          pc_load = 1'b1; pc_target = irq_vector;
        end else if (!cond_ok) begin
          // condition failed: R15 + 4
        end else begin
          unique case (iclass)
            I_DP: begin
              we0 = alu_wr; wd0 = alu_y;
              if (alu_wr && f_rd == 4'd15) begin
                pc_load = 1'b1; pc_target = alu_y;
                psr_restore = instr[20];
              end else if (instr[20]) begin
                flags_we = 1'b1;
              end
            end
            I_MUL: begin
              we0 = 1'b1; wd0 = mul_y;
              flags_we = instr[20]; flags_v = mul_nzcv;
            end
            I_MRS: begin
              we0 = 1'b1; wd0 = instr[22] ? spsr : cpsr;
            end
            I_MSR: begin
              msr_we = 1'b1;
            end
            I_BR: begin
              pc_load = 1'b1;
              pc_target = r15 + {{6{instr[23]}}, instr[23:0], 2'b00};
              if (instr[24]) begin
                we0 = 1'b1; wa0 = 4'd14; wd0 = pc_plus4;
              end
            end
            I_LDST, I_LDSTH: begin
              sh_imm = 1'b0;
              alu_op = instr[23] ? OP_ADD : OP_SUB;
              alu_b  = ls_off;
              d_en   = 1'b1;
              d_addr = ls_addr;
              if (iclass == I_LDSTH && !instr[20] && instr[6:5] != 2'b01) begin
                // doubleword transfers are not part of the instruction set
                d_en = 1'b0;
                exc_enter = 1'b1; exc_mode = MODE_UND;
                we0 = 1'b1; wa0 = 4'd14; wd0 = pc_plus4; wmode0 = MODE_UND;
                pc_load = 1'b1; pc_target = VEC_UNDEF;
              end else if (d_err) begin
                take_abort = 1'b1;
              end else begin
                we1 = ls_wb; wd1 = alu_y;
                if (instr[20]) begin
                  nhold = 1'b0;
                  state_nx = S_LD2;
                end else begin
                  d_we = 1'b1;
                  if (iclass == I_LDSTH) begin
                    d_wdata = {2{big ? bswap16(rd_v[15:0]) : rd_v[15:0]}};
                    d_be    = ls_addr[1] ? 4'b1100 : 4'b0011;
                  end else if (instr[22]) begin
                    d_wdata = {4{rd_v[7:0]}};
                    d_be    = 4'b0001 << ls_addr[1:0];
                  end else begin
                    d_wdata = big ? bswap32(rd_v) : rd_v;
                  end
                end
              end
            end
            I_SWP: begin
              d_en = 1'b1; d_addr = rn_v;
              if (d_err) take_abort = 1'b1;
              else begin
                nhold = 1'b0;
                state_nx = S_SWP2;
              end
            end
            I_LDSTM: begin
              if (instr[15:0] != 16'd0) begin
                nhold = 1'b0;
                we1 = instr[21]; wd1 = m_wb;
                state_nx = instr[20] ? S_LDM : S_STM;
              end
            end
            default: begin
              // Undefined instruction
              exc_enter = 1'b1; exc_mode = MODE_UND;
              we0 = 1'b1; wa0 = 4'd14; wd0 = pc_plus4; wmode0 = MODE_UND;
              pc_load = 1'b1; pc_target = VEC_UNDEF;
            end
          endcase
        end
      end

      S_LD2: begin
        we0 = 1'b1; wa0 = ls_rd;
        wd0 = load_align(d_rdata, ls_lo, ls_kind, ls_half, big);
        if (ls_rd == 4'd15) begin
          pc_load = 1'b1; pc_target = wd0;
        end
        state_nx = S_EXEC;
      end

      S_SWP2: begin
        d_en = 1'b1; d_we = 1'b1; d_addr = swp_addr;
        if (swp_byte) begin
          d_wdata = {4{swp_data[7:0]}};
          d_be    = 4'b0001 << swp_addr[1:0];
        end else begin
          d_wdata = big ? bswap32(swp_data) : swp_data;
        end
        we0 = 1'b1; wa0 = ls_rd;
        wd0 = load_align(d_rdata, ls_lo, swp_byte ? 2'd1 : 2'd0, 1'b0, big);
        state_nx = S_EXEC;
      end

      S_STM: begin
        if (m_user) rmode = MODE_USR;
        rd_sel  = m_idx;
        d_en    = 1'b1; d_we = 1'b1; d_addr = m_addr;
        d_wdata = big ? bswap32(rd_v) : rd_v;
        if (m_last) begin
          state_nx = S_EXEC;
          if (m_abort || d_err) take_abort = 1'b1;
        end else begin
          nhold = 1'b0;
        end
      end

      S_LDM: begin
        d_en = 1'b1; d_addr = m_addr;
        nhold = 1'b0;
        if (m_pend) begin
          we0 = 1'b1; wa0 = m_pend_reg; wd0 = big ? bswap32(d_rdata) : d_rdata;
          if (m_user) wmode0 = MODE_USR;
        end
        if (m_last) state_nx = S_LDM_LAST;
      end

      S_LDM_LAST: begin
        state_nx = S_EXEC;
        if (m_abort) begin
          take_abort = 1'b1;
        end else begin
          we0 = 1'b1; wa0 = m_pend_reg; wd0 = big ? bswap32(d_rdata) : d_rdata;
          if (m_user) wmode0 = MODE_USR;
          if (m_pend_reg == 4'd15) begin
            pc_load = 1'b1; pc_target = wd0;
            psr_restore = m_restore;
          end
        end
      end

      default: state_nx = S_EXEC;
    endcase

    if (take_abort) begin
      // Data abort: nothing of the instruction is kept except loads already done
      nhold = 1'b1;
      we1 = 1'b0; d_we = 1'b0;
      exc_enter = 1'b1; exc_mode = MODE_ABT;
      we0 = 1'b1; wa0 = 4'd14; wd0 = r15; wmode0 = MODE_ABT;
      pc_load = 1'b1; pc_target = VEC_DABT;
      psr_restore = 1'b0;
      state_nx = S_EXEC;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_EXEC;
      ls_rd      <= '0;
      ls_lo      <= '0;
      ls_kind    <= '0;
      ls_half    <= 1'b0;
      swp_addr   <= '0;
      swp_data   <= '0;
      swp_byte   <= 1'b0;
      m_list     <= '0;
      m_addr     <= '0;
      m_user     <= 1'b0;
      m_restore  <= 1'b0;
      m_abort    <= 1'b0;
      m_pend     <= 1'b0;
      m_pend_reg <= '0;
    end else begin
      state <= state_nx;
      if (state == S_EXEC) begin
        ls_rd    <= f_rd;
        ls_lo    <= ls_addr[1:0];
        if (iclass == I_LDSTH) begin
          ls_kind <= (instr[6:5] == 2'b01) ? 2'd2 : 2'd3;
          ls_half <= instr[5];
        end else begin
          ls_kind <= instr[22] ? 2'd1 : 2'd0;
          ls_half <= 1'b0;
        end
        swp_addr <= rn_v;
        swp_data <= rm_v;
        swp_byte <= instr[22];
        if (iclass == I_SWP) ls_lo <= rn_v[1:0];
        m_list    <= instr[15:0];
        m_addr    <= m_start;
        m_user    <= instr[22] && !(instr[20] && instr[15]);
        m_restore <= instr[22] && instr[20] && instr[15];
        m_abort   <= 1'b0;
        m_pend    <= 1'b0;
      end else if (state == S_LDM || state == S_STM) begin
        m_list     <= m_list & ~(16'd1 << m_idx);
        m_addr     <= m_addr + 32'd4;
        m_pend     <= 1'b1;
        m_pend_reg <= m_idx;
        if (d_err) m_abort <= 1'b1;
      end
    end
  end

  // Bus rules
  a_we_en: assert property (@(posedge clk) disable iff (!rst_n) d_we |-> d_en);
  a_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                            (state_nx != S_EXEC && !take_abort) |-> !nhold);
endmodule
