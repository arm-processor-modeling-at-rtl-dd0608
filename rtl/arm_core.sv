// arm_core: cycle-accurate 5-stage pipelined ARM (architecture v5, ARM state)
// integer core with forwarding and interlocks.
//
// Stages and pipeline registers (IF_ID, ID_EXE, EXE_MEM, MEM_WB):
//   IF   fetches the word at PC from the instruction memory; PC <- PC+4, or the
//        new PC of a branch taken in EXE or MEM.
//   ID   decodes, reads up to three source registers (A, Bb, C) from the banked
//        register file in the current mode, with R15 reading as address+8.
//   EXE  checks the condition, shifts and runs the ALU, computes load/store
//        addresses (and LDM/STM start addresses), multiplies, reads/writes
//        CPSR/SPSR, and resolves every branch except loads into the PC.
//   MEM  accesses the data memory (byte, halfword, word; little-endian),
//        resolves loads into the PC, and holds SWP for its second access.
//   WB   writes up to two registers: ALUOutput or LMD, and D (changed base
//        register or RdLo).
// Hazard handling:
//   forwarding paths 1-4 (arm_regfile bypass and arm_forward);
//   load-use interlock: one bubble when EXE holds a load whose result the ID
//   instruction needs at the start of EXE (arm_hazard);
//   branch in EXE cancels IF and ID (2 lost cycles); branch in MEM (LDR/LDM
//   into the PC) cancels IF, ID and EXE (3 lost cycles); no delay slot;
//   EXE_LDMLOCK: LDM stays in EXE one cycle per register, IF/ID held;
//   ID_STMLOCK:  STM stays in ID one cycle per register, IF held;
//   MEM_SWPLOCK: SWP/SWPB takes two MEM cycles, IF/ID/EXE held for one;
//   EXE_MULLOCK: multiplies stay 1-4 cycles in EXE (arm_multiplier), IF/ID held;
//   ID_LMULLOCK: UMLAL/SMLAL read four registers in two ID cycles, IF held:
//   the first cycle sends Rm and Rs to EXE, where the multiply starts; the
//   second reads RdLo and RdHi into the operation already in EXE, which adds
//   them in its last cycle (so the instruction costs one cycle more than
//   UMULL only when its multiply takes a single cycle);
//   an MSR that changes the mode forwards the new mode to ID so that the
//   instruction being decoded reads the right register bank.
// Exceptions: SWI (Supervisor mode, vector 0x08) and BKPT (Abort mode, vector
// 0x0C) save the CPSR in the SPSR of the new mode and the return address in its
// R14. Interrupts, aborts, Thumb execution and coprocessors are not modelled.
// The stage work, the forwarding paths, the interlock and the lock signals
// follow the description; how the locks are realised as small state machines
// (micro-operations issued from ID or EXE), the fourth operand register H for
// UMLAL/SMLAL and the event counters are this design's choices.
// Interface: instruction port (if_addr -> if_instr, same cycle), data port
// (d_addr/d_we/d_be/d_wdata, d_rdata same cycle), debug register read, the
// fetch PC, the CPSR and the event counters. Reset is asynchronous, active low;
// execution starts at RESET_PC in Supervisor mode.
module arm_core
  import arm_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic [31:0] if_addr,
  input  logic [31:0] if_instr,
  // data memory
  output logic [31:0] d_addr,
  input  logic [31:0] d_rdata,
  output logic        d_we,
  output logic [3:0]  d_be,
  output logic [31:0] d_wdata,
  // observation
  input  preg_t       dbg_reg,
  output logic [31:0] dbg_reg_val,
  output logic [31:0] pc,
  output psr_t        cpsr,
  output perf_t       perf
);
  localparam logic [1:0] SK_IMM_ROT = 2'd0;
  localparam logic [1:0] SK_IMM_SH  = 2'd1;
  localparam logic [1:0] SK_REG_SH  = 2'd2;

  // ------------------------------------------------------------ state
  logic [31:0] pc_q;
  logic        ifid_valid;
  logic [31:0] ifid_ir, ifid_pc;
  id_exe_t     idex;
  exe_mem_t    exmem;
  mem_wb_t     memwb;

  // lock state machines
  logic        stm_active;            // ID_STMLOCK: later micro-operations
  logic [15:0] stm_rem;
  logic        mlal_second;           // ID_LMULLOCK: second ID cycle
  logic        cond_ok, cond_pass;    // condition of the operation in EXE
  logic        mlal_fill;             // second ID cycle feeds RdLo/RdHi to EXE
  logic        mlal_acc;              // UMLAL/SMLAL in EXE has its accumulator
  logic        mlal_prod_ok;          // ... and its product is already saved
  logic [63:0] mlal_prod;
  logic        ldm_active;            // EXE_LDMLOCK: later micro-operations
  logic [15:0] ldm_rem;
  logic [31:0] ldm_addr;
  logic [31:0] stm_addr;              // next STM address kept in EXE
  logic        swp_phase;             // MEM_SWPLOCK: 1 in the write cycle

  // ------------------------------------------------------------ PSRs
  psr_t  spsr, spsr_unused;
  logic  cpsr_we, spsr_we;
  psr_t  cpsr_wd, spsr_wd;
  logic [4:0] spsr_wmode;

  arm_psr u_psr (
    .clk, .rst_n,
    .cpsr_we, .cpsr_wd, .spsr_we, .spsr_wmode, .spsr_wd,
    .cpsr, .spsr, .rmode(cpsr.mode), .spsr_of(spsr_unused)
  );

  // ------------------------------------------------------------ control
  logic        mem_branch, exe_branch;
  logic [31:0] mem_npc, exe_npc;
  logic        mem_stall;            // MEM_SWPLOCK
  logic        exe_busy;             // EXE_LDMLOCK / EXE_MULLOCK
  logic        exe_hold;             // EXE keeps its instruction
  logic        exe_fire;             // EXE acts on its instruction this cycle
  logic        haz_stall;
  logic        id_issue;             // ID sends an operation (or LMUL bubble)
  logic        id_advance;           // IF_ID may take the next instruction
  logic        msr_fwd;
  logic [4:0]  msr_new_mode;
  logic [4:0]  id_mode;

  // ================================================================ IF
  assign if_addr = pc_q;
  assign pc      = pc_q;

  // ================================================================ ID
  iclass_e id_cls;
  srcsel_t id_sel, sel;
  logic    id_c_store, id_b_swp;

  arm_decoder u_dec (
    .ir(ifid_ir), .cls(id_cls), .sel(id_sel),
    .c_is_store(id_c_store), .b_is_swp(id_b_swp)
  );

  assign id_mode = msr_fwd ? msr_new_mode : cpsr.mode;

  logic [15:0] stm_list;
  logic [3:0]  stm_reg;
  logic        stm_last;
  logic        id_is_stm, id_is_mlal;

  always_comb begin
    id_is_stm  = ifid_valid && id_cls == C_STM;
    id_is_mlal = ifid_valid && id_cls == C_MLAL;
    stm_list   = stm_active ? stm_rem : ifid_ir[15:0];
    stm_reg    = 4'd0;
    for (int i = 15; i >= 0; i--) if (stm_list[i]) stm_reg = 4'(i);
    stm_last   = ((stm_list & (stm_list - 16'd1)) == 16'd0);
    sel = id_sel;
    if (id_cls == C_STM) begin
      sel.a_used = !stm_active;
      sel.c_reg  = stm_reg;
    end
    if (id_cls == C_MLAL && mlal_second) begin
      sel.a_used = 1'b1; sel.a_reg = ifid_ir[15:12];   // RdLo
      sel.b_used = 1'b1; sel.b_reg = ifid_ir[19:16];   // RdHi
      sel.c_used = 1'b0;
    end
  end

  preg_t       ra [3];
  logic [31:0] rdv [3];
  logic [2:0]  rf_bypass;
  logic [31:0] id_pc8;
  assign id_pc8 = ifid_pc + 32'd8;

  always_comb begin
    ra[0] = phys_reg(sel.a_reg, id_mode);
    ra[1] = phys_reg(sel.b_reg, id_mode);
    ra[2] = phys_reg(sel.c_reg,
                     (id_cls == C_STM && ifid_ir[22]) ? 5'(MODE_USR) : id_mode);
  end

  arm_regfile u_rf (
    .clk, .rst_n,
    .ra, .rd(rdv), .bypass(rf_bypass), .pc8(id_pc8),
    .we1(memwb.w1_en), .wa1(memwb.w1_reg), .wd1(memwb.w1_val),
    .we2(memwb.w2_en), .wa2(memwb.w2_reg), .wd2(memwb.w2_val),
    .dbg_ra(dbg_reg), .dbg_rd(dbg_reg_val)
  );

  // interlock: load in EXE (current micro-operation) vs operands of ID
  logic  exe_load;
  preg_t exe_ld_reg;

  arm_hazard u_haz (
    .exe_load, .exe_ld_reg,
    .a_used(sel.a_used), .a_reg(ra[0]),
    .b_used(sel.b_used), .b_reg(ra[1]),
    .c_used(sel.c_used), .c_reg(ra[2]),
    .c_is_store(id_c_store), .b_is_swp(id_b_swp),
    .stall(haz_stall)
  );

  always_comb begin
    id_issue   = ifid_valid && !exe_hold && !haz_stall && !exe_branch && !mem_branch;
    // second UMLAL/SMLAL ID cycle with the operation multiplying in EXE
    mlal_fill  = id_is_mlal && mlal_second && idex.valid && idex.cls == C_MLAL &&
                 cond_pass && !mlal_acc && !exe_branch && !mem_branch;
    id_advance = (id_issue && !(id_is_mlal && !mlal_second) && !(id_is_stm && !stm_last)) ||
                 mlal_fill;
  end

  // operation leaving ID
  id_exe_t id_out;
  always_comb begin
    id_out           = '0;
    id_out.valid     = 1'b1;
    id_out.ir        = ifid_ir;
    id_out.cls       = id_cls;
    id_out.pc8       = id_pc8;
    id_out.mode      = id_mode;
    id_out.a         = rdv[0];
    id_out.b         = rdv[1];
    id_out.c         = rdv[2];
    id_out.a_fw      = sel.a_used;
    id_out.b_fw      = sel.b_used;
    id_out.c_fw      = sel.c_used;
    id_out.a_src     = ra[0];
    id_out.b_src     = ra[1];
    id_out.c_src     = ra[2];
    id_out.stm_first = !stm_active;
    id_out.stm_last  = stm_last;
    id_out.stm_reg   = stm_reg;
    // UMLAL/SMLAL: the first ID cycle issues the multiply (Rm, Rs); the
    // second one only sends a bubble if the operation did not stay in EXE
    // (condition failed)
    if (id_cls == C_MLAL && mlal_second) id_out.valid = 1'b0;
  end

  // ================================================================ EXE
  logic [31:0] op_in [4];
  logic        op_fw [4];
  preg_t       op_src [4];
  logic [31:0] op_f [4];
  logic [3:0]  hit_p2, hit_p3;
  logic [31:0] c_mem;
  logic        hit_p4;

  always_comb begin
    op_in[0] = idex.a; op_fw[0] = idex.a_fw; op_src[0] = idex.a_src;
    op_in[1] = idex.b; op_fw[1] = idex.b_fw; op_src[1] = idex.b_src;
    op_in[2] = idex.c; op_fw[2] = idex.c_fw; op_src[2] = idex.c_src;
    op_in[3] = idex.h; op_fw[3] = idex.h_fw; op_src[3] = idex.h_src;
  end

  arm_forward u_fwd (
    .op_val(op_in), .op_fw(op_fw), .op_src(op_src),
    .em_w1_en(exmem.w1_en), .em_w1_reg(exmem.w1_reg), .em_w1_val(exmem.w1_val),
    .em_w1_load(exmem.w1_load),
    .em_w2_en(exmem.w2_en), .em_w2_reg(exmem.w2_reg), .em_w2_val(exmem.w2_val),
    .mw_w1_en(memwb.w1_en), .mw_w1_reg(memwb.w1_reg), .mw_w1_val(memwb.w1_val),
    .mw_w1_load(memwb.w1_load),
    .mw_w2_en(memwb.w2_en), .mw_w2_reg(memwb.w2_reg), .mw_w2_val(memwb.w2_val),
    .mw_swp_rd(memwb.swp_rd),
    .em_c(exmem.c), .em_c_fw(exmem.c_fw), .em_c_src(exmem.c_src), .em_swp(exmem.swp),
    .op_out(op_f), .hit_p2, .hit_p3, .c_mem, .hit_p4
  );

  logic [31:0] fa, fb, fc, fh;
  assign fa = op_f[0];
  assign fb = op_f[1];
  assign fc = op_f[2];
  assign fh = op_f[3];

  logic [31:0] ir;
  iclass_e     cls;
  assign ir  = idex.ir;
  assign cls = idex.cls;

  // condition
  // cond_ok, cond_pass: declared with the stage signals above
  arm_cond u_cond (.cond(ir[31:28]), .n(cpsr.n), .z(cpsr.z), .c(cpsr.c), .v(cpsr.v),
                   .pass(cond_ok));
  assign cond_pass = cond_ok || cls == C_BKPT;

  // shifter
  logic [1:0]  sh_kind;
  logic [31:0] sh_val, sh_res;
  logic [7:0]  sh_amt;
  logic        sh_c;
  always_comb begin
    if (cls == C_LDST || cls == C_CLZ) begin
      sh_kind = SK_IMM_SH; sh_val = fb;
      sh_amt  = (cls == C_CLZ) ? 8'd0 : {3'd0, ir[11:7]};
    end else if (ir[25]) begin
      sh_kind = SK_IMM_ROT; sh_val = {24'd0, ir[7:0]}; sh_amt = {3'd0, ir[11:8], 1'b0};
    end else if (ir[4]) begin
      sh_kind = SK_REG_SH;  sh_val = fb; sh_amt = fc[7:0];
    end else begin
      sh_kind = SK_IMM_SH;  sh_val = fb; sh_amt = {3'd0, ir[11:7]};
    end
  end

  arm_shifter u_sh (
    .kind(sh_kind), .typ(shift_e'(ir[6:5])), .value(sh_val), .amount(sh_amt),
    .c_in(cpsr.c), .result(sh_res), .carry(sh_c)
  );

  // ALU
  logic [31:0] alu_res, alu_clz;
  logic        alu_n, alu_z, alu_c, alu_v, alu_wr;
  arm_alu u_alu (
    .op(alu_op_e'(ir[24:21])), .a(fa), .b(sh_res), .c_in(cpsr.c), .v_in(cpsr.v),
    .sh_c, .result(alu_res), .n(alu_n), .z(alu_z), .c(alu_c), .v(alu_v),
    .wr_rd(alu_wr), .clz(alu_clz)
  );

  // address generation
  logic        is_multi;
  logic [31:0] ag_off, ag_addr, ag_end, ag_wb;
  logic        ag_wb_en;
  logic [4:0]  ag_count;
  assign is_multi = (cls == C_LDM || cls == C_STM);
  always_comb begin
    if (cls == C_LDSTH) ag_off = ir[22] ? {24'd0, ir[11:8], ir[3:0]} : fb;
    else                ag_off = ir[25] ? sh_res : {20'd0, ir[11:0]};
  end
  arm_addr u_ag (
    .multi(is_multi), .base(fa), .offset(ag_off), .reglist(ir[15:0]),
    .p(ir[24]), .u(ir[23]), .w(ir[21]),
    .addr(ag_addr), .end_addr(ag_end), .wb_en(ag_wb_en), .wb_val(ag_wb), .count(ag_count)
  );

  // multiplier
  logic        is_mul, mul_start, mul_busy, mul_done, mul_en;
  logic [63:0] mul_res;
  assign is_mul    = idex.valid && (cls == C_MUL || cls == C_MULL || cls == C_MLAL);
  assign mul_en    = !mem_stall && !mem_branch;
  assign mul_start = is_mul && cond_pass && !mul_busy && !mlal_prod_ok;
  arm_multiplier u_mul (
    .clk, .rst_n, .en(mul_en), .start(mul_start),
    .signed_op(cls == C_MUL || ir[22]),
    .acc_en(cls == C_MUL && ir[21]),
    .acc({32'd0, fa}),
    .rm(fb), .rs(fc), .busy(mul_busy), .done(mul_done), .result(mul_res)
  );
  // UMLAL/SMLAL add RdHi:RdLo to the product once both are there
  logic        mul_fin;
  logic [63:0] mul_out;
  always_comb begin
    if (cls == C_MLAL) begin
      mul_fin = mlal_acc && (mul_done || mlal_prod_ok);
      mul_out = (mlal_prod_ok ? mlal_prod : mul_res) + {fh, fa};
    end else begin
      mul_fin = mul_done;
      mul_out = mul_res;
    end
  end

  // LDM micro-operation
  logic [15:0] ldm_list;
  logic [3:0]  ldm_reg;
  logic        ldm_last;
  logic [31:0] ldm_cur_addr;
  always_comb begin
    ldm_list = ldm_active ? ldm_rem : ir[15:0];
    ldm_reg  = 4'd0;
    for (int i = 15; i >= 0; i--) if (ldm_list[i]) ldm_reg = 4'(i);
    ldm_last = ((ldm_list & (ldm_list - 16'd1)) == 16'd0);
    ldm_cur_addr = ldm_active ? ldm_addr : ag_addr;
  end
  // LDM2 (S bit, PC not loaded) loads the user-mode registers
  logic [4:0] ldm_mode;
  assign ldm_mode = (ir[22] && !ir[15]) ? 5'(MODE_USR) : idex.mode;

  // load destination of the micro-operation in EXE (for the interlock)
  always_comb begin
    exe_load   = 1'b0;
    exe_ld_reg = phys_reg(ir[15:12], idex.mode);
    if (idex.valid) begin
      unique case (cls)
        C_LDST, C_LDSTH: exe_load = ir[20];
        C_SWP:           exe_load = 1'b1;
        C_LDM: begin exe_load = 1'b1; exe_ld_reg = phys_reg(ldm_reg, ldm_mode); end
        default: ;
      endcase
    end
  end

  // stalls
  always_comb begin
    mem_stall = exmem.valid && exmem.swp && !swp_phase;
    exe_busy  = idex.valid && cond_pass &&
                ((is_mul && !mul_fin) || (cls == C_LDM && !ldm_last));
    exe_hold  = mem_stall || exe_busy;
    exe_fire  = idex.valid && !mem_stall && !mem_branch;
  end

  // EXE results
  exe_mem_t    ex_out;
  logic        ex_cpsr_we, ex_spsr_we;
  psr_t        ex_cpsr, ex_spsr;
  logic [4:0]  ex_spsr_mode;
  logic [31:0] msr_op, msr_mask, lr_val;
  psr_t        msr_old;

  always_comb begin
    ex_out       = '0;
    exe_branch   = 1'b0;
    exe_npc      = '0;
    ex_cpsr_we   = 1'b0;
    ex_cpsr      = cpsr;
    ex_spsr_we   = 1'b0;
    ex_spsr      = cpsr;
    ex_spsr_mode = cpsr.mode;
    msr_fwd      = 1'b0;
    msr_new_mode = cpsr.mode;
    lr_val       = idex.pc8 - 32'd4;
    msr_op       = ir[25] ? sh_res : fb;
    msr_mask     = {{8{ir[19]}}, {8{ir[18]}}, {8{ir[17]}}, {8{ir[16]}}};
    msr_old      = ir[22] ? spsr : cpsr;
    if (!ir[22] && cpsr.mode == MODE_USR) msr_mask[23:0] = '0;   // user: flags only

    if (exe_fire && !cond_pass) begin
      // condition failed: behaves as a NOP
      ex_out.retire = !(cls == C_STM && !idex.stm_last);
    end else if (exe_fire) begin
      ex_out.valid  = 1'b1;
      ex_out.retire = 1'b1;
      ex_out.size   = 2'd2;
      unique case (cls)
        C_DP: begin
          if (alu_wr && ir[15:12] == 4'd15) begin
            exe_branch = 1'b1;
            exe_npc    = {alu_res[31:2], 2'b00};
            if (ir[20]) begin ex_cpsr_we = 1'b1; ex_cpsr = spsr; end
          end else begin
            ex_out.w1_en  = alu_wr;
            ex_out.w1_reg = phys_reg(ir[15:12], idex.mode);
            ex_out.w1_val = alu_res;
            if (ir[20]) begin
              ex_cpsr_we = 1'b1;
              ex_cpsr.n = alu_n; ex_cpsr.z = alu_z; ex_cpsr.c = alu_c; ex_cpsr.v = alu_v;
            end
          end
        end
        C_MRS: begin
          ex_out.w1_en  = 1'b1;
          ex_out.w1_reg = phys_reg(ir[15:12], idex.mode);
          ex_out.w1_val = ir[22] ? spsr : cpsr;
        end
        C_MSR: begin
          if (ir[22]) begin
            ex_spsr_we = has_spsr(cpsr.mode);
            ex_spsr    = (msr_old & ~msr_mask) | (msr_op & msr_mask);
          end else begin
            ex_cpsr_we = 1'b1;
            ex_cpsr    = (msr_old & ~msr_mask) | (msr_op & msr_mask);
            if (msr_mask[0]) begin
              msr_fwd      = 1'b1;
              msr_new_mode = ex_cpsr.mode;
            end
          end
        end
        C_BX, C_BLX2: begin
          exe_branch = 1'b1;
          exe_npc    = {fb[31:2], 2'b00};
          ex_cpsr_we = 1'b1;
          ex_cpsr.t  = fb[0];
          if (cls == C_BLX2) begin
            ex_out.w1_en  = 1'b1;
            ex_out.w1_reg = phys_reg(4'd14, idex.mode);
            ex_out.w1_val = lr_val;
          end
        end
        C_CLZ: begin
          ex_out.w1_en  = 1'b1;
          ex_out.w1_reg = phys_reg(ir[15:12], idex.mode);
          ex_out.w1_val = alu_clz;
        end
        C_BKPT, C_SWI: begin
          exe_branch   = 1'b1;
          exe_npc      = (cls == C_SWI) ? VEC_SWI : VEC_BKPT;
          ex_spsr_we   = 1'b1;
          ex_spsr      = cpsr;
          ex_spsr_mode = (cls == C_SWI) ? 5'(MODE_SVC) : 5'(MODE_ABT);
          ex_cpsr_we   = 1'b1;
          ex_cpsr.mode = ex_spsr_mode;
          ex_cpsr.i    = 1'b1;
          ex_cpsr.t    = 1'b0;
          ex_out.w1_en  = 1'b1;
          ex_out.w1_reg = phys_reg(4'd14, ex_spsr_mode);
          ex_out.w1_val = lr_val;
        end
        C_B, C_BLX1: begin
          exe_branch = 1'b1;
          exe_npc    = idex.pc8 + {{6{ir[23]}}, ir[23:0], 2'b00};
          if (cls == C_BLX1) begin
            exe_npc    = exe_npc + {30'd0, ir[24], 1'b0};
            ex_cpsr_we = 1'b1;
            ex_cpsr.t  = 1'b1;
          end
          if (cls == C_BLX1 || ir[24]) begin
            ex_out.w1_en  = 1'b1;
            ex_out.w1_reg = phys_reg(4'd14, idex.mode);
            ex_out.w1_val = lr_val;
          end
        end
        C_MUL, C_MULL, C_MLAL: begin
          if (!mul_fin) begin
            ex_out.valid  = 1'b0;            // still multiplying: bubble
            ex_out.retire = 1'b0;
          end else begin
            ex_out.w1_en  = 1'b1;
            ex_out.w1_reg = phys_reg(ir[19:16], idex.mode);
            ex_out.w1_val = (cls == C_MUL) ? mul_out[31:0] : mul_out[63:32];
            if (cls != C_MUL) begin
              ex_out.w2_en  = 1'b1;
              ex_out.w2_reg = phys_reg(ir[15:12], idex.mode);
              ex_out.w2_val = mul_out[31:0];
            end
            if (ir[20]) begin
              ex_cpsr_we = 1'b1;
              ex_cpsr.n  = (cls == C_MUL) ? mul_out[31] : mul_out[63];
              ex_cpsr.z  = (cls == C_MUL) ? (mul_out[31:0] == 32'd0) : (mul_out == 64'd0);
            end
          end
        end
        C_SWP: begin
          ex_out.addr    = fa;
          ex_out.mem_rd  = 1'b1;
          ex_out.swp     = 1'b1;
          ex_out.size    = ir[22] ? 2'd0 : 2'd2;
          ex_out.c       = fb;
          ex_out.c_fw    = idex.b_fw;
          ex_out.c_src   = idex.b_src;
          ex_out.w1_en   = 1'b1;
          ex_out.w1_load = 1'b1;
          ex_out.w1_reg  = phys_reg(ir[15:12], idex.mode);
        end
        C_LDST, C_LDSTH: begin
          ex_out.addr  = ag_addr;
          ex_out.w2_en  = ag_wb_en;
          ex_out.w2_reg = phys_reg(ir[19:16], idex.mode);
          ex_out.w2_val = ag_wb;
          if (cls == C_LDST) begin
            ex_out.size = ir[22] ? 2'd0 : 2'd2;
          end else begin
            ex_out.size = ir[5] ? 2'd1 : 2'd0;
            ex_out.sign = ir[6];
          end
          if (ir[20]) begin
            ex_out.mem_rd = 1'b1;
            if (ir[15:12] == 4'd15) begin
              ex_out.ld_pc = 1'b1;
            end else begin
              ex_out.w1_en   = 1'b1;
              ex_out.w1_load = 1'b1;
              ex_out.w1_reg  = phys_reg(ir[15:12], idex.mode);
            end
          end else begin
            ex_out.mem_wr = 1'b1;
            ex_out.c      = fc;
            ex_out.c_fw   = idex.c_fw;
            ex_out.c_src  = idex.c_src;
          end
        end
        C_LDM: begin
          ex_out.addr   = ldm_cur_addr;
          ex_out.mem_rd = 1'b1;
          ex_out.retire = ldm_last;
          if (!ldm_active) begin
            ex_out.w2_en  = ag_wb_en;
            ex_out.w2_reg = phys_reg(ir[19:16], idex.mode);
            ex_out.w2_val = ag_wb;
          end
          if (ldm_reg == 4'd15) begin
            ex_out.ld_pc      = 1'b1;
            ex_out.ld_pc_spsr = ir[22];
          end else begin
            ex_out.w1_en   = 1'b1;
            ex_out.w1_load = 1'b1;
            ex_out.w1_reg  = phys_reg(ldm_reg, ldm_mode);
          end
        end
        C_STM: begin
          ex_out.addr   = idex.stm_first ? ag_addr : stm_addr;
          ex_out.mem_wr = 1'b1;
          ex_out.retire = idex.stm_last;
          ex_out.c      = fc;
          ex_out.c_fw   = idex.c_fw;
          ex_out.c_src  = idex.c_src;
          if (idex.stm_first) begin
            ex_out.w2_en  = ag_wb_en;
            ex_out.w2_reg = phys_reg(ir[19:16], idex.mode);
            ex_out.w2_val = ag_wb;
          end
        end
        default: ex_out.valid = 1'b0;        // NOP class
      endcase
    end
  end

  // ================================================================ MEM
  logic [31:0] ld_data, rot;
  logic [1:0]  boff;
  logic        mem_do_rd, mem_do_wr;
  logic        mem_cpsr_we;
  psr_t        mem_cpsr;

  always_comb begin
    boff      = exmem.addr[1:0];
    mem_do_rd = exmem.valid && exmem.mem_rd && !(exmem.swp && swp_phase);
    mem_do_wr = exmem.valid && (exmem.mem_wr || (exmem.swp && swp_phase));
    d_addr    = exmem.addr;
    d_we      = mem_do_wr;
    rot       = d_rdata >> {boff, 3'b000};
    unique case (exmem.size)
      2'd0: begin
        ld_data = {24'd0, rot[7:0]};
        if (exmem.sign) ld_data[31:8] = {24{rot[7]}};
        d_be    = 4'b0001 << boff;
        d_wdata = {4{c_mem[7:0]}};
      end
      2'd1: begin
        ld_data = {16'd0, rot[15:0]};
        if (exmem.sign) ld_data[31:16] = {16{rot[15]}};
        d_be    = boff[1] ? 4'b1100 : 4'b0011;
        d_wdata = {2{c_mem[15:0]}};
      end
      default: begin
        // word: an unaligned load returns the word rotated (ARM rule)
        ld_data = (d_rdata >> {boff, 3'b000}) | (d_rdata << (6'd32 - {1'b0, boff, 3'b000}));
        if (boff == 2'd0) ld_data = d_rdata;
        d_be    = 4'b1111;
        d_wdata = c_mem;
      end
    endcase
    mem_branch  = exmem.valid && exmem.ld_pc;
    mem_npc     = {ld_data[31:2], 2'b00};
    mem_cpsr_we = mem_branch;
    mem_cpsr    = cpsr;
    if (exmem.ld_pc_spsr) mem_cpsr = spsr;       // LDM3: return from exception
    else                  mem_cpsr.t = ld_data[0];
  end

  // PSR write selection (MEM first: its branch cancels EXE)
  always_comb begin
    cpsr_we    = mem_cpsr_we || ex_cpsr_we;
    cpsr_wd    = mem_cpsr_we ? mem_cpsr : ex_cpsr;
    spsr_we    = ex_spsr_we;
    spsr_wd    = ex_spsr;
    spsr_wmode = ex_spsr_mode;
  end

  mem_wb_t mem_out;
  always_comb begin
    mem_out         = '0;
    mem_out.valid   = exmem.valid;
    mem_out.retire  = exmem.retire;
    mem_out.w1_en   = exmem.w1_en;
    mem_out.w1_reg  = exmem.w1_reg;
    mem_out.w1_val  = exmem.w1_load ? ld_data : exmem.w1_val;
    mem_out.w1_load = exmem.w1_load;
    mem_out.w2_en   = exmem.w2_en;
    mem_out.w2_reg  = exmem.w2_reg;
    mem_out.w2_val  = exmem.w2_val;
    if (exmem.valid && exmem.swp) begin
      if (!swp_phase) begin
        mem_out.retire = 1'b0;           // read half: write Rd in WB
        mem_out.swp_rd = 1'b1;
      end else begin
        mem_out.w1_en  = 1'b0;           // write half: nothing to write back
      end
    end
  end

  // ================================================================ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= RESET_PC;
      ifid_valid  <= 1'b0;
      ifid_ir     <= '0;
      ifid_pc     <= '0;
      idex        <= '0;
      exmem       <= '0;
      memwb       <= '0;
      stm_active  <= 1'b0;
      stm_rem     <= '0;
      mlal_second <= 1'b0;
      mlal_acc    <= 1'b0;
      mlal_prod_ok <= 1'b0;
      mlal_prod   <= '0;
      ldm_active  <= 1'b0;
      ldm_rem     <= '0;
      ldm_addr    <= '0;
      stm_addr    <= '0;
      swp_phase   <= 1'b0;
    end else begin
      // ---- IF / IF_ID
      if (mem_branch || exe_branch) begin
        pc_q       <= mem_branch ? mem_npc : exe_npc;
        ifid_valid <= 1'b0;
      end else if (!ifid_valid || id_advance) begin
        pc_q       <= pc_q + 32'd4;
        ifid_valid <= 1'b1;
        ifid_ir    <= if_instr;
        ifid_pc    <= pc_q;
      end

      // ---- ID lock state
      if (mem_branch || exe_branch) begin
        stm_active  <= 1'b0;
        mlal_second <= 1'b0;
      end else if (id_issue) begin
        if (id_is_stm) begin
          stm_active <= !stm_last;
          stm_rem    <= stm_list & ~(16'd1 << stm_reg);
        end
        if (id_is_mlal) mlal_second <= !mlal_second;
      end else if (mlal_fill) begin
        mlal_second <= 1'b0;
      end

      // ---- UMLAL/SMLAL state in EXE
      if (mem_branch || !exe_hold) begin
        mlal_acc     <= 1'b0;
        mlal_prod_ok <= 1'b0;
      end else begin
        if (mlal_fill) mlal_acc <= 1'b1;
        if (idex.valid && cls == C_MLAL && mul_done && mul_en && !mlal_prod_ok) begin
          mlal_prod_ok <= 1'b1;
          mlal_prod    <= mul_res;
        end
      end

      // ---- ID_EXE
      if (mem_branch) begin
        idex.valid <= 1'b0;
      end else if (exe_hold) begin
        // keep the instruction; keep forwarded operands that would be lost
        idex.a <= fa; idex.b <= fb; idex.c <= fc; idex.h <= fh;
        if (mlal_fill) begin
          // second UMLAL/SMLAL ID cycle: RdLo (port A) and RdHi (port Bb)
          idex.a <= rdv[0]; idex.a_fw <= 1'b1; idex.a_src <= ra[0];
          idex.h <= rdv[1]; idex.h_fw <= 1'b1; idex.h_src <= ra[1];
        end
      end else if (id_issue) begin
        idex <= id_out;
      end else begin
        idex.valid <= 1'b0;
      end

      // ---- EXE lock state
      if (mem_branch) begin
        ldm_active <= 1'b0;
      end else if (exe_fire && cond_pass && cls == C_LDM) begin
        ldm_active <= !ldm_last;
        ldm_rem    <= ldm_list & ~(16'd1 << ldm_reg);
        ldm_addr   <= ldm_cur_addr + 32'd4;
      end
      if (exe_fire && cond_pass && cls == C_STM)
        stm_addr <= (idex.stm_first ? ag_addr : stm_addr) + 32'd4;

      // ---- EXE_MEM
      if (mem_stall) begin
        exmem.c <= c_mem;                  // keep a path-4 value for the write
      end else begin
        exmem <= ex_out;
      end

      // ---- MEM lock state and MEM_WB
      if (exmem.valid && exmem.swp) swp_phase <= !swp_phase;
      memwb <= mem_out;
    end
  end

  // ================================================================ counters
  logic any_p1, any_p2, any_p3;
  assign any_p1 = id_issue && ((rf_bypass[0] && sel.a_used) || (rf_bypass[1] && sel.b_used) ||
                               (rf_bypass[2] && sel.c_used));
  assign any_p2 = exe_fire && (hit_p2 != 4'd0);
  assign any_p3 = exe_fire && (hit_p3 != 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else begin
      perf.cycles <= perf.cycles + 32'd1;
      if (memwb.retire)                               perf.instrs       <= perf.instrs + 32'd1;
      if (exe_fire && !cond_pass && ex_out.retire)    perf.cond_fail    <= perf.cond_fail + 32'd1;
      if (any_p1)                                     perf.fwd_p1       <= perf.fwd_p1 + 32'd1;
      if (any_p2)                                     perf.fwd_p2       <= perf.fwd_p2 + 32'd1;
      if (any_p3)                                     perf.fwd_p3       <= perf.fwd_p3 + 32'd1;
      if (hit_p4 && mem_do_wr)                        perf.fwd_p4       <= perf.fwd_p4 + 32'd1;
      if (ifid_valid && haz_stall && !exe_hold && !exe_branch && !mem_branch)
                                                      perf.ld_interlock <= perf.ld_interlock + 32'd1;
      if (exe_fire && cond_pass && cls == C_LDM && !ldm_last)
                                                      perf.ldm_lock     <= perf.ldm_lock + 32'd1;
      if (id_issue && id_is_stm && !stm_last)         perf.stm_lock     <= perf.stm_lock + 32'd1;
      if (mem_stall)                                  perf.swp_lock     <= perf.swp_lock + 32'd1;
      if (exe_fire && is_mul && cond_pass && !mul_fin)
                                                      perf.mul_lock     <= perf.mul_lock + 32'd1;
      if (id_issue && id_is_mlal && !mlal_second)     perf.lmul_lock    <= perf.lmul_lock + 32'd1;
      if (exe_branch)                                 perf.exe_branch   <= perf.exe_branch + 32'd1;
      if (mem_branch)                                 perf.mem_branch   <= perf.mem_branch + 32'd1;
      if (msr_fwd)                                    perf.msr_mode_fwd <= perf.msr_mode_fwd + 32'd1;
      if (exe_fire && cond_pass && (cls == C_SWI || cls == C_BKPT))
                                                      perf.exceptions   <= perf.exceptions + 32'd1;
    end
  end

  // ================================================================ checks
  // a branch from EXE is never taken together with one from MEM
  assert property (@(posedge clk) disable iff (!rst_n) !(exe_branch && mem_branch));
  // the write-back stage never targets the PC slot of the register file
  assert property (@(posedge clk) disable iff (!rst_n) !(memwb.w1_en && memwb.w1_reg == PREG_PC));
  // SWP holds MEM for exactly one extra cycle
  assert property (@(posedge clk) disable iff (!rst_n) mem_stall |=> !mem_stall);

endmodule
