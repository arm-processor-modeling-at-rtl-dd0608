// arm_pkg: types, encodings and helper functions shared by the 5-stage ARM core.
//
// The core executes the 32-bit ARM (architecture v5) instruction set in a
// five-stage pipeline IF / ID / EXE / MEM / WB. This package holds:
//   * the processor modes and the layout of a program status register (PSR),
//   * the mapping from an architectural register number (R0..R15) in a given
//     mode to the physical register of the banked register file,
//   * the instruction classes the decoder produces ("TYPE"/"OPERATE"),
//   * the pipeline register contents ID_EXE, EXE_MEM and MEM_WB as structs,
//   * the event counters the core exports.
// The mode numbers, PSR bit positions and banking follow the ARM architecture
// as the core description lays them out; the physical numbering of banked
// registers (0..30, 15 unused because R15 is the PC) is this design's choice.
package arm_pkg;

  // ---------------------------------------------------------------- modes
  typedef enum logic [4:0] {
    MODE_USR = 5'h10,
    MODE_FIQ = 5'h11,
    MODE_IRQ = 5'h12,
    MODE_SVC = 5'h13,
    MODE_ABT = 5'h17,
    MODE_UND = 5'h1b,
    MODE_SYS = 5'h1f
  } mode_e;

  // PSR: N Z C V Q, 19 reserved bits, I F T, M[4:0]
  typedef struct packed {
    logic        n;
    logic        z;
    logic        c;
    logic        v;
    logic        q;
    logic [18:0] rsv;
    logic        i;
    logic        f;
    logic        t;
    logic [4:0]  mode;
  } psr_t;

  // Exception vectors (only the two software-generated exceptions the
  // pipeline handles: SWI and BKPT, which enters abort mode).
  localparam logic [31:0] VEC_SWI  = 32'h0000_0008;
  localparam logic [31:0] VEC_BKPT = 32'h0000_000C;

  // ------------------------------------------------- physical registers
  // 0..7   R0..R7 (all modes)
  // 8..14  R8..R14 of user/system (and R8..R12 of every non-FIQ mode)
  // 15     unused (R15 is the PC, held by the fetch stage)
  // 16..22 R8_fiq..R14_fiq
  // 23,24  R13_irq, R14_irq      25,26  R13_svc, R14_svc
  // 27,28  R13_abt, R14_abt      29,30  R13_und, R14_und
  localparam int NUM_PHYS = 31;
  typedef logic [4:0] preg_t;
  localparam preg_t PREG_PC = 5'd15;

  function automatic preg_t phys_reg(input logic [3:0] r, input logic [4:0] mode);
    preg_t p;
    p = {1'b0, r};
    if (r == 4'd15) begin
      p = PREG_PC;
    end else if (mode == MODE_FIQ && r >= 4'd8) begin
      p = 5'd16 + 5'(r - 4'd8);
    end else if (r >= 4'd13) begin
      unique case (mode)
        MODE_IRQ: p = 5'd23 + 5'(r - 4'd13);
        MODE_SVC: p = 5'd25 + 5'(r - 4'd13);
        MODE_ABT: p = 5'd27 + 5'(r - 4'd13);
        MODE_UND: p = 5'd29 + 5'(r - 4'd13);
        default:  p = {1'b0, r};
      endcase
    end
    return p;
  endfunction

  // A mode that owns an SPSR (all exception modes)
  function automatic logic has_spsr(input logic [4:0] mode);
    return (mode == MODE_FIQ) || (mode == MODE_IRQ) || (mode == MODE_SVC) ||
           (mode == MODE_ABT) || (mode == MODE_UND);
  endfunction

  // ------------------------------------------------- data-processing ops
  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } alu_op_e;

  typedef enum logic [1:0] {SH_LSL = 2'd0, SH_LSR = 2'd1, SH_ASR = 2'd2, SH_ROR = 2'd3} shift_e;

  // ------------------------------------------------- instruction classes
  typedef enum logic [4:0] {
    C_NOP,      // bubble, coprocessor, undefined
    C_DP,       // data processing (addressing mode 1)
    C_MRS,
    C_MSR,      // register or immediate operand
    C_BX,
    C_BLX2,     // BLX <Rm>
    C_CLZ,
    C_BKPT,
    C_MUL,      // MUL / MLA
    C_MULL,     // UMULL / SMULL
    C_MLAL,     // UMLAL / SMLAL (four source registers, two ID cycles)
    C_SWP,      // SWP / SWPB
    C_LDST,     // LDR/STR/LDRB/STRB/LDRT/STRT/LDRBT/STRBT (addressing mode 2)
    C_LDSTH,    // LDRH/STRH/LDRSB/LDRSH (addressing mode 3)
    C_LDM,
    C_STM,
    C_B,        // B / BL
    C_BLX1,     // BLX <imm>
    C_SWI
  } iclass_e;

  // Operand source selection decided in ID (what the A, Bb and C ports read)
  typedef struct packed {
    logic       a_used;
    logic [3:0] a_reg;
    logic       b_used;
    logic [3:0] b_reg;
    logic       c_used;
    logic [3:0] c_reg;
  } srcsel_t;

  // ------------------------------------------------- pipeline registers
  // ID_EXE: instruction, class, PC of the instruction + 8 and operands.
  // The fourth operand h is used only by UMLAL/SMLAL (RdHi).
  typedef struct packed {
    logic        valid;
    logic [31:0] ir;
    iclass_e     cls;
    logic [31:0] pc8;        // address of the instruction + 8 (value of R15)
    logic [31:0] a;          // Rn / MUL_Rn / RdLo of MLAL
    logic [31:0] b;          // Rm
    logic [31:0] c;          // Rs / Rd of stores / Ri of STM
    logic [31:0] h;          // RdHi of MLAL
    logic        a_fw;       // operand may be replaced by a forwarded value
    logic        b_fw;
    logic        c_fw;
    logic        h_fw;
    preg_t       a_src;      // physical source registers (for forwarding)
    preg_t       b_src;
    preg_t       c_src;
    preg_t       h_src;
    logic [4:0]  mode;       // mode the operands were read in
    logic        stm_first;  // STM micro-operation flags
    logic        stm_last;
    logic [3:0]  stm_reg;
  } id_exe_t;

  // EXE_MEM: ALUOutput (w1), D (w2), memory request, store data C
  typedef struct packed {
    logic        valid;      // carries a real (condition-passed) operation
    logic        retire;     // last micro-operation of an instruction
    logic        w1_en;      // write ALUOutput / LMD to w1_reg
    preg_t       w1_reg;
    logic [31:0] w1_val;     // ALUOutput
    logic        w1_load;    // w1 value comes from memory (LMD)
    logic        w2_en;      // write D to w2_reg (changed base / RdLo)
    preg_t       w2_reg;
    logic [31:0] w2_val;     // D
    logic        mem_rd;
    logic        mem_wr;
    logic [31:0] addr;
    logic [1:0]  size;       // 0 byte, 1 half, 2 word
    logic        sign;       // sign-extend loaded byte/half
    logic [31:0] c;          // store data
    logic        c_fw;       // store data may be forwarded from MEM_WB (path 4)
    preg_t       c_src;
    logic        ld_pc;      // load into the PC: branch in MEM
    logic        ld_pc_spsr; // LDM3: CPSR <- SPSR when loading the PC
    logic        swp;        // SWP/SWPB: read then write, two MEM cycles
  } exe_mem_t;

  typedef struct packed {
    logic        valid;
    logic        retire;
    logic        w1_en;
    preg_t       w1_reg;
    logic [31:0] w1_val;     // ALUOutput or LMD
    logic        w1_load;
    logic        w2_en;
    preg_t       w2_reg;
    logic [31:0] w2_val;     // D
    logic        swp_rd;     // first (read) half of a SWP
  } mem_wb_t;

  // ------------------------------------------------- event counters
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] instrs;       // retired instructions (condition-failed ones included)
    logic [31:0] cond_fail;
    logic [31:0] fwd_p1;       // MEM_WB -> ID (register file bypass)
    logic [31:0] fwd_p2;       // MEM_WB -> start of EXE
    logic [31:0] fwd_p3;       // EXE_MEM -> start of EXE
    logic [31:0] fwd_p4;       // MEM_WB LMD -> store data in MEM
    logic [31:0] ld_interlock; // cycles stalled by the load-use interlock
    logic [31:0] ldm_lock;     // cycles with EXE_LDMLOCK set
    logic [31:0] stm_lock;     // cycles with ID_STMLOCK locking IF
    logic [31:0] swp_lock;     // cycles with MEM_SWPLOCK set
    logic [31:0] mul_lock;     // cycles with EXE_MULLOCK set
    logic [31:0] lmul_lock;    // cycles with ID_LMULLOCK set
    logic [31:0] exe_branch;   // PC changed from EXE
    logic [31:0] mem_branch;   // PC changed from MEM
    logic [31:0] msr_mode_fwd; // MSR mode change forwarded to ID
    logic [31:0] exceptions;   // SWI / BKPT taken
  } perf_t;

endpackage
