// arm_forward: forwarding unit (data bypass) of the 5-stage pipeline.
//
// A result can be used by a later instruction before it is written back. Each
// pipeline register carries up to two results: w1 (ALUOutput: Rd, RdHi, MUL Rd,
// link register, or LMD: a loaded value) and w2 (D: changed base register or
// RdLo). The source operands A, Bb, C (and H, RdHi of UMLAL/SMLAL) carry the
// physical register they were read from. Forwarding paths:
//   path 1  MEM_WB -> end of ID      (in arm_regfile as write-before-read)
//   path 2  MEM_WB -> start of EXE   ALUOutput, D and LMD
//   path 3  EXE_MEM -> start of EXE  ALUOutput and D (a load's LMD does not
//                                    exist yet; the interlock covers it)
//   path 4  MEM_WB -> start of MEM   LMD into the store data C of a store,
//                                    STM or SWP/SWPB
// The younger producer (EXE_MEM) wins over MEM_WB, and w1 over w2 in one
// stage. The second (write) half of a SWP never takes path 4 from its own
// first (read) half, so SWP Rd,Rm,[Rn] with Rd=Rm stores the old Rm.
// Combinational. Paths and what they carry follow the description's tables of
// forwarding paths; the priority order is this design's choice.
module arm_forward
  import arm_pkg::*;
(
  // operands at the start of EXE (ID_EXE)
  input  logic [31:0] op_val [4],   // A, Bb, C, H
  input  logic        op_fw  [4],   // operand was read from a register
  input  preg_t       op_src [4],
  // EXE_MEM results
  input  logic        em_w1_en,
  input  preg_t       em_w1_reg,
  input  logic [31:0] em_w1_val,
  input  logic        em_w1_load,
  input  logic        em_w2_en,
  input  preg_t       em_w2_reg,
  input  logic [31:0] em_w2_val,
  // MEM_WB results
  input  logic        mw_w1_en,
  input  preg_t       mw_w1_reg,
  input  logic [31:0] mw_w1_val,
  input  logic        mw_w1_load,
  input  logic        mw_w2_en,
  input  preg_t       mw_w2_reg,
  input  logic [31:0] mw_w2_val,
  input  logic        mw_swp_rd,
  // store data at the start of MEM (EXE_MEM)
  input  logic [31:0] em_c,
  input  logic        em_c_fw,
  input  preg_t       em_c_src,
  input  logic        em_swp,
  // results
  output logic [31:0] op_out [4],
  output logic [3:0]  hit_p2,
  output logic [3:0]  hit_p3,
  output logic [31:0] c_mem,
  output logic        hit_p4
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      op_out[k] = op_val[k];
      hit_p2[k] = 1'b0;
      hit_p3[k] = 1'b0;
      if (op_fw[k] && op_src[k] != PREG_PC) begin
        if (em_w1_en && !em_w1_load && em_w1_reg == op_src[k]) begin
          op_out[k] = em_w1_val; hit_p3[k] = 1'b1;
        end else if (em_w2_en && em_w2_reg == op_src[k]) begin
          op_out[k] = em_w2_val; hit_p3[k] = 1'b1;
        end else if (mw_w1_en && mw_w1_reg == op_src[k]) begin
          op_out[k] = mw_w1_val; hit_p2[k] = 1'b1;
        end else if (mw_w2_en && mw_w2_reg == op_src[k]) begin
          op_out[k] = mw_w2_val; hit_p2[k] = 1'b1;
        end
      end
    end
    c_mem  = em_c;
    hit_p4 = 1'b0;
    if (em_c_fw && mw_w1_en && mw_w1_load && mw_w1_reg == em_c_src &&
        em_c_src != PREG_PC && !(mw_swp_rd && em_swp)) begin
      c_mem  = mw_w1_val;
      hit_p4 = 1'b1;
    end
  end
endmodule
