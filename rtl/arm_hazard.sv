// arm_hazard: load-use interlock of the ID stage.
//
// When the instruction in EXE loads a register (LDR/LDRB/LDRH/LDRSB/LDRSH,
// SWP/SWPB, or the current register of an LDM), the loaded value only exists
// at the end of MEM. If the instruction in ID reads that register as an
// operand that is needed at the start of EXE, it must wait one cycle: IF and
// ID are held and a bubble (NOP) enters EXE; the value then arrives through
// forwarding path 2. Two operands are exempt because they are first used in
// MEM and are served by path 4: the store data C of a store or STM, and Bb
// (Rm) of SWP/SWPB. Combinational; a single stall cycle per hazard, as in the
// description.
module arm_hazard
  import arm_pkg::*;
(
  input  logic        exe_load,     // EXE holds a load that writes exe_ld_reg
  input  preg_t       exe_ld_reg,
  input  logic        a_used,
  input  preg_t       a_reg,
  input  logic        b_used,
  input  preg_t       b_reg,
  input  logic        c_used,
  input  preg_t       c_reg,
  input  logic        c_is_store,   // C is store data (needed in MEM)
  input  logic        b_is_swp,     // Bb is SWP data (needed in MEM)
  output logic        stall
);
  always_comb begin
    stall = 1'b0;
    if (exe_load && exe_ld_reg != PREG_PC) begin
      if (a_used && a_reg == exe_ld_reg)                 stall = 1'b1;
      if (b_used && !b_is_swp && b_reg == exe_ld_reg)    stall = 1'b1;
      if (c_used && !c_is_store && c_reg == exe_ld_reg)  stall = 1'b1;
    end
  end
endmodule
