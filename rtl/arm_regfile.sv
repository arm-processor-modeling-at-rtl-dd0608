// arm_regfile: banked general-purpose register file with three read ports and
// two write ports.
//
// ARM has 31 general-purpose physical registers including the PC. R0-R7 are
// shared by all modes, R8-R12 have a second copy for FIQ mode, and R13/R14 have
// a private copy for every exception mode (FIQ, IRQ, SVC, ABT, UND). The decode
// stage translates (register number, mode) into a physical index with
// arm_pkg::phys_reg, so this block is a plain 31-entry array; index 15 is the
// PC and reads back `pc8` (address of the instruction in decode + 8).
// Three read ports serve the A, Bb and C operands of the decode stage; the two
// write ports serve the write-back stage, which may write a result (Rd, RdHi,
// a loaded value) and a second value (changed base register, RdLo) in the same
// cycle. If both write the same register, port 1 wins.
// Reads are combinational and see a write of the same cycle (write-before-read
// bypass); this is forwarding path 1 (end of MEM to end of ID) of the
// description, and `bypass` reports which read ports used it.
// Registers reset to zero. The debug port reads a physical register for test.
module arm_regfile
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  preg_t       ra [3],
  output logic [31:0] rd [3],
  output logic [2:0]  bypass,
  input  logic [31:0] pc8,
  input  logic        we1,
  input  preg_t       wa1,
  input  logic [31:0] wd1,
  input  logic        we2,
  input  preg_t       wa2,
  input  logic [31:0] wd2,
  input  preg_t       dbg_ra,
  output logic [31:0] dbg_rd
);
  logic [31:0] regs [NUM_PHYS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PHYS; i++) regs[i] <= '0;
    end else begin
      if (we2 && wa2 != PREG_PC && !(we1 && wa1 == wa2)) regs[wa2] <= wd2;
      if (we1 && wa1 != PREG_PC) regs[wa1] <= wd1;
    end
  end

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      bypass[p] = 1'b0;
      if (ra[p] == PREG_PC) begin
        rd[p] = pc8;
      end else if (we1 && wa1 == ra[p]) begin
        rd[p] = wd1; bypass[p] = 1'b1;
      end else if (we2 && wa2 == ra[p]) begin
        rd[p] = wd2; bypass[p] = 1'b1;
      end else begin
        rd[p] = (ra[p] < 5'(NUM_PHYS)) ? regs[ra[p]] : 32'd0;
      end
    end
    dbg_rd = (dbg_ra < 5'(NUM_PHYS)) ? regs[dbg_ra] : 32'd0;
  end
endmodule
