// arm_addr: auto-indexed address generation of the EXE stage for loads and
// stores.
//
// Single transfers (addressing modes 2 and 3): the offset (12-bit immediate,
// scaled register, 8-bit split immediate or plain register, prepared by the
// caller) is added to the base Rn when U=1 and subtracted when U=0. With P=1
// (pre-index) that sum is the address; with P=0 (post-index) the address is Rn
// itself. The base register is written back with the sum when P=0 or W=1.
// Multiple transfers (addressing mode 4, LDM/STM): with N the number of set
// bits of the register list,
//   IA (P=0,U=1): start Rn,        end Rn+4N-4
//   IB (P=1,U=1): start Rn+4,      end Rn+4N
//   DA (P=0,U=0): start Rn-4N+4,   end Rn
//   DB (P=1,U=0): start Rn-4N,     end Rn-4
// and with W=1 the base becomes Rn+4N (U=1) or Rn-4N (U=0). Registers are
// transferred lowest-numbered first at the lowest address.
// Combinational. The equations are those of the description.
module arm_addr (
  input  logic        multi,     // 1: LDM/STM (mode 4), 0: single transfer
  input  logic [31:0] base,      // Rn
  input  logic [31:0] offset,    // single transfer offset
  input  logic [15:0] reglist,   // multiple transfer register list
  input  logic        p,
  input  logic        u,
  input  logic        w,
  output logic [31:0] addr,      // transfer address / start address
  output logic [31:0] end_addr,  // last address of a multiple transfer
  output logic        wb_en,     // base register is written back
  output logic [31:0] wb_val,    // changed base (D)
  output logic [4:0]  count      // N
);
  logic [31:0] sum, n4;

  always_comb begin
    count = '0;
    for (int i = 0; i < 16; i++) count += 5'(reglist[i]);
    n4 = {25'd0, count, 2'b00};
    if (!multi) begin
      sum      = u ? (base + offset) : (base - offset);
      addr     = p ? sum : base;
      end_addr = addr;
      wb_en    = !p || w;
      wb_val   = sum;
    end else begin
      sum = '0;
      unique case ({p, u})
        2'b01: begin addr = base;             end_addr = base + n4 - 32'd4; end // IA
        2'b11: begin addr = base + 32'd4;     end_addr = base + n4;         end // IB
        2'b00: begin addr = base - n4 + 32'd4; end_addr = base;             end // DA
        default: begin addr = base - n4;      end_addr = base - 32'd4;      end // DB
      endcase
      wb_en  = w;
      wb_val = u ? (base + n4) : (base - n4);
    end
  end
endmodule
