// arm_shifter: the barrel shifter of the EXE stage (ARM addressing mode 1).
//
// It produces the second ALU operand (shifter_operand) and the shifter carry
// out. Three forms are supported, selected by `kind`:
//   SK_IMM_ROT  8-bit immediate rotated right by 2*rot (amount = 2*rot);
//               carry = C flag when the rotation is 0, else bit 31 of the result.
//   SK_IMM_SH   Rm shifted by a 5-bit immediate. LSL #0 passes Rm and the C flag;
//               LSR #0 and ASR #0 mean a shift by 32; ROR #0 is RRX (rotate right
//               by one through the carry, "ROX" in the description).
//   SK_REG_SH   Rm shifted by the bottom byte of Rs, with the architectural rules
//               for amounts 0, 32 and above 32.
// The same unit builds the scaled register offset of addressing mode 2.
// Purely combinational. The shift rules are those of the ARM architecture as
// described for addressing mode 1; the use of 33-bit shifts to obtain the carry
// is this implementation's own.
module arm_shifter
  import arm_pkg::*;
(
  input  logic [1:0]  kind,      // 0 SK_IMM_ROT, 1 SK_IMM_SH, 2 SK_REG_SH
  input  shift_e      typ,       // LSL / LSR / ASR / ROR
  input  logic [31:0] value,     // Rm, or the zero-extended 8-bit immediate
  input  logic [7:0]  amount,    // shift amount (2*rot for SK_IMM_ROT)
  input  logic        c_in,      // C flag of the CPSR
  output logic [31:0] result,
  output logic        carry
);
  localparam logic [1:0] SK_IMM_ROT = 2'd0;
  localparam logic [1:0] SK_IMM_SH  = 2'd1;

  function automatic logic [31:0] ror32(input logic [31:0] v, input logic [4:0] k);
    return (v >> k) | (v << (6'd32 - {1'b0, k}));
  endfunction

  logic [32:0] lsl_t, lsr_t;
  logic signed [32:0] asr_t;
  logic [5:0] n;               // effective amount, clamped to 32 where it matters

  always_comb begin
    result = value;
    carry  = c_in;
    n      = (amount > 8'd32) ? 6'd32 : amount[5:0];
    lsl_t  = '0;
    lsr_t  = '0;
    asr_t  = '0;
    if (kind == SK_IMM_ROT) begin
      result = ror32(value, amount[4:0]);
      carry  = (amount[4:0] == 5'd0) ? c_in : result[31];
    end else if (kind == SK_IMM_SH && amount[4:0] == 5'd0) begin
      // special encodings of a zero immediate shift
      unique case (typ)
        SH_LSL: begin result = value;                    carry = c_in;     end
        SH_LSR: begin result = '0;                       carry = value[31]; end
        SH_ASR: begin result = {32{value[31]}};          carry = value[31]; end
        SH_ROR: begin result = {c_in, value[31:1]};      carry = value[0];  end
      endcase
    end else if (amount == 8'd0) begin
      result = value;
      carry  = c_in;
    end else begin
      unique case (typ)
        SH_LSL: begin
          lsl_t = {1'b0, value} << n;
          if (amount > 8'd32) begin result = '0; carry = 1'b0; end
          else begin result = lsl_t[31:0]; carry = lsl_t[32]; end
        end
        SH_LSR: begin
          lsr_t = {value, 1'b0} >> n;
          if (amount > 8'd32) begin result = '0; carry = 1'b0; end
          else begin result = lsr_t[32:1]; carry = lsr_t[0]; end
        end
        SH_ASR: begin
          asr_t  = $signed({value, 1'b0}) >>> n;
          result = asr_t[32:1];
          carry  = asr_t[0];
        end
        SH_ROR: begin
          result = ror32(value, amount[4:0]);
          carry  = result[31];
        end
      endcase
    end
  end
endmodule
