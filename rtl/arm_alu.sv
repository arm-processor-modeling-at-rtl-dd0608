// arm_alu: the integer ALU of the EXE stage.
//
// Computes the sixteen ARM data-processing operations (AND, EOR, SUB, RSB, ADD,
// ADC, SBC, RSC, TST, TEQ, CMP, CMN, ORR, MOV, BIC, MVN) on operand A (Rn) and
// the shifter operand, together with the new N, Z, C and V flags:
//   N = bit 31 of the result, Z = result is zero,
//   C = carry out of an addition, NOT borrow of a subtraction, or the shifter
//       carry for logical operations,
//   V = signed overflow of an addition/subtraction, unchanged for logical ones.
// It also counts the leading zeros of operand B for CLZ. `wr_rd` is low for the
// four comparison operations, which only set flags.
// Purely combinational. The operation set and flag rules follow the ARM
// architecture; the single 33-bit adder shared by all arithmetic operations is
// this implementation's choice.
module arm_alu
  import arm_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,        // Rn
  input  logic [31:0] b,        // shifter operand
  input  logic        c_in,     // C flag (for ADC/SBC/RSC)
  input  logic        v_in,     // V flag (kept by logical operations)
  input  logic        sh_c,     // shifter carry out
  output logic [31:0] result,
  output logic        n,
  output logic        z,
  output logic        c,
  output logic        v,
  output logic        wr_rd,
  output logic [31:0] clz       // leading zeros of b (0..32)
);
  logic [31:0] x, y;
  logic        cin, arith;
  logic [32:0] sum;

  always_comb begin
    // arithmetic operations are x + y + cin
    x = a; y = b; cin = 1'b0; arith = 1'b1;
    unique case (op)
      OP_SUB, OP_CMP: begin x = a;  y = ~b; cin = 1'b1; end
      OP_RSB:         begin x = b;  y = ~a; cin = 1'b1; end
      OP_ADD, OP_CMN: begin x = a;  y = b;  cin = 1'b0; end
      OP_ADC:         begin x = a;  y = b;  cin = c_in; end
      OP_SBC:         begin x = a;  y = ~b; cin = c_in; end
      OP_RSC:         begin x = b;  y = ~a; cin = c_in; end
      default:        arith = 1'b0;
    endcase
    sum = {1'b0, x} + {1'b0, y} + {32'b0, cin};

    unique case (op)
      OP_AND, OP_TST: result = a & b;
      OP_EOR, OP_TEQ: result = a ^ b;
      OP_ORR:         result = a | b;
      OP_MOV:         result = b;
      OP_BIC:         result = a & ~b;
      OP_MVN:         result = ~b;
      default:        result = sum[31:0];
    endcase

    n = result[31];
    z = (result == 32'd0);
    if (arith) begin
      c = sum[32];
      v = (x[31] == y[31]) && (sum[31] != x[31]);
    end else begin
      c = sh_c;
      v = v_in;
    end
    wr_rd = !(op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN});
  end

  // count leading zeros
  always_comb begin
    clz = 32'd32;
    for (int i = 0; i < 32; i++) begin
      if (b[i]) clz = 32'(31 - i);
    end
  end
endmodule
