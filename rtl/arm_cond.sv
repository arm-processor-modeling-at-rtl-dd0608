// arm_cond: condition-code check of the EXE stage.
//
// Almost every ARM instruction carries a 4-bit condition in bits 31..28. The
// instruction has its normal effect only if the N, Z, C, V flags of the CPSR
// satisfy it; otherwise it behaves as a NOP. Encodings (EQ, NE, CS, CC, MI, PL,
// VS, VC, HI, LS, GE, LT, GT, LE, AL) follow the ARM condition table.
// Code 1111 ("NV") is used by architecture 5 for unconditional instructions
// such as BLX <imm>; it is reported as passing and the decoder decides what
// such an instruction is. Combinational.
module arm_cond (
  input  logic [3:0] cond,
  input  logic       n,
  input  logic       z,
  input  logic       c,
  input  logic       v,
  output logic       pass
);
  always_comb begin
    unique case (cond)
      4'h0: pass = z;                    // EQ
      4'h1: pass = !z;                   // NE
      4'h2: pass = c;                    // CS/HS
      4'h3: pass = !c;                   // CC/LO
      4'h4: pass = n;                    // MI
      4'h5: pass = !n;                   // PL
      4'h6: pass = v;                    // VS
      4'h7: pass = !v;                   // VC
      4'h8: pass = c && !z;              // HI
      4'h9: pass = !c || z;              // LS
      4'hA: pass = (n == v);             // GE
      4'hB: pass = (n != v);             // LT
      4'hC: pass = !z && (n == v);       // GT
      4'hD: pass = z || (n != v);        // LE
      default: pass = 1'b1;              // AL, and 1111 (unconditional space)
    endcase
  end
endmodule
