// arm_asm_pkg: a tiny ARM (v5, ARM state) instruction encoder used by the test
// benches to build programs in memory. Every function returns one 32-bit
// instruction word with condition AL unless `cc` overrides it. Register
// numbers are 0..15, immediates are given as (imm8, rot) pairs exactly as the
// data-processing encoding stores them (value = imm8 rotated right by 2*rot).
package arm_asm_pkg;
  localparam logic [3:0] AL = 4'hE, EQ = 4'h0, NE = 4'h1, GE = 4'hA, LT = 4'hB, GT = 4'hC,
                         LE = 4'hD;
  localparam logic [3:0] AND = 4'h0, EOR = 4'h1, SUB = 4'h2, RSB = 4'h3, ADD = 4'h4,
                         ADC = 4'h5, SBC = 4'h6, RSC = 4'h7, TST = 4'h8, TEQ = 4'h9,
                         CMP = 4'hA, CMN = 4'hB, ORR = 4'hC, MOV = 4'hD, BIC = 4'hE,
                         MVN = 4'hF;

  function automatic logic [31:0] cond(input logic [31:0] w, input logic [3:0] cc);
    return {cc, w[27:0]};
  endfunction
  // data processing, immediate operand
  function automatic logic [31:0] dpi(input logic [3:0] op, input bit s, input int rd,
                                      input int rn, input int imm8, input int rot = 0);
    return {AL, 3'b001, op, s, 4'(rn), 4'(rd), 4'(rot), 8'(imm8)};
  endfunction
  // data processing, register operand shifted by an immediate
  function automatic logic [31:0] dpr(input logic [3:0] op, input bit s, input int rd,
                                      input int rn, input int rm, input int sh = 0,
                                      input int amt = 0);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), 5'(amt), 2'(sh), 1'b0, 4'(rm)};
  endfunction
  // data processing, register operand shifted by Rs
  function automatic logic [31:0] dprs(input logic [3:0] op, input bit s, input int rd,
                                       input int rn, input int rm, input int sh, input int rs);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), 4'(rs), 1'b0, 2'(sh), 1'b1, 4'(rm)};
  endfunction
  // LDR/STR word or byte, immediate offset (negative allowed)
  function automatic logic [31:0] ldst(input bit l, input bit b, input int rd, input int rn,
                                       input int off, input bit p = 1, input bit w = 0);
    logic u;
    u = (off >= 0);
    return {AL, 3'b010, p, u, b, w, l, 4'(rn), 4'(rd), 12'(u ? off : -off)};
  endfunction
  // LDRH/STRH/LDRSB/LDRSH, immediate offset
  function automatic logic [31:0] ldsth(input bit l, input bit s, input bit h, input int rd,
                                        input int rn, input int off);
    logic u; logic [7:0] o;
    u = (off >= 0);
    o = 8'(u ? off : -off);
    return {AL, 3'b000, 1'b1, u, 1'b1, 1'b0, l, 4'(rn), 4'(rd), o[7:4], 1'b1, s, h, 1'b1, o[3:0]};
  endfunction
  // LDM/STM
  function automatic logic [31:0] ldstm(input bit l, input int rn, input logic [15:0] list,
                                        input bit p, input bit u, input bit w, input bit s = 0);
    return {AL, 3'b100, p, u, s, w, l, 4'(rn), list};
  endfunction
  // B / BL from address `from` to address `to`
  function automatic logic [31:0] br(input logic [31:0] from, input logic [31:0] to,
                                     input bit link = 0);
    logic [31:0] d;
    d = (to - (from + 32'd8)) >> 2;
    return {AL, 3'b101, link, d[23:0]};
  endfunction
  function automatic logic [31:0] mul(input int rd, input int rm, input int rs,
                                      input bit acc = 0, input int rn = 0);
    return {AL, 7'b0000000, acc, 1'b0, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  // UMULL/SMULL/UMLAL/SMLAL: sgn selects S, acc selects the accumulate forms
  function automatic logic [31:0] mull(input int rdlo, input int rdhi, input int rm, input int rs,
                                       input bit sgn, input bit acc);
    return {AL, 5'b00001, sgn, acc, 1'b0, 4'(rdhi), 4'(rdlo), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] swp(input int rd, input int rm, input int rn, input bit b = 0);
    return {AL, 5'b00010, b, 2'b00, 4'(rn), 4'(rd), 4'b0000, 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] mrs(input int rd, input bit spsr = 0);
    return {AL, 5'b00010, spsr, 2'b00, 4'hF, 4'(rd), 12'h000};
  endfunction
  function automatic logic [31:0] msr_i(input bit spsr, input logic [3:0] mask, input int imm8,
                                        input int rot = 0);
    return {AL, 5'b00110, spsr, 2'b10, mask, 4'hF, 4'(rot), 8'(imm8)};
  endfunction
  function automatic logic [31:0] swi(input int n);
    return {AL, 4'hF, 24'(n)};
  endfunction
  function automatic logic [31:0] bkpt();
    return 32'hE120_0070;
  endfunction
  function automatic logic [31:0] clz(input int rd, input int rm);
    return {AL, 8'h16, 4'hF, 4'(rd), 4'hF, 4'h1, 4'(rm)};
  endfunction
  function automatic logic [31:0] bx(input int rm);
    return {AL, 24'h12FFF1, 4'(rm)};
  endfunction
  function automatic logic [31:0] nop();
    return dpr(MOV, 0, 0, 0, 0);   // MOV r0, r0
  endfunction
endpackage
