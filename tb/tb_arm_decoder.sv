// tb_arm_decoder: checks the ID-stage decoder on a table of encodings covering
// every instruction class, including the words of a compiled recursive
// Fibonacci routine (APCS prologue/epilogue with STMDB/LDMDB), multiplies,
// swaps, halfword transfers, PSR transfers, BX/BLX/CLZ/BKPT/SWI, and encodings
// that must become no-operations (coprocessor, LDRD, undefined, LDM with an
// empty list). For each word the class and the registers read through ports A,
// Bb and C (with their use flags, the store-data flag and the SWP-data flag)
// are compared with the expected values. A condition field of 0000 (EQ) must
// not change the decode. Combinational.
`timescale 1ns/1ps
module tb_arm_decoder;
  import arm_pkg::*;
  logic [31:0] ir;
  iclass_e     cls;
  srcsel_t     sel;
  logic        c_is_store, b_is_swp;
  int checks = 0, failures = 0;

  arm_decoder dut (.*);

  // expected: a_used a_reg b_used b_reg c_used c_reg as 6 small ints; -1 = unused
  task automatic t(input logic [31:0] w, input iclass_e ec, input int ea, input int eb,
                   input int ecc, input bit st = 0, input bit sw = 0);
    for (int pass = 0; pass < 2; pass++) begin
      ir = (pass == 0) ? w : {4'h0, w[27:0]};
      if (pass == 1 && w[31:28] == 4'hF) break;
      #1;
      checks++;
      if (cls !== ec || sel.a_used !== (ea >= 0) || (ea >= 0 && sel.a_reg !== 4'(ea)) ||
          sel.b_used !== (eb >= 0) || (eb >= 0 && sel.b_reg !== 4'(eb)) ||
          sel.c_used !== (ecc >= 0) || (ecc >= 0 && ecc < 16 && sel.c_reg !== 4'(ecc)) ||
          c_is_store !== st || b_is_swp !== sw) begin
        failures++;
        $display("FAIL %h: got %s a=%b/%0d b=%b/%0d c=%b/%0d st=%b sw=%b expected %s %0d %0d %0d",
                 ir, cls.name(), sel.a_used, sel.a_reg, sel.b_used, sel.b_reg, sel.c_used,
                 sel.c_reg, c_is_store, b_is_swp, ec.name(), ea, eb, ecc);
      end
    end
  endtask

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // Fibonacci routine words
    t(32'he1a0c00d, C_DP,   -1, 13, -1);        // mov ip, sp
    t(32'he92dd800, C_STM,  13, -1, 99, 1);     // stmdb sp!, {fp, ip, lr, pc}
    t(32'he24cb004, C_DP,   12, -1, -1);        // sub fp, ip, #4
    t(32'he3a0300f, C_DP,   -1, -1, -1);        // mov r3, #15
    t(32'he50b3010, C_LDST, 11, -1, 3, 1);      // str r3, [fp, #-16]
    t(32'he51b0010, C_LDST, 11, -1, -1);        // ldr r0, [fp, #-16]
    t(32'heb000005, C_B,    -1, -1, -1);        // bl
    t(32'he3530001, C_DP,    3, -1, -1);        // cmp r3, #1
    t(32'h0a000003, C_B,    -1, -1, -1);        // beq
    t(32'he91ba800, C_LDM,  11, -1, -1);        // ldmdb fp, {fp, sp, pc}
    t(32'he0843000, C_DP,    4,  0, -1);        // add r3, r4, r0
    // other classes
    t(32'he0010231, C_DP,    1,  1, 2);         // and r0, r1, r1, lsr r2
    t(32'he7910102, C_LDST,  1,  2, -1);        // ldr r0, [r1, r2, lsl #2]
    t(32'he0010392, C_MUL,  -1,  2, 3);         // mul r1, r2, r3
    t(32'he0214392, C_MUL,   4,  2, 3);         // mla r1, r2, r3, r4
    t(32'he0810392, C_MULL, -1,  2, 3);         // umull r0, r1, r2, r3
    t(32'he0c10392, C_MULL, -1,  2, 3);         // smull
    t(32'he0a10392, C_MLAL, -1,  2, 3);         // umlal
    t(32'he0e10392, C_MLAL, -1,  2, 3);         // smlal
    t(32'he1021093, C_SWP,   2,  3, -1, 0, 1);  // swp r1, r3, [r2]
    t(32'he1421093, C_SWP,   2,  3, -1, 0, 1);  // swpb
    t(32'he1d010b2, C_LDSTH, 0, -1, -1);        // ldrh r1, [r0, #2]
    t(32'he19010b2, C_LDSTH, 0,  2, -1);        // ldrh r1, [r0, r2]
    t(32'he1c010b2, C_LDSTH, 0, -1, 1, 1);      // strh r1, [r0, #2]
    t(32'he1d010d1, C_LDSTH, 0, -1, -1);        // ldrsb r1, [r0, #1]
    t(32'he10f0000, C_MRS,  -1, -1, -1);        // mrs r0, cpsr
    t(32'he129f001, C_MSR,  -1,  1, -1);        // msr cpsr_fc, r1
    t(32'he321f0d3, C_MSR,  -1, -1, -1);        // msr cpsr_c, #0xd3
    t(32'he12fff11, C_BX,   -1,  1, -1);        // bx r1
    t(32'he12fff31, C_BLX2, -1,  1, -1);        // blx r1
    t(32'he16f0f11, C_CLZ,  -1,  1, -1);        // clz r0, r1
    t(32'he1200070, C_BKPT, -1, -1, -1);        // bkpt
    t(32'hef000000, C_SWI,  -1, -1, -1);        // swi 0
    t(32'hfa000000, C_BLX1, -1, -1, -1);        // blx <imm>
    t(32'he8bd8010, C_LDM,  13, -1, -1);        // ldmia sp!, {r4, pc}
    // no-operations
    t(32'hee010f10, C_NOP,  -1, -1, -1);        // mcr
    t(32'hed900100, C_NOP,  -1, -1, -1);        // ldc
    t(32'he1c020d0, C_NOP,  -1, -1, -1);        // ldrd
    t(32'he7f000f0, C_NOP,  -1, -1, -1);        // undefined
    t(32'he8bd0000, C_NOP,  -1, -1, -1);        // ldm with an empty list
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
