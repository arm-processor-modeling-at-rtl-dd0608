// tb_arm_core: cycle-timing and result test of the pipelined core on its own,
// with single-cycle instruction and data memories modelled in the testbench.
//
// Every test runs a short program: a fixed prologue that sets up registers,
// a body under test placed at 0x120, and a store to 0xFFF0 that ends the run.
// The number of cycles from reset release to that store is compared with the
// same program whose body has the same number of instructions but no hazard.
// The expected extra cycles are the pipeline's documented costs:
//   load-use interlock +1, branch taken in EXE +2, load into the PC (branch
//   in MEM) +3, LDM/STM of N registers +N-1 over a single transfer, SWP +1
//   over a load, multiply +0..+3 depending on the size of Rs (8 bits per
//   cycle), UMLAL +1 over UMULL when the multiply takes one cycle and +0 when
//   it takes more, forwarding paths and the MSR mode forward +0.
// Register and memory results of each body are checked as well.
`timescale 1ns/1ps
module tb_arm_core;
  import arm_pkg::*;
  import arm_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] if_addr, if_instr, d_addr, d_rdata, d_wdata, pc;
  logic        d_we;
  logic [3:0]  d_be;
  preg_t       dbg_reg = 0;
  logic [31:0] dbg_reg_val;
  psr_t        cpsr;
  perf_t       perf;

  arm_core dut (.*);

  logic [31:0] imem [4096];
  logic [31:0] dmem [4096];
  assign if_instr = imem[if_addr[13:2]];
  assign d_rdata  = dmem[d_addr[13:2]];
  always @(posedge clk)
    if (d_we)
      for (int b = 0; b < 4; b++) if (d_be[b]) dmem[d_addr[13:2]][8*b +: 8] <= d_wdata[8*b +: 8];

  int checks = 0, failures = 0;
  localparam logic [31:0] BODY = 32'h120;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // run prologue + body + done store; returns cycles to the done store
  task automatic run(input logic [31:0] body [$], output int cyc);
    logic [31:0] a;
    rst_n = 0;
    foreach (imem[i]) imem[i] = 32'he1a00000;      // mov r0, r0
    foreach (dmem[i]) dmem[i] = 32'd0;
    dmem[32'h1014 >> 2] = BODY + 4;                // target of the LDR PC test
    dmem[32'h1000 >> 2] = 32'd40;
    imem[0] = br(32'h0, 32'h100);
    imem[2] = dpr(MOV, 1, 15, 0, 14);              // SWI vector: movs pc, lr
    a = 32'h100;
    imem[a >> 2] = dpi(MOV, 0, 0, 0, 1, 10);       a += 4;  // r0 = 0x1000
    imem[a >> 2] = dpi(MOV, 0, 1, 0, 5);           a += 4;  // r1 = 5
    imem[a >> 2] = dpi(MOV, 0, 2, 0, 7);           a += 4;  // r2 = 7
    imem[a >> 2] = dpi(MOV, 0, 13, 0, 2, 10);      a += 4;  // sp = 0x2000
    imem[a >> 2] = dpi(MOV, 0, 11, 0, 8'hFF, 12);  a += 4;  // r11 = 0xFF00
    imem[a >> 2] = dpi(ORR, 0, 11, 11, 8'hF0);     a += 4;  // r11 = 0xFFF0
    imem[a >> 2] = dpi(MOV, 0, 9, 0, 8'h7F, 4);    a += 4;  // r9 = 0x7F000000
    imem[a >> 2] = dpi(MOV, 0, 10, 0, 1, 8);       a += 4;  // r10 = 0x10000
    a = BODY;
    foreach (body[i]) begin imem[a >> 2] = body[i]; a += 4; end
    imem[a >> 2] = dpi(MOV, 0, 12, 0, 8'hA5);      a += 4;
    imem[a >> 2] = ldst(0, 0, 12, 11, 0);          a += 4;
    imem[a >> 2] = br(a, a);
    @(negedge clk);
    rst_n = 1;
    cyc = 0;
    forever begin
      @(posedge clk);
      cyc++;
      if (d_we && d_addr == 32'hFFF0) break;
      if (cyc > 500) begin
        failures++;
        $display("FAIL program did not finish");
        break;
      end
    end
    repeat (3) @(negedge clk);
  endtask

  function automatic logic [31:0] r(input int n);
    return 32'(n);
  endfunction

  task automatic rd(input int p, output logic [31:0] v);
    dbg_reg = preg_t'(p); #1; v = dbg_reg_val;
  endtask

  // compare the cost of body `b` with `ref_b`
  task automatic cost(input string what, input logic [31:0] b [$], input logic [31:0] ref_b [$],
                      input int extra);
    int c1, c0;
    run(ref_b, c0);
    run(b, c1);
    checks++;
    if (c1 - c0 != extra) begin
      failures++;
      $display("FAIL %s: %0d extra cycles, expected %0d", what, c1 - c0, extra);
    end else begin
      $display("  %-34s +%0d cycles", what, extra);
    end
  endtask

  initial begin
    #2000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam logic [31:0] MOV3 = 32'he3a03001;     // mov r3, #1

  initial begin
    logic [31:0] v;
    int c;

    // forwarding paths: no cost, correct values
    cost("forwarding (paths 1-3)",
         '{dpr(ADD, 0, 3, 1, 2), dpr(ADD, 0, 4, 3, 3), dpr(ADD, 0, 5, 4, 3), dpr(ADD, 0, 6, 5, 3)},
         '{MOV3, MOV3, MOV3, MOV3}, 0);
    rd(4, v); chk("r4 = 2*(5+7)", v, 24);
    rd(5, v); chk("r5 = r4+r3", v, 36);
    rd(6, v); chk("r6 = r5+r3", v, 48);

    // load-use interlock
    cost("load-use interlock", '{ldst(1, 0, 5, 0, 0), dpi(ADD, 0, 6, 5, 1)},
         '{ldst(1, 0, 5, 0, 0), dpi(ADD, 0, 6, 1, 1)}, 1);
    cost("load-use, one instruction between",
         '{ldst(1, 0, 5, 0, 0), MOV3, dpi(ADD, 0, 6, 5, 1)},
         '{ldst(1, 0, 5, 0, 0), MOV3, dpi(ADD, 0, 6, 1, 1)}, 0);
    rd(6, v); chk("loaded value forwarded", v, 41);
    run('{ldst(1, 0, 5, 0, 0), dpi(ADD, 0, 6, 5, 1)}, c);
    rd(6, v); chk("interlocked value", v, 41);

    // store data of a just-loaded register: forwarding path 4, no stall
    cost("load then store (path 4)", '{ldst(1, 0, 5, 0, 0), ldst(0, 0, 5, 0, 8)},
         '{ldst(1, 0, 5, 0, 0), ldst(0, 0, 1, 0, 8)}, 0);
    chk("stored loaded value", dmem[32'h1008 >> 2], 40);

    // branches
    cost("branch taken in EXE", '{br(BODY, BODY + 4), MOV3}, '{MOV3, MOV3}, 2);
    cost("branch not taken", '{cond(br(BODY, BODY + 4), EQ), MOV3}, '{MOV3, MOV3}, 0);
    cost("load into PC (branch in MEM)", '{ldst(1, 0, 15, 0, 20), MOV3},
         '{ldst(1, 0, 3, 0, 20), MOV3}, 3);

    // multiple transfers
    cost("LDM of 4 registers", '{ldstm(1, 13, 16'h0078, 0, 1, 0)}, '{ldst(1, 0, 3, 13, 0)}, 3);
    cost("STM of 4 registers", '{ldstm(0, 13, 16'h0006, 0, 1, 0), ldstm(0, 13, 16'h001E, 0, 1, 0)},
         '{ldstm(0, 13, 16'h0006, 0, 1, 0), ldst(0, 0, 3, 13, 0)}, 3);
    chk("STM word 0", dmem[32'h2000 >> 2], 5);
    chk("STM word 1", dmem[32'h2004 >> 2], 7);
    cost("STMDB sp! / LDMIA sp!",
         '{ldstm(0, 13, 16'h0006, 1, 0, 1), ldstm(1, 13, 16'h0018, 0, 1, 1)},
         '{ldst(0, 0, 1, 13, 0), ldst(1, 0, 3, 13, 0)}, 2);
    rd(3, v);  chk("LDM r3", v, 5);
    rd(4, v);  chk("LDM r4", v, 7);
    rd(25, v); chk("sp back", v, 32'h2000);

    // swap
    cost("SWP", '{swp(3, 1, 0)}, '{ldst(1, 0, 3, 0, 0)}, 1);
    rd(3, v); chk("SWP read", v, 40);
    chk("SWP write", dmem[32'h1000 >> 2], 5);

    // multiplies: 8 bits of Rs per cycle
    cost("MUL, Rs < 256", '{mul(3, 1, 2)}, '{MOV3}, 0);
    cost("MUL, Rs = 0x10000", '{mul(3, 1, 10)}, '{MOV3}, 2);
    cost("MUL, Rs = 0x7F000000", '{mul(3, 1, 9)}, '{MOV3}, 3);
    rd(3, v); chk("MUL result", v, 32'h7B00_0000);
    cost("UMLAL vs UMULL", '{mull(3, 4, 1, 2, 0, 1)}, '{mull(3, 4, 1, 2, 0, 0)}, 1);
    run('{dpi(MOV, 0, 3, 0, 8'hFF), dpi(MVN, 0, 4, 0, 0), mull(3, 4, 1, 2, 0, 1)}, c);
    rd(3, v); chk("UMLAL lo", v, 255 + 35);
    rd(4, v); chk("UMLAL hi", v, 32'hFFFF_FFFF);
    // with a multiply of several cycles RdLo/RdHi are read while it runs
    cost("UMLAL vs UMULL, Rs = 0x7F000000", '{mull(3, 4, 1, 9, 0, 1)}, '{mull(3, 4, 1, 9, 0, 0)}, 0);
    run('{dpi(MOV, 0, 3, 0, 8'hFF), dpi(MVN, 0, 4, 0, 0), mull(3, 4, 1, 9, 0, 1)}, c);
    rd(3, v); chk("UMLAL long lo", v, 32'h7B00_00FF);
    rd(4, v); chk("UMLAL long hi", v, 32'h0000_0001);
    run('{dpi(MOV, 0, 3, 0, 8'hFF), dpi(MVN, 0, 4, 0, 0), mull(3, 4, 1, 9, 1, 1)}, c);
    rd(3, v); chk("SMLAL long lo", v, 32'h7B00_00FF);
    rd(4, v); chk("SMLAL long hi", v, 32'h0000_0001);
    // condition failed: nothing written, the next instruction still runs
    run('{dpi(MOV, 0, 3, 0, 8'h11), dpr(CMP, 1, 0, 1, 1), cond(mull(3, 4, 1, 9, 0, 1), NE),
          dpi(MOV, 0, 4, 0, 8'h22)}, c);
    rd(3, v); chk("UMLALNE lo", v, 32'h11);
    rd(4, v); chk("UMLALNE hi", v, 32'h22);

    // MSR mode change: the next instruction reads/writes the new bank at once
    cost("MSR mode change", '{msr_i(0, 4'b0001, 8'hD2), dpi(MOV, 0, 13, 0, 3, 10),
                              msr_i(0, 4'b0001, 8'hD3)}, '{MOV3, MOV3, MOV3}, 0);
    rd(23, v); chk("r13_irq", v, 32'h3000);
    rd(25, v); chk("r13_svc", v, 32'h2000);

    // SWI and return: two instructions that each lose 2 cycles (6) vs 3 moves
    cost("SWI + MOVS PC,LR", '{swi(0)}, '{MOV3, MOV3, MOV3}, 3);
    chk("mode after return", 32'(cpsr.mode), 32'h13);

    // conditional execution: failed instructions do nothing
    run('{dpr(CMP, 1, 0, 1, 2), cond(dpi(MOV, 0, 3, 0, 1), GE), cond(dpi(MOV, 0, 3, 0, 2), LT)}, c);
    rd(3, v); chk("condition LT taken, GE skipped", v, 2);
    chk("N flag", 32'(cpsr.n), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
