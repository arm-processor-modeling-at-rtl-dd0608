// tb_arm_top: end-to-end test of the ARM core system at its default sizes.
//
// Program 1 ("mechanisms") runs a hand-assembled sequence that exercises every
// pipeline mechanism: forwarding paths 1-4, the load-use interlock, the LDM,
// STM, SWP, multiply and long-multiply-accumulate locks, branches resolved in
// EXE and in MEM, conditional execution, an MSR mode change forwarded to
// decode, SWI and BKPT exceptions with return through MOVS PC,LR, and CLZ.
// Register and memory results are compared with values worked out by hand, and
// each mechanism's event counter must be non-zero.
// Program 2 is the recursive Fibonacci routine in the APCS frame style of a C
// compiler (STMDB with PC in the list, LDMDB returning into the PC), computing
// fib(15). The result must be 610 and the number of retired instructions must
// match the count derived from the call tree (1219 calls).
// Each program signals completion by storing 0xA5 at address 0xFFF0.
`timescale 1ns/1ps
module tb_arm_top;
  import arm_pkg::*;
  import arm_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        iload_we = 0, dload_we = 0;
  logic [31:0] iload_addr = 0, iload_data = 0, dload_addr = 0, dload_data = 0;
  preg_t       dbg_reg = 0;
  logic [31:0] dbg_reg_val, dbg_addr = 0, dbg_mem_val, pc;
  psr_t        cpsr;
  perf_t       perf;

  arm_top dut (.*);

  int checks = 0, failures = 0;
  localparam logic [31:0] DONE = 32'h0000_FFF0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // program image built here, then loaded
  logic [31:0] img [logic [31:0]];
  task automatic put(input logic [31:0] a, input logic [31:0] w);
    img[a] = w;
  endtask

  task automatic load_and_run(input int max_cycles, output perf_t at_done);
    rst_n = 0;
    // clear the words used for completion and data
    @(negedge clk);
    dload_we = 1; dload_addr = DONE; dload_data = 0;
    @(negedge clk);
    dload_we = 0;
    foreach (img[a]) begin
      iload_we = 1; iload_addr = a; iload_data = img[a];
      @(negedge clk);
    end
    iload_we = 0;
    @(negedge clk);
    rst_n = 1;
    dbg_addr = DONE;
    for (int i = 0; i < max_cycles; i++) begin
      @(negedge clk);
      if (dbg_mem_val == 32'hA5) break;
    end
    at_done = perf;
    checks++;
    if (dbg_mem_val != 32'hA5) begin
      failures++;
      $display("FAIL program did not finish in %0d cycles (pc=%h)", max_cycles, pc);
    end
    repeat (4) @(negedge clk);
  endtask

  function automatic logic [31:0] reg_of(input int p);
    return 32'(p);
  endfunction

  task automatic rd_reg(input preg_t p, output logic [31:0] v);
    dbg_reg = p; #1; v = dbg_reg_val;
  endtask
  task automatic rd_mem(input logic [31:0] a, output logic [31:0] v);
    dbg_addr = a; #1; v = dbg_mem_val;
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    perf_t p;
    logic [31:0] v, a;
    logic [31:0] exp_regs [13];

    // ------------------------------------------------ program 1: mechanisms
    img.delete();
    put(32'h000, br(32'h000, 32'h100));
    put(32'h008, br(32'h008, 32'h300));          // SWI vector
    put(32'h00C, br(32'h00C, 32'h340));          // BKPT (prefetch abort) vector
    a = 32'h100;
    put(a, dpi(MOV, 0, 0, 0, 1, 10));  a += 4;   // r0 = 0x1000
    put(a, dpi(MOV, 0, 1, 0, 5));      a += 4;   // r1 = 5
    put(a, dpi(MOV, 0, 2, 0, 7));      a += 4;   // r2 = 7
    put(a, dpr(ADD, 0, 3, 1, 2));      a += 4;   // r3 = 12        (paths 2, 3)
    put(a, dpr(SUB, 0, 4, 3, 1, 0, 1)); a += 4;  // r4 = 12-10 = 2 (path 1 on r1)
    put(a, ldst(0, 0, 3, 0, 0));       a += 4;   // [0x1000] = 12
    put(a, ldst(1, 0, 5, 0, 0));       a += 4;   // r5 = 12
    put(a, dpi(ADD, 0, 6, 5, 1));      a += 4;   // r6 = 13        (interlock)
    put(a, ldst(1, 0, 7, 0, 0));       a += 4;   // r7 = 12
    put(a, ldst(0, 0, 7, 0, 4));       a += 4;   // [0x1004] = 12  (path 4)
    put(a, mul(8, 1, 2));              a += 4;   // r8 = 35
    put(a, ldst(0, 0, 8, 0, 28));      a += 4;   // [0x101C] = 35
    put(a, dpi(MOV, 0, 9, 0, 8'h7F, 4)); a += 4; // r9 = 0x7F000000
    put(a, mul(10, 2, 9));             a += 4;   // r10 = 0x79000000 (4 cycles)
    put(a, ldst(0, 0, 10, 0, 24));     a += 4;   // [0x1018]
    put(a, mull(11, 12, 9, 9, 0, 0));  a += 4;   // r12:r11 = 0x3F010000_00000000
    put(a, mull(11, 12, 1, 2, 0, 1));  a += 4;   // UMLAL += 35
    put(a, ldst(0, 0, 11, 0, 8));      a += 4;   // [0x1008] = 35
    put(a, ldst(0, 0, 12, 0, 12));     a += 4;   // [0x100C] = 0x3F010000
    put(a, dpi(MOV, 0, 13, 0, 2, 10)); a += 4;   // sp = 0x2000
    put(a, ldstm(0, 13, 16'h001E, 1, 0, 1)); a += 4; // STMDB sp!, {r1-r4}
    put(a, ldstm(1, 13, 16'h01E0, 0, 1, 1)); a += 4; // LDMIA sp!, {r5-r8}
    put(a, dpr(ADD, 0, 9, 8, 7));      a += 4;   // r9 = 2 + 12 = 14 (interlock)
    put(a, swp(10, 9, 0));             a += 4;   // r10 = 12, [0x1000] = 14
    put(a, dpi(ADD, 0, 11, 10, 0));    a += 4;   // r11 = 12
    put(a, dpr(CMP, 1, 0, 1, 2));      a += 4;   // 5 - 7: N=1
    put(a, cond(dpi(MOV, 0, 12, 0, 1), LT)); a += 4; // r12 = 1
    put(a, cond(dpi(MOV, 0, 12, 0, 2), GE)); a += 4; // not executed
    put(a, br(a, 32'h2C0, 1));         a += 4;   // BL func: r3 += 100
    put(a, dpi(MOV, 0, 4, 0, 0));      a += 4;   // r4 = 0
    put(a, msr_i(0, 4'b0001, 8'hD2));  a += 4;   // IRQ mode
    put(a, dpi(MOV, 0, 13, 0, 3, 10)); a += 4;   // r13_irq = 0x3000
    put(a, msr_i(0, 4'b0001, 8'hD3));  a += 4;   // back to SVC
    put(a, ldst(0, 0, 13, 0, 16));     a += 4;   // [0x1010] = 0x2000
    put(a, dpi(MOV, 0, 5, 0, 8'h26, 14)); a += 4; // r5 = 0x260
    put(a, ldst(0, 0, 5, 0, 20));      a += 4;   // [0x1014] = 0x260
    put(a, ldst(1, 0, 15, 0, 20));     a += 4;   // LDR pc -> 0x260 (branch in MEM)
    put(a, dpi(MOV, 0, 6, 0, 8'hEE));  a += 4;   // cancelled
    put(a, dpi(MOV, 0, 6, 0, 8'hEE));  a += 4;   // cancelled
    a = 32'h260;
    put(a, swi(0));                    a += 4;   // handler sets r8 = 0x55
    put(a, clz(7, 1));                 a += 4;   // r7 = 29
    put(a, bkpt());                    a += 4;   // handler sets r4 = 0x66
    put(a, mrs(10));                   a += 4;   // r10 = CPSR
    put(a, dpi(MOV, 0, 14, 0, 8'hFF, 12)); a += 4; // lr = 0xFF00
    put(a, dpi(ORR, 0, 14, 14, 8'hF0)); a += 4;  // lr = 0xFFF0
    put(a, dpi(MOV, 0, 13, 0, 8'hA5)); a += 4;   // sp = 0xA5
    put(a, ldst(0, 0, 13, 14, 0));     a += 4;   // done
    put(a, br(a, a));                  a += 4;
    put(32'h2C0, dpi(ADD, 0, 3, 3, 100));
    put(32'h2C4, dpr(MOV, 0, 15, 0, 14));        // mov pc, lr
    put(32'h300, dpi(MOV, 0, 8, 0, 8'h55));
    put(32'h304, dpr(MOV, 1, 15, 0, 14));        // movs pc, lr
    put(32'h340, dpi(MOV, 0, 4, 0, 8'h66));
    put(32'h344, dpr(MOV, 1, 15, 0, 14));

    load_and_run(2000, p);
    exp_regs = '{32'h1000, 5, 7, 112, 32'h66, 32'h260, 7, 29, 32'h55, 14, 32'h8000_00D3, 12, 1};
    for (int r = 0; r < 13; r++) begin
      rd_reg(preg_t'(r), v);
      check($sformatf("prog1 r%0d", r), v, exp_regs[r]);
    end
    rd_reg(5'd25, v); check("prog1 r13_svc", v, 32'hA5);
    rd_reg(5'd26, v); check("prog1 r14_svc", v, 32'hFFF0);
    rd_reg(5'd23, v); check("prog1 r13_irq", v, 32'h3000);
    rd_mem(32'h1000, v); check("mem 1000 (swp)", v, 14);
    rd_mem(32'h1004, v); check("mem 1004 (path 4)", v, 12);
    rd_mem(32'h1008, v); check("mem 1008 (umlal lo)", v, 35);
    rd_mem(32'h100C, v); check("mem 100c (umlal hi)", v, 32'h3F01_0000);
    rd_mem(32'h1010, v); check("mem 1010 (svc sp)", v, 32'h2000);
    rd_mem(32'h1018, v); check("mem 1018 (mul)", v, 32'h7900_0000);
    rd_mem(32'h101C, v); check("mem 101c (mul)", v, 35);
    rd_mem(32'h1FF0, v); check("mem 1ff0 (stm)", v, 5);
    rd_mem(32'h1FF4, v); check("mem 1ff4 (stm)", v, 7);
    rd_mem(32'h1FF8, v); check("mem 1ff8 (stm)", v, 12);
    rd_mem(32'h1FFC, v); check("mem 1ffc (stm)", v, 2);
    check("CPSR mode after return", {27'd0, cpsr.mode}, 32'h13);

    // every mechanism happened
    begin
      logic [31:0] ev [15];
      string nm [15];
      ev = '{perf.fwd_p1, perf.fwd_p2, perf.fwd_p3, perf.fwd_p4, perf.ld_interlock,
             perf.ldm_lock, perf.stm_lock, perf.swp_lock, perf.mul_lock, perf.lmul_lock,
             perf.exe_branch, perf.mem_branch, perf.msr_mode_fwd, perf.exceptions,
             perf.cond_fail};
      nm = '{"forward path 1", "forward path 2", "forward path 3", "forward path 4",
             "load-use interlock", "LDM lock", "STM lock", "SWP lock", "MUL lock",
             "long MAC lock", "EXE branch", "MEM branch", "MSR mode forward",
             "exception", "condition failed"};
      for (int k = 0; k < 15; k++) begin
        checks++;
        if (ev[k] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", nm[k]);
        end else begin
          $display("  %-20s %0d", nm[k], ev[k]);
        end
      end
    end
    $display("program 1: %0d instructions, %0d cycles", p.instrs, p.cycles);

    // ------------------------------------------------ program 2: fib(15)
    img.delete();
    put(32'h000, br(32'h000, 32'h100));
    put(32'h100, dpi(MOV, 0, 13, 0, 8'hF0, 12));   // sp = 0xF000
    put(32'h104, br(32'h104, 32'h8000, 1));        // bl _start
    put(32'h108, dpi(MOV, 0, 2, 0, 8'hFF, 12));    // r2 = 0xFF00
    put(32'h10C, dpi(ORR, 0, 2, 2, 8'hF0));        // r2 = 0xFFF0
    put(32'h110, dpi(MOV, 0, 3, 0, 8'hA5));
    put(32'h114, ldst(0, 0, 0, 2, 4));             // [0xFFF4] = result
    put(32'h118, ldst(0, 0, 3, 2, 0));             // done
    put(32'h11C, br(32'h11C, 32'h11C));
    // _start and fib, APCS frames
    put(32'h8000, 32'he1a0c00d); put(32'h8004, 32'he92dd800);
    put(32'h8008, 32'he24cb004); put(32'h800c, 32'he24dd004);
    put(32'h8010, 32'he3a0300f); put(32'h8014, 32'he50b3010);
    put(32'h8018, 32'he51b0010); put(32'h801c, 32'heb000005);
    put(32'h8020, 32'he1a03000); put(32'h8024, 32'he1a00003);
    put(32'h8028, 32'hea000001); put(32'h802c, 32'hea000000);
    put(32'h8030, 32'heaffffff); put(32'h8034, 32'he91ba800);
    put(32'h8038, 32'he1a0c00d); put(32'h803c, 32'he92dd810);
    put(32'h8040, 32'he24cb004); put(32'h8044, 32'he24dd004);
    put(32'h8048, 32'he50b0014); put(32'h804c, 32'he51b3014);
    put(32'h8050, 32'he3530001); put(32'h8054, 32'h0a000003);
    put(32'h8058, 32'he51b3014); put(32'h805c, 32'he3530002);
    put(32'h8060, 32'h0a000000); put(32'h8064, 32'hea000002);
    put(32'h8068, 32'he3a00001); put(32'h806c, 32'hea00000f);
    put(32'h8070, 32'hea00000c); put(32'h8074, 32'he51b2014);
    put(32'h8078, 32'he2423002); put(32'h807c, 32'he1a00003);
    put(32'h8080, 32'hebffffec); put(32'h8084, 32'he1a04000);
    put(32'h8088, 32'he51b2014); put(32'h808c, 32'he2423001);
    put(32'h8090, 32'he1a00003); put(32'h8094, 32'hebffffe7);
    put(32'h8098, 32'he0843000); put(32'h809c, 32'he1a00003);
    put(32'h80a0, 32'hea000002); put(32'h80a4, 32'hea000001);
    put(32'h80a8, 32'hea000000); put(32'h80ac, 32'heaffffff);
    put(32'h80b0, 32'he91ba810);

    load_and_run(200000, p);
    rd_mem(32'hFFF4, v); check("fib(15)", v, 610);
    rd_reg(5'd25, v);    check("sp restored", v, 32'hF000);
    // 3 boot + 12 in _start + 233*11 + 377*14 + 609*25 in fib + 4 before the final store
    check("fib instruction count", p.instrs, 3 + 12 + 233*11 + 377*14 + 609*25 + 4);
    checks++;
    if (p.cycles < p.instrs || p.cycles > 3 * p.instrs) begin
      failures++;
      $display("FAIL implausible cycle count %0d", p.cycles);
    end
    $display("fib(15): %0d instructions, %0d cycles, CPI %0.2f", p.instrs, p.cycles,
             real'(p.cycles) / real'(p.instrs));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
