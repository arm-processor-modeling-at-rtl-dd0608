// tb_arm_workloads: small benchmark programs of the kinds used to evaluate the
// core, run on the full system at its default sizes:
//   Summary  - accumulate 1..100 in a loop (expected 5050),
//   Array    - sum of a 16-word array loaded with post-indexed LDR,
//   Sort     - bubble sort of 16 signed words in memory (compare, STRGT swap),
//   Fib10    - the first ten Fibonacci numbers stored to memory, no calls.
// Each program is hand-assembled here. Its result is checked against a value
// computed by the testbench, and its retired-instruction count, load-use stall
// count and taken-branch count against numbers derived from the program's
// control flow. The cycle count must then equal a constant pipeline fill plus
// instructions + 2 per taken branch + 1 per stall; the constant must be the
// same for all four programs, which ties the cycle count to these two costs.
`timescale 1ns/1ps
module tb_arm_workloads;
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
  int fill = -1;
  logic [31:0] prog [$];
  logic [31:0] data [$];                 // words placed at 0x1000

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // append the common ending: store r0 at 0xFFF4 and 0xA5 at 0xFFF0, then spin
  task automatic finish_prog();
    int a;
    prog.push_back(dpi(MOV, 0, 12, 0, 8'hFF, 12));   // r12 = 0xFF00
    prog.push_back(dpi(ORR, 0, 12, 12, 8'hF0));      // r12 = 0xFFF0
    prog.push_back(ldst(0, 0, 0, 12, 4));
    prog.push_back(dpi(MOV, 0, 11, 0, 8'hA5));
    prog.push_back(ldst(0, 0, 11, 12, 0));
    a = 4 * prog.size();
    prog.push_back(br(a, a));
  endtask

  task automatic run(input string name, input int exp_instrs, input int exp_stalls,
                     input int exp_taken);
    int f;
    rst_n = 0;
    @(negedge clk);
    dload_we = 1; dload_addr = 32'hFFF0; dload_data = 0;
    @(negedge clk);
    foreach (data[i]) begin
      dload_addr = 32'h1000 + 32'(4 * i); dload_data = data[i];
      @(negedge clk);
    end
    dload_we = 0;
    foreach (prog[i]) begin
      iload_we = 1; iload_addr = 32'(4 * i); iload_data = prog[i];
      @(negedge clk);
    end
    iload_we = 0;
    @(negedge clk);
    rst_n = 1;
    dbg_addr = 32'hFFF0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (dbg_mem_val == 32'hA5) break;
    end
    chk({name, " finished"}, dbg_mem_val, 32'hA5);
    // the final store is in WB here: everything before it has retired
    chk({name, " instructions"}, perf.instrs, exp_instrs);
    chk({name, " load-use stalls"}, perf.ld_interlock, exp_stalls);
    // the closing branch-to-self has already been taken in EXE: one more
    chk({name, " taken branches"}, perf.exe_branch, exp_taken + 1);
    f = int'(perf.cycles) - exp_instrs - 2 * exp_taken - exp_stalls;
    if (fill < 0) fill = f;
    chk({name, " pipeline fill constant"}, f, fill);
    $display("  %-8s %5d instructions %5d cycles CPI %0.2f", name, perf.instrs, perf.cycles,
             real'(perf.cycles) / real'(perf.instrs));
  endtask

  // data memory word, read directly from the memory array
  function automatic logic [31:0] mem(input logic [31:0] a);
    return dut.u_dmem.mem[a[15:2]];
  endfunction

  initial begin
    #5000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] v, sum;
    int sorted [16];

    // ---------------- Summary: r0 = 100 + 99 + ... + 1
    prog = {};
    data = {};
    prog.push_back(dpi(MOV, 0, 0, 0, 0));            // 0x00
    prog.push_back(dpi(MOV, 0, 1, 0, 100));          // 0x04
    prog.push_back(dpr(ADD, 0, 0, 0, 1));            // 0x08 loop
    prog.push_back(dpi(SUB, 1, 1, 1, 1));            // 0x0C subs r1, r1, #1
    prog.push_back(cond(br(32'h10, 32'h08), NE));    // 0x10
    finish_prog();
    run("Summary", 2 + 100 * 3 + 4, 0, 99);
    chk("Summary result", mem(32'hFFF4), 5050);

    // ---------------- Array: sum of 16 words
    prog = {};
    data = {};
    sum = 0;
    for (int i = 0; i < 16; i++) begin
      data.push_back($urandom);
      sum += data[i];
    end
    prog.push_back(dpi(MOV, 0, 1, 0, 1, 10));        // 0x00 r1 = 0x1000
    prog.push_back(dpi(MOV, 0, 2, 0, 16));           // 0x04
    prog.push_back(dpi(MOV, 0, 0, 0, 0));            // 0x08
    prog.push_back(ldst(1, 0, 3, 1, 4, 0));          // 0x0C loop: ldr r3, [r1], #4
    prog.push_back(dpr(ADD, 0, 0, 0, 3));            // 0x10 add r0, r0, r3 (stall)
    prog.push_back(dpi(SUB, 1, 2, 2, 1));            // 0x14 subs r2, r2, #1
    prog.push_back(cond(br(32'h18, 32'h0C), NE));    // 0x18
    finish_prog();
    run("Array", 3 + 16 * 4 + 4, 16, 15);
    chk("Array result", mem(32'hFFF4), sum);

    // ---------------- Sort: bubble sort of 16 signed words, ascending
    prog = {};
    data = {};
    for (int i = 0; i < 16; i++) begin
      data.push_back($urandom);
      sorted[i] = int'(data[i]);
    end
    for (int i = 1; i < 16; i++)          // insertion sort, signed
      for (int j = i; j > 0 && sorted[j-1] > sorted[j]; j--) begin
        int t;
        t = sorted[j]; sorted[j] = sorted[j-1]; sorted[j-1] = t;
      end
    prog.push_back(dpi(MOV, 0, 4, 0, 16));           // 0x00
    prog.push_back(dpi(SUB, 1, 4, 4, 1));            // 0x04 outer: subs r4, r4, #1
    prog.push_back(cond(br(32'h08, 32'h38), EQ));    // 0x08 beq done
    prog.push_back(dpi(MOV, 0, 1, 0, 1, 10));        // 0x0C r1 = 0x1000
    prog.push_back(dpr(MOV, 0, 5, 0, 4));            // 0x10 r5 = r4
    prog.push_back(ldst(1, 0, 2, 1, 0));             // 0x14 inner: ldr r2, [r1]
    prog.push_back(ldst(1, 0, 3, 1, 4));             // 0x18 ldr r3, [r1, #4]
    prog.push_back(dpr(CMP, 1, 0, 2, 3));            // 0x1C cmp r2, r3 (stall)
    prog.push_back(cond(ldst(0, 0, 3, 1, 0), GT));   // 0x20 strgt r3, [r1]
    prog.push_back(cond(ldst(0, 0, 2, 1, 4), GT));   // 0x24 strgt r2, [r1, #4]
    prog.push_back(dpi(ADD, 0, 1, 1, 4));            // 0x28
    prog.push_back(dpi(SUB, 1, 5, 5, 1));            // 0x2C subs r5, r5, #1
    prog.push_back(cond(br(32'h30, 32'h14), NE));    // 0x30 bne inner
    prog.push_back(br(32'h34, 32'h04));              // 0x34 b outer
    prog.push_back(dpi(MOV, 0, 0, 0, 0));            // 0x38 done: r0 = 0
    finish_prog();
    // passes k = 15..1: 5 + 8k instructions; 1 + 2 at the ends, 1 (r0) + 4 (ending)
    // stalls: one per inner iteration (120); taken: 105 bne + 15 b + 1 beq
    run("Sort", 1 + 15 * 5 + 8 * 120 + 2 + 1 + 4, 120, 121);
    for (int i = 0; i < 16; i++) chk($sformatf("Sort word %0d", i), mem(32'h1000 + 32'(4 * i)), sorted[i]);

    // ---------------- Fib10: first ten Fibonacci numbers to 0x2000
    prog = {};
    data = {};
    prog.push_back(dpi(MOV, 0, 0, 0, 2, 10));        // 0x00 r0 = 0x2000
    prog.push_back(dpi(MOV, 0, 1, 0, 0));            // 0x04
    prog.push_back(dpi(MOV, 0, 2, 0, 1));            // 0x08
    prog.push_back(dpi(MOV, 0, 3, 0, 10));           // 0x0C
    prog.push_back(ldst(0, 0, 1, 0, 4, 0));          // 0x10 loop: str r1, [r0], #4
    prog.push_back(dpr(ADD, 0, 4, 1, 2));            // 0x14
    prog.push_back(dpr(MOV, 0, 1, 0, 2));            // 0x18
    prog.push_back(dpr(MOV, 0, 2, 0, 4));            // 0x1C
    prog.push_back(dpi(SUB, 1, 3, 3, 1));            // 0x20
    prog.push_back(cond(br(32'h24, 32'h10), NE));    // 0x24
    finish_prog();
    run("Fib10", 4 + 10 * 6 + 4, 0, 9);
    begin
      int f0, f1, t;
      f0 = 0; f1 = 1;
      for (int i = 0; i < 10; i++) begin
        chk($sformatf("Fib10 F%0d", i), mem(32'h2000 + 32'(4 * i)), f0);
        t = f0 + f1; f0 = f1; f1 = t;
      end
    end
    chk("Fib10 r0 (end of the array)", mem(32'hFFF4), 32'h2028);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
