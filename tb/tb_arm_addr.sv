// tb_arm_addr: checks the address generation of the EXE stage. Single
// transfers (addressing modes 2 and 3): pre-indexed address base +/- offset,
// post-indexed address base, base write-back with the changed base for
// post-indexing or W=1. Multiple transfers (addressing mode 4): register
// count N, start and end addresses for IA, IB, DA and DB, and the written-back
// base +/- 4N. Fixed cases plus 3000 random cases compared with a reference;
// combinational, checked 1 ns after each change.
`timescale 1ns/1ps
module tb_arm_addr;
  logic        multi, p, u, w, wb_en;
  logic [31:0] base, offset, addr, end_addr, wb_val;
  logic [15:0] reglist;
  logic [4:0]  count;
  int checks = 0, failures = 0;

  arm_addr dut (.*);

  task automatic run(input logic m, input logic [31:0] b, input logic [31:0] o,
                     input logic [15:0] l, input logic pp, input logic uu, input logic ww);
    logic [31:0] ea, ee, ev;
    logic        ew;
    int          n;
    multi = m; base = b; offset = o; reglist = l; p = pp; u = uu; w = ww;
    #1;
    n = $countones(l);
    if (!m) begin
      ev = uu ? b + o : b - o;
      ea = pp ? ev : b;
      ee = ea;
      ew = !pp || ww;
    end else begin
      ev = uu ? b + 32'(4 * n) : b - 32'(4 * n);
      ea = uu ? (pp ? b + 4 : b) : (pp ? b - 32'(4 * n) : b - 32'(4 * n) + 4);
      ee = ea + 32'(4 * n) - 4;
      ew = ww;
    end
    checks++;
    if (addr !== ea || wb_en !== ew || wb_val !== ev || (m && (end_addr !== ee || count !== 5'(n)))) begin
      failures++;
      if (failures < 20)
        $display("FAIL m=%b base=%h off=%h list=%h pu w=%b%b %b: got %h..%h wb %b %h n=%0d exp %h..%h wb %b %h n=%0d",
                 m, b, o, l, pp, uu, ww, addr, end_addr, wb_en, wb_val, count, ea, ee, ew, ev, n);
    end
  endtask

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // STMDB sp!, {r1-r4} with sp = 0x2000: 0x1FF0..0x1FFC, sp <- 0x1FF0
    run(1'b1, 32'h2000, 0, 16'h001E, 1'b1, 1'b0, 1'b1);
    checks++; if (addr !== 32'h1FF0 || end_addr !== 32'h1FFC || wb_val !== 32'h1FF0) begin
      failures++; $display("FAIL stmdb example"); end
    // LDR r0, [r1], #4 (post-indexed)
    run(1'b0, 32'h100, 4, 0, 1'b0, 1'b1, 1'b0);
    checks++; if (addr !== 32'h100 || !wb_en || wb_val !== 32'h104) begin
      failures++; $display("FAIL post-index example"); end
    run(1'b1, 32'h0, 0, 16'hFFFF, 1'b0, 1'b0, 1'b0);
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] l;
      l = 16'($urandom);
      if (l == 0) l = 16'h1;
      run(1'($urandom_range(0, 1)), $urandom, $urandom_range(0, 4095), l,
          1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
