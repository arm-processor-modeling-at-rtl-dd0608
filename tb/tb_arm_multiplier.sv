// tb_arm_multiplier: checks the iterative multiplier of the EXE stage. Each
// case starts a multiply (32x32 with optional 64-bit accumulator, signed or
// unsigned) and counts the cycles until done. The 64-bit result must equal the
// exact product plus accumulator, and the cycle count must be 1 to 4: one
// cycle per 8 bits of the multiplier Rs, ending early once the remaining bits
// of Rs are all zeros (or, for signed operands, all ones). The en input is
// dropped at random to check that a held pipeline freezes the multiplier.
`timescale 1ns/1ps
module tb_arm_multiplier;
  logic        clk = 0, rst_n = 0;
  logic        en = 1, start = 0, signed_op = 0, acc_en = 0, busy, done;
  logic [63:0] acc = 0, result;
  logic [31:0] rm = 0, rs = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  arm_multiplier dut (.*);

  function automatic int exp_cycles(input logic [31:0] s, input logic sg);
    logic signed [63:0] m;
    m = sg ? {{32{s[31]}}, s} : {32'd0, s};
    for (int k = 1; k <= 8; k++) begin
      m = m >>> 8;
      if (m == 0 || m == -1) return k;
    end
    return 8;
  endfunction

  task automatic run(input logic [31:0] x, input logic [31:0] y, input logic sg,
                     input logic ae, input logic [63:0] ac, input logic rnd_en);
    logic [63:0] e;
    int cyc;
    @(negedge clk);
    rm = x; rs = y; signed_op = sg; acc_en = ae; acc = ac; start = 1; en = 1;
    if (sg) e = 64'($signed(x) * $signed(y));
    else    e = {32'd0, x} * {32'd0, y};
    if (ae) e = e + ac;
    cyc = 0;
    forever begin
      #1;
      if (en) begin
        cyc++;
        if (done) break;
      end
      @(negedge clk);
      start = 0;
      rm = $urandom; rs = $urandom;    // operands are only sampled at start
      en = rnd_en ? 1'($urandom_range(0, 1)) : 1'b1;
      if (cyc > 10) break;
    end
    checks++;
    if (result !== e || cyc != exp_cycles(y, sg)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h*%h s=%b acc=%b: got %h in %0d cycles, expected %h in %0d",
                 x, y, sg, ae, result, cyc, e, exp_cycles(y, sg));
    end
    @(negedge clk);
    start = 0; en = 1;
    #1;
    checks++;
    if (busy !== 1'b0) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    #2000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    run(32'd5, 32'd7, 1'b0, 1'b0, 0, 1'b0);                 // 1 cycle
    run(32'd7, 32'h7F00_0000, 1'b0, 1'b0, 0, 1'b0);         // 4 cycles
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1, 1'b0, 0, 1'b0);  // -1 * -1, 1 cycle
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0, 1'b1, 64'hFFFF_FFFF_FFFF_FFFF, 1'b0);
    run(32'h8000_0000, 32'h8000_0000, 1'b1, 1'b0, 0, 1'b0);
    run(32'h1234, 32'h0001_0000, 1'b0, 1'b1, 64'd99, 1'b0);  // 3 cycles
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] y;
      y = $urandom;
      y = (i % 4 == 0) ? y : (i % 4 == 1) ? (y >> 24) : (i % 4 == 2) ? (y >> 16) : ~(y >> 12);
      run($urandom, y, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)),
          {$urandom, $urandom}, (i % 3) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
