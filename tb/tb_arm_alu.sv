// tb_arm_alu: checks the data-processing ALU for all sixteen opcodes against a
// reference written with 33-bit arithmetic: result, N, Z, C (carry out of the
// adder, or the shifter carry for logical operations), V (signed overflow, or
// unchanged for logical operations), whether Rd is written (not for TST, TEQ,
// CMP, CMN), and the leading-zero count used by CLZ. Fixed corner cases
// (0x7FFFFFFF+1, 0-1, ADC/SBC with carry) and 5000 random cases, each checked
// 1 ns after the inputs change.
`timescale 1ns/1ps
module tb_arm_alu;
  import arm_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, result, clz;
  logic        c_in, v_in, sh_c, n, z, c, v, wr_rd;
  int checks = 0, failures = 0;

  arm_alu dut (.*);

  task automatic run(input alu_op_e o, input logic [31:0] x, input logic [31:0] y,
                     input logic ci, input logic vi, input logic sc);
    logic [32:0] s;
    logic [31:0] r, x2, y2;
    logic        ec, ev, arith, ew;
    int          lz;
    op = o; a = x; b = y; c_in = ci; v_in = vi; sh_c = sc;
    #1;
    arith = 1'b1;
    x2 = x; y2 = y;
    s = '0;
    unique case (o)
      OP_SUB, OP_CMP: s = {1'b0, x} + {1'b0, ~y} + 33'd1;
      OP_RSB:         begin s = {1'b0, y} + {1'b0, ~x} + 33'd1; x2 = y; y2 = ~x; end
      OP_ADD, OP_CMN: s = {1'b0, x} + {1'b0, y};
      OP_ADC:         s = {1'b0, x} + {1'b0, y} + 33'(ci);
      OP_SBC:         s = {1'b0, x} + {1'b0, ~y} + 33'(ci);
      OP_RSC:         begin s = {1'b0, y} + {1'b0, ~x} + 33'(ci); x2 = y; y2 = ~x; end
      default:        arith = 1'b0;
    endcase
    if (o inside {OP_SUB, OP_CMP, OP_SBC}) y2 = ~y;
    unique case (o)
      OP_AND, OP_TST: r = x & y;
      OP_EOR, OP_TEQ: r = x ^ y;
      OP_ORR:         r = x | y;
      OP_MOV:         r = y;
      OP_BIC:         r = x & ~y;
      OP_MVN:         r = ~y;
      default:        r = s[31:0];
    endcase
    ec = arith ? s[32] : sc;
    ev = arith ? ((x2[31] == y2[31]) && (r[31] != x2[31])) : vi;
    ew = !(o inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN});
    lz = 32;
    for (int i = 31; i >= 0; i--) if (y[i]) begin lz = 31 - i; break; end
    checks++;
    if (result !== r || n !== r[31] || z !== (r == 0) || c !== ec || v !== ev ||
        wr_rd !== ew || clz !== 32'(lz)) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%s a=%h b=%h ci=%b: got %h nzcv=%b%b%b%b wr=%b clz=%0d exp %h c=%b v=%b clz=%0d",
                 o.name(), x, y, ci, result, n, z, c, v, wr_rd, clz, r, ec, ev, lz);
    end
  endtask

  initial begin
    #200000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    run(OP_ADD, 32'h7FFF_FFFF, 32'h1, 0, 0, 0);
    checks++; if (v !== 1'b1 || n !== 1'b1) begin failures++; $display("FAIL overflow"); end
    run(OP_SUB, 32'h0, 32'h1, 0, 0, 0);
    checks++; if (result !== 32'hFFFF_FFFF || c !== 1'b0) begin failures++; $display("FAIL borrow"); end
    run(OP_CMP, 32'h5, 32'h5, 0, 0, 0);
    checks++; if (z !== 1'b1 || c !== 1'b1 || wr_rd !== 1'b0) begin failures++; $display("FAIL cmp"); end
    run(OP_ADC, 32'hFFFF_FFFF, 32'h0, 1, 0, 0);
    run(OP_SBC, 32'h5, 32'h5, 0, 0, 0);
    run(OP_RSC, 32'h5, 32'h5, 1, 0, 0);
    run(OP_MOV, 32'h0, 32'h0, 0, 1, 1);
    run(OP_MVN, 32'h0, 32'h0000_0001, 0, 0, 0);
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] y;
      y = $urandom;
      if ($urandom_range(0, 3) == 0) y = y >> $urandom_range(0, 31);
      if ($urandom_range(0, 15) == 0) y = 0;
      run(alu_op_e'($urandom_range(0, 15)), $urandom, y, 1'($urandom_range(0, 1)),
          1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
