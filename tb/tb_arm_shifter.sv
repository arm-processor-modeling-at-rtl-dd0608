// tb_arm_shifter: checks the barrel shifter (shifter operand of addressing
// mode 1 and the scaled register offset of mode 2) against a reference model
// written with 64-bit arithmetic, on fixed corner cases (RRX, LSR/ASR #32
// encoded as #0, register amounts 0, 32 and above 32, rotated immediates with
// rotation 0) and on 4000 random cases. Combinational: each case is checked
// 1 ns after the inputs change.
`timescale 1ns/1ps
module tb_arm_shifter;
  import arm_pkg::*;
  logic [1:0]  kind;
  shift_e      typ;
  logic [31:0] value, result;
  logic [7:0]  amount;
  logic        c_in, carry;
  int checks = 0, failures = 0;

  arm_shifter dut (.*);

  function automatic logic [32:0] model(input logic [1:0] k, input shift_e t,
                                        input logic [31:0] v, input logic [7:0] am,
                                        input logic ci);
    logic [63:0] w;
    int n;
    logic [31:0] r;
    logic        co;
    n = am;
    r = v; co = ci;
    if (k == 2'd0) begin
      n = am % 32;
      w = {v, v} >> n;
      r = w[31:0];
      co = (am == 0) ? ci : r[31];
    end else begin
      if (k == 2'd1 && n == 0) begin
        unique case (t)
          SH_LSL: begin r = v; co = ci; end
          SH_LSR: begin r = 0; co = v[31]; end
          SH_ASR: begin r = {32{v[31]}}; co = v[31]; end
          SH_ROR: begin r = {ci, v[31:1]}; co = v[0]; end
        endcase
      end else if (n != 0) begin
        unique case (t)
          SH_LSL: begin
            w = {32'd0, v} << (n > 40 ? 40 : n);
            r = w[31:0];
            co = (n > 32) ? 1'b0 : w[32];
          end
          SH_LSR: begin
            w = {v, 32'd0} >> (n > 40 ? 40 : n);
            r = w[63:32];
            co = (n > 32) ? 1'b0 : w[31];
          end
          SH_ASR: begin
            if (n >= 32) begin r = {32{v[31]}}; co = v[31]; end
            else begin
              w = $signed({v, 32'd0}) >>> n;
              r = w[63:32]; co = w[31];
            end
          end
          SH_ROR: begin
            w = {v, v} >> (n % 32);
            r = w[31:0];
            co = r[31];
          end
        endcase
      end
    end
    return {co, r};
  endfunction

  task automatic run(input logic [1:0] k, input shift_e t, input logic [31:0] v,
                     input logic [7:0] am, input logic ci);
    logic [32:0] e;
    kind = k; typ = t; value = v; amount = am; c_in = ci;
    #1;
    e = model(k, t, v, am, ci);
    checks++;
    if ({carry, result} !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL kind=%0d typ=%0d v=%h am=%0d c=%b: got %b/%h expected %b/%h",
                 k, t, v, am, ci, carry, result, e[32], e[31:0]);
    end
  endtask

  initial begin
    #200000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // immediate: 0xFF rotated right by 8 -> 0xFF000000, carry = bit 31
    kind = 0; typ = SH_LSL; value = 32'hFF; amount = 8; c_in = 0; #1;
    checks++; if (result !== 32'hFF00_0000 || carry !== 1'b1) begin failures++; $display("FAIL imm rot"); end
    // RRX
    run(2'd1, SH_ROR, 32'h0000_0003, 0, 1'b1);
    checks++; if (result !== 32'h8000_0001 || carry !== 1'b1) begin failures++; $display("FAIL rrx"); end
    // LSR #32 (encoded 0), ASR #32
    run(2'd1, SH_LSR, 32'h8000_0000, 0, 1'b0);
    run(2'd1, SH_ASR, 32'h8000_0000, 0, 1'b0);
    checks++; if (result !== 32'hFFFF_FFFF) begin failures++; $display("FAIL asr32"); end
    // register amounts 0, 32, 33, 255
    for (int t = 0; t < 4; t++) begin
      run(2'd2, shift_e'(t), 32'h8000_0001, 0,   1'b1);
      run(2'd2, shift_e'(t), 32'h8000_0001, 32,  1'b0);
      run(2'd2, shift_e'(t), 32'h8000_0001, 33,  1'b1);
      run(2'd2, shift_e'(t), 32'hC000_0001, 255, 1'b0);
      run(2'd2, shift_e'(t), 32'h1234_5678, 64,  1'b1);
    end
    for (int i = 0; i < 4000; i++) begin
      logic [1:0] k;
      logic [7:0] am;
      k = 2'($urandom_range(0, 2));
      am = (k == 2'd0) ? 8'(2 * $urandom_range(0, 15)) :
           (k == 2'd1) ? 8'($urandom_range(0, 31)) : 8'($urandom_range(0, 255));
      if (k == 2'd2 && $urandom_range(0, 1)) am = 8'($urandom_range(0, 40));
      run(k, shift_e'($urandom_range(0, 3)), $urandom, am, 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
