// tb_arm_forward: checks the forwarding unit. For each EXE operand (A, Bb, C,
// H) that was read from a register, a newer result replaces the register file
// value: path 3 from EXE_MEM (ALUOutput or the changed base D, but not a load,
// whose data does not exist yet) has priority over path 2 from MEM_WB
// (ALUOutput/LMD, then D). Operands not read from a register and R15 are never
// replaced. Path 4 replaces store data at the start of MEM with LMD of a load
// in MEM_WB, except for the read half of the same SWP. Random cases with
// register numbers drawn from a small set (to make matches frequent) are
// compared with a reference; combinational.
`timescale 1ns/1ps
module tb_arm_forward;
  import arm_pkg::*;
  logic [31:0] op_val [4], op_out [4];
  logic        op_fw  [4];
  preg_t       op_src [4];
  logic        em_w1_en, em_w1_load, em_w2_en, mw_w1_en, mw_w1_load, mw_w2_en, mw_swp_rd;
  preg_t       em_w1_reg, em_w2_reg, mw_w1_reg, mw_w2_reg, em_c_src;
  logic [31:0] em_w1_val, em_w2_val, mw_w1_val, mw_w2_val, em_c, c_mem;
  logic        em_c_fw, em_swp, hit_p4;
  logic [3:0]  hit_p2, hit_p3;
  int checks = 0, failures = 0;

  arm_forward dut (.*);

  function automatic preg_t rreg();
    return ($urandom_range(0, 9) == 0) ? PREG_PC : preg_t'($urandom_range(1, 4));
  endfunction

  task automatic one();
    for (int k = 0; k < 4; k++) begin
      op_val[k] = $urandom; op_fw[k] = 1'($urandom_range(0, 3) != 0); op_src[k] = rreg();
    end
    em_w1_en = 1'($urandom_range(0, 1)); em_w1_load = 1'($urandom_range(0, 1));
    em_w1_reg = rreg(); em_w1_val = $urandom;
    em_w2_en = 1'($urandom_range(0, 1)); em_w2_reg = rreg(); em_w2_val = $urandom;
    mw_w1_en = 1'($urandom_range(0, 1)); mw_w1_load = 1'($urandom_range(0, 1));
    mw_w1_reg = rreg(); mw_w1_val = $urandom;
    mw_w2_en = 1'($urandom_range(0, 1)); mw_w2_reg = rreg(); mw_w2_val = $urandom;
    mw_swp_rd = 1'($urandom_range(0, 3) == 0);
    em_c = $urandom; em_c_fw = 1'($urandom_range(0, 1)); em_c_src = rreg();
    em_swp = 1'($urandom_range(0, 3) == 0);
    #1;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] e;
      logic p2, p3;
      e = op_val[k]; p2 = 0; p3 = 0;
      if (op_fw[k] && op_src[k] != PREG_PC) begin
        if (em_w1_en && !em_w1_load && em_w1_reg == op_src[k])  begin e = em_w1_val; p3 = 1; end
        else if (em_w2_en && em_w2_reg == op_src[k])            begin e = em_w2_val; p3 = 1; end
        else if (mw_w1_en && mw_w1_reg == op_src[k])            begin e = mw_w1_val; p2 = 1; end
        else if (mw_w2_en && mw_w2_reg == op_src[k])            begin e = mw_w2_val; p2 = 1; end
      end
      checks++;
      if (op_out[k] !== e || hit_p2[k] !== p2 || hit_p3[k] !== p3) begin
        failures++;
        if (failures < 20) $display("FAIL operand %0d: got %h p2=%b p3=%b expected %h %b %b",
                                    k, op_out[k], hit_p2[k], hit_p3[k], e, p2, p3);
      end
    end
    begin
      logic [31:0] e;
      logic h;
      h = em_c_fw && mw_w1_en && mw_w1_load && mw_w1_reg == em_c_src && em_c_src != PREG_PC &&
          !(mw_swp_rd && em_swp);
      e = h ? mw_w1_val : em_c;
      checks++;
      if (c_mem !== e || hit_p4 !== h) begin
        failures++;
        if (failures < 20) $display("FAIL path 4: got %h %b expected %h %b", c_mem, hit_p4, e, h);
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
    for (int i = 0; i < 4000; i++) one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
