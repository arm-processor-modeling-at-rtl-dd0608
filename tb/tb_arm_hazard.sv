// tb_arm_hazard: checks the load-use interlock. The ID stage must stall when
// EXE holds a load whose destination is read by the instruction in ID through
// A, Bb or C, because the loaded value only exists after MEM. Exceptions:
// store data in C and the SWP data register in Bb are only needed in MEM and
// are covered by forwarding path 4, so they do not stall; loads into the PC
// never stall (they are branches). Exhaustive over small register numbers
// plus random cases, combinational, checked 1 ns after each change.
`timescale 1ns/1ps
module tb_arm_hazard;
  import arm_pkg::*;
  logic  exe_load, a_used, b_used, c_used, c_is_store, b_is_swp, stall;
  preg_t exe_ld_reg, a_reg, b_reg, c_reg;
  int checks = 0, failures = 0;

  arm_hazard dut (.*);

  task automatic run(input logic [10:0] f, input preg_t ld, input preg_t ra,
                     input preg_t rb, input preg_t rc);
    logic e;
    {exe_load, a_used, b_used, c_used, c_is_store, b_is_swp} = f[5:0];
    exe_ld_reg = ld; a_reg = ra; b_reg = rb; c_reg = rc;
    #1;
    e = exe_load && ld != PREG_PC &&
        ((a_used && ra == ld) || (b_used && !b_is_swp && rb == ld) ||
         (c_used && !c_is_store && rc == ld));
    checks++;
    if (stall !== e) begin
      failures++;
      if (failures < 20) $display("FAIL flags=%b ld=%0d a=%0d b=%0d c=%0d: got %b", f[5:0], ld, ra, rb, rc, stall);
    end
  endtask

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // LDR r5,[r0] then ADD r6,r5,#1: stall
    run(11'b110000, 5'd5, 5'd5, 5'd0, 5'd0);
    checks++; if (stall !== 1'b1) begin failures++; $display("FAIL load-use example"); end
    // LDR r7,[r0] then STR r7,[r0,#4]: no stall (path 4)
    run(11'b110110, 5'd7, 5'd0, 5'd0, 5'd7);
    checks++; if (stall !== 1'b0) begin failures++; $display("FAIL store data example"); end
    for (int f = 0; f < 64; f++)
      for (int ld = 14; ld < 17; ld++)
        for (int r = 0; r < 8; r++)
          run(11'(f), preg_t'(ld), preg_t'(14 + r % 3), preg_t'(14 + (r / 3) % 3), preg_t'(14 + r % 2));
    for (int i = 0; i < 2000; i++)
      run(11'($urandom), preg_t'($urandom_range(0, 30)), preg_t'($urandom_range(0, 3)),
          preg_t'($urandom_range(0, 3)), preg_t'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
