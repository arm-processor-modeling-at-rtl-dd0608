// tb_arm_psr: checks the program status registers: CPSR reset value (SVC mode,
// IRQ and FIQ disabled), CPSR writes, the five banked SPSRs (FIQ, IRQ, SVC,
// ABT, UND) written by mode, the SPSR output following the current mode
// (returning the CPSR in user and system mode, which have no SPSR), and the
// read-by-mode port. Random writes are compared with a scoreboard. Writes
// happen at the rising clock edge; outputs are combinational.
`timescale 1ns/1ps
module tb_arm_psr;
  import arm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cpsr_we = 0, spsr_we = 0;
  psr_t cpsr_wd = '0, spsr_wd = '0, cpsr, spsr, spsr_of;
  logic [4:0] spsr_wmode = 0, rmode = 0;
  int checks = 0, failures = 0;
  localparam logic [4:0] MODES [7] = '{5'h10, 5'h11, 5'h12, 5'h13, 5'h17, 5'h1b, 5'h1f};
  psr_t model [32];
  psr_t mc;

  always #5 clk = ~clk;
  arm_psr dut (.*);

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic psr_t rnd_psr(input logic [4:0] m);
    psr_t p;
    p = psr_t'($urandom);
    p.rsv = '0;
    p.mode = m;
    return p;
  endfunction

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    chk("reset cpsr", cpsr, 32'h0000_00D3);
    mc = cpsr;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cpsr_we = 1'($urandom_range(0, 1));
      cpsr_wd = rnd_psr(MODES[$urandom_range(0, 6)]);
      spsr_we = 1'($urandom_range(0, 1));
      spsr_wmode = MODES[$urandom_range(0, 6)];
      spsr_wd = rnd_psr(MODES[$urandom_range(0, 6)]);
      rmode = MODES[$urandom_range(0, 6)];
      #1;
      chk("cpsr", cpsr, mc);
      chk("spsr", spsr, has_spsr(mc.mode) ? model[mc.mode] : mc);
      chk("spsr_of", spsr_of, has_spsr(rmode) ? model[rmode] : mc);
      @(posedge clk);
      if (cpsr_we) mc = cpsr_wd;
      if (spsr_we && has_spsr(spsr_wmode)) model[spsr_wmode] = spsr_wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
