// tb_arm_regfile: checks the banked register file (31 physical registers,
// three read ports A/Bb/C, two write ports). Checked: reset to zero; writes
// through either port; port 1 winning when both ports write the same register;
// R15 reads return the PC+8 input and are never written; a read of a register
// written in the same cycle returns the new value and raises that port's bypass
// flag (write-before-read, forwarding path 1); the debug read port. Random
// write/read traffic is compared with a scoreboard array. Writes take effect at
// the rising clock edge; reads are combinational.
`timescale 1ns/1ps
module tb_arm_regfile;
  import arm_pkg::*;
  logic        clk = 0, rst_n = 0;
  preg_t       ra [3];
  logic [31:0] rd [3];
  logic [2:0]  bypass;
  logic [31:0] pc8 = 32'h100;
  logic        we1 = 0, we2 = 0;
  preg_t       wa1 = 0, wa2 = 0, dbg_ra = 0;
  logic [31:0] wd1 = 0, wd2 = 0, dbg_rd;
  logic [31:0] model [NUM_PHYS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  arm_regfile dut (.*);

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    foreach (ra[i]) ra[i] = 0;
    foreach (model[i]) model[i] = 0;
    #12 rst_n = 1;
    for (int r = 0; r < NUM_PHYS; r++) begin
      dbg_ra = preg_t'(r); #1; chk($sformatf("reset r%0d", r), dbg_rd, 0);
    end
    // R15 reads PC+8 and is not written
    @(negedge clk);
    we1 = 1; wa1 = PREG_PC; wd1 = 32'hDEAD;
    ra[0] = PREG_PC; #1;
    chk("r15 read", rd[0], 32'h100);
    @(negedge clk); we1 = 0;
    // both ports to the same register: port 1 wins
    we1 = 1; wa1 = 5'd3; wd1 = 32'h1111;
    we2 = 1; wa2 = 5'd3; wd2 = 32'h2222;
    ra[1] = 5'd3; #1;
    chk("bypass value", rd[1], 32'h1111);
    chk("bypass flag", 32'(bypass), 32'b010);
    @(negedge clk); we1 = 0; we2 = 0; #1;
    chk("port 1 wins", rd[1], 32'h1111);
    chk("no bypass", 32'(bypass), 0);
    model[3] = 32'h1111;
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we1 = 1'($urandom_range(0, 1)); wa1 = preg_t'($urandom_range(0, NUM_PHYS - 1)); wd1 = $urandom;
      we2 = 1'($urandom_range(0, 1)); wa2 = preg_t'($urandom_range(0, NUM_PHYS - 1)); wd2 = $urandom;
      for (int p = 0; p < 3; p++) ra[p] = preg_t'($urandom_range(0, NUM_PHYS - 1));
      pc8 = $urandom;
      #1;
      for (int p = 0; p < 3; p++) begin
        logic [31:0] e;
        logic eb;
        eb = 1'b0;
        if (ra[p] == PREG_PC) e = pc8;
        else if (we1 && wa1 == ra[p]) begin e = wd1; eb = 1'b1; end
        else if (we2 && wa2 == ra[p]) begin e = wd2; eb = 1'b1; end
        else e = model[ra[p]];
        chk($sformatf("read port %0d", p), rd[p], e);
        chk($sformatf("bypass %0d", p), 32'(bypass[p]), 32'(eb));
      end
      @(posedge clk);
      if (we2 && wa2 != PREG_PC) model[wa2] = wd2;
      if (we1 && wa1 != PREG_PC) model[wa1] = wd1;
    end
    @(negedge clk); we1 = 0; we2 = 0;
    for (int r = 0; r < NUM_PHYS; r++) begin
      dbg_ra = preg_t'(r); #1; if (r != 15) chk($sformatf("final r%0d", r), dbg_rd, model[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
