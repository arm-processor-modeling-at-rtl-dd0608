// tb_arm_dmem: checks the data memory at its default size (64 KiB): word
// reads, byte-enabled writes from the core (byte, halfword and word stores
// place their lanes with be), the load port used before reset, the debug read
// port, and that a core write has priority over the load port in the same
// cycle. A scoreboard of 64 words follows 3000 random operations.
`timescale 1ns/1ps
module tb_arm_dmem;
  logic        clk = 0, we = 0, load_we = 0;
  logic [3:0]  be = 0;
  logic [31:0] addr = 0, rdata, wdata = 0, load_addr = 0, load_data = 0, dbg_addr = 0, dbg_rdata;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  arm_dmem dut (.*);

  function automatic logic [31:0] wa(input int k);
    return 32'h0000_4000 + 32'(k * 4);
  endfunction

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      load_we = 1; load_addr = wa(k); load_data = $urandom; model[k] = load_data;
    end
    @(negedge clk); load_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int k, j;
      k = $urandom_range(0, 63);
      j = $urandom_range(0, 63);
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      be = 4'($urandom);
      addr = wa(k) | 32'($urandom_range(0, 3));
      wdata = $urandom;
      load_we = 1'($urandom_range(0, 3) == 0);
      load_addr = wa(j);
      load_data = $urandom;
      #1;
      checks++;
      if (rdata !== model[k]) begin
        failures++;
        if (failures < 20) $display("FAIL read %h: got %h expected %h", addr, rdata, model[k]);
      end
      @(posedge clk);
      if (we) begin
        for (int b = 0; b < 4; b++) if (be[b]) model[k][8*b +: 8] = wdata[8*b +: 8];
      end else if (load_we) begin
        model[j] = load_data;
      end
      #1;
      dbg_addr = wa(j); #1;
      checks++;
      if (dbg_rdata !== model[j]) begin
        failures++;
        if (failures < 20) $display("FAIL debug read %h: got %h expected %h", dbg_addr, dbg_rdata, model[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
