// tb_arm_imem: checks the instruction memory at its default size (64 KiB).
// Words written through the load port at the rising edge must be read back
// combinationally on the fetch port; the low two address bits are ignored and
// addresses wrap modulo the memory size. A scoreboard tracks 2000 random
// writes to a set of 64 addresses, each followed by reads.
`timescale 1ns/1ps
module tb_arm_imem;
  logic        clk = 0, load_we = 0;
  logic [31:0] fetch_addr = 0, instr, load_addr = 0, load_data = 0;
  logic [31:0] model [64];
  logic [31:0] addrs [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  arm_imem dut (.*);

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      addrs[i] = {16'd0, 14'($urandom), 2'b00};
      for (int j = 0; j < i; j++) if (addrs[j] == addrs[i]) addrs[i] = 32'(i * 4);
    end
    addrs[0] = 32'h0; addrs[1] = 32'hFFFC; addrs[2] = 32'h8000;
    // fill the chosen words
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = addrs[i]; load_data = $urandom; model[i] = load_data;
    end
    @(negedge clk); load_we = 0;
    for (int n = 0; n < 2000; n++) begin
      int k;
      k = $urandom_range(0, 63);
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        load_we = 1; load_addr = addrs[k] | 32'($urandom_range(0, 3)); load_data = $urandom;
        model[k] = load_data;
        @(negedge clk); load_we = 0;
      end
      k = $urandom_range(0, 63);
      fetch_addr = addrs[k] | 32'($urandom_range(0, 3));
      if ($urandom_range(0, 3) == 0) fetch_addr = fetch_addr | 32'h0001_0000;  // wraps
      #1;
      checks++;
      if (instr !== model[k]) begin
        failures++;
        if (failures < 20) $display("FAIL fetch %h: got %h expected %h", fetch_addr, instr, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
