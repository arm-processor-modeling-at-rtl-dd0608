// tb_arm_cond: checks the condition-code test of every instruction. For all
// 16 condition fields and all 16 combinations of N, Z, C, V the pass output is
// compared with the condition definitions of the ARM architecture (EQ ... AL,
// and 1111 treated as always, as the unconditional v5 encodings need).
// Exhaustive (256 cases), combinational, checked 1 ns after each change.
`timescale 1ns/1ps
module tb_arm_cond;
  logic [3:0] cond;
  logic n, z, c, v, pass;
  int checks = 0, failures = 0;

  arm_cond dut (.*);

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int cc = 0; cc < 16; cc++) begin
      for (int f = 0; f < 16; f++) begin
        logic e;
        cond = 4'(cc);
        {n, z, c, v} = 4'(f);
        #1;
        unique case (cc)
          0:  e = z;
          1:  e = !z;
          2:  e = c;
          3:  e = !c;
          4:  e = n;
          5:  e = !n;
          6:  e = v;
          7:  e = !v;
          8:  e = c && !z;
          9:  e = !c || z;
          10: e = (n == v);
          11: e = (n != v);
          12: e = !z && (n == v);
          13: e = z || (n != v);
          default: e = 1'b1;
        endcase
        checks++;
        if (pass !== e) begin
          failures++;
          $display("FAIL cond=%h nzcv=%b: got %b expected %b", cc, f[3:0], pass, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
