// Self-checking testbench of dvb_pd: every pair of shifts (S1, S2) of a
// 40 x 40 conflict block. Checks, independently of how the pattern is
// formed, that a division exists exactly when the folded distance
// d = min(|S1-S2|, 40-|S1-S2|) is neither 0, 8 nor 16, and that then the
// two rows x and (x + d) mod 40, which reach the same APP lane through the
// two diagonals, always fall into different sub-layers, and both
// sub-layers hold 20 rows.
module tb_dvb_pd;
  import dvb_pkg::*;
  logic [SW-1:0] s1, s2;
  logic [P-1:0]  pattern;
  logic          ok;
  int checks = 0, failures = 0, n_div = 0;

  dvb_pd dut (.*);

  initial begin
    for (int a = 0; a < P; a++)
      for (int b = 0; b < P; b++) begin
        int d;
        bit exp_ok, good;
        d = (a > b) ? a - b : b - a;
        if (d > P / 2) d = P - d;
        exp_ok = !(d == 0 || d == 8 || d == 16);
        s1 = SW'(a); s2 = SW'(b);
        #1;
        checks++;
        if (ok !== exp_ok) begin failures++; $display("S1=%0d S2=%0d ok=%0b", a, b, ok); end
        if (exp_ok) begin
          good = ($countones(pattern) == P / 2);
          for (int x = 0; x < P; x++) if (pattern[x] == pattern[(x + d) % P]) good = 0;
          checks++;
          if (!good) begin failures++; $display("S1=%0d S2=%0d pattern %h", a, b, pattern); end
          n_div++;
        end
      end
    $display("divided blocks: %0d", n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
