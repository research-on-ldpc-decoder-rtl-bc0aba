// Self-checking testbench of dvb_igu: loads 22 random first-layer entries
// (A < 1620, S < 40), then walks through the nine layers of a group,
// reading every buffer once per layer with adv, and compares each entry
// with the successor rule (A, S) -> (A - 8, S - 1) if A mod 9 = 8, else
// (A + 1, S), computed here. Repeated for several groups; counts how often
// the wrap case occurred.
module tb_dvb_igu;
  import dvb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          load, adv;
  logic [IW-1:0] load_idx, rd_idx;
  pcm_entry_t    load_entry, entry;
  int ma [WMAX], ms [WMAX];
  int checks = 0, failures = 0, n_wrap = 0;

  dvb_igu dut (.*);

  initial begin
    load = 0; adv = 0; load_idx = 0; rd_idx = 0; load_entry = '0;
    for (int grp = 0; grp < 6; grp++) begin
      for (int i = 0; i < WMAX; i++) begin
        @(negedge clk);
        ma[i] = $urandom_range(0, 1619); ms[i] = $urandom_range(0, P - 1);
        if (i == 0) ms[i] = 0;               // S = 0 wrapping to 39
        load = 1; load_idx = IW'(i); load_entry.a = AW'(ma[i]); load_entry.s = SW'(ms[i]);
      end
      @(negedge clk) load = 0;
      for (int r = 0; r < EPS; r++)
        for (int i = 0; i < WMAX; i++) begin
          rd_idx = IW'(i); adv = 1;
          #1;
          checks++;
          if (entry.a != AW'(ma[i]) || entry.s != SW'(ms[i])) begin
            failures++;
            $display("group %0d layer %0d buffer %0d: (%0d,%0d) expected (%0d,%0d)",
                     grp, r, i, entry.a, entry.s, ma[i], ms[i]);
          end
          if (ma[i] % EPS == EPS - 1) begin
            ma[i] -= EPS - 1; ms[i] = (ms[i] + P - 1) % P; n_wrap++;
          end else ma[i] += 1;
          @(negedge clk);
        end
      adv = 0;
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("wrap case never seen"); end
    $display("wraps=%0d", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
