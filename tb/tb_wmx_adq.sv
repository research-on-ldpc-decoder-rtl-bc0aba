// Self-checking testbench of wmx_adq at its defaults (96 flags, window of
// 4 layers). Drives random pseudo-unsatisfied flag vectors with tick
// pulses and random thresholds, in frames separated by clear, and compares
// trig and changed every clock with a model: the sum of this layer's count
// and the three previous ones below ps_th, after at least four earlier
// layers, fires once per frame when enabled.
module tb_wmx_adq;
  localparam int NPU = 96, NWIN = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, en, tick, trig, changed;
  logic [NPU-1:0] flags;
  logic [8:0] ps_th;
  int checks = 0, failures = 0, n_trig = 0;
  int win [NWIN];
  int nseen;
  bit m_changed;

  wmx_adq dut (.*);

  initial begin
    clear = 0; en = 0; tick = 0; flags = '0; ps_th = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      int dens;
      dens = $urandom_range(1, 60);
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int i = 0; i < NWIN; i++) win[i] = 0;
      nseen = 0; m_changed = 0;
      en = (f % 5 != 4);
      ps_th = 9'($urandom_range(0, 300));
      for (int l = 0; l < 24; l++) begin
        int pop, sum;
        bit exp_trig;
        tick = ($urandom_range(0, 3) != 0);
        pop = 0;
        for (int i = 0; i < NPU; i++) begin
          flags[i] = ($urandom_range(0, 99) < dens);
          pop += flags[i];
        end
        if (l > 12) dens = dens / 2;
        sum = pop;
        for (int i = 0; i < NWIN - 1; i++) sum += win[i];
        exp_trig = tick && en && !m_changed && sum < ps_th && nseen >= NWIN;
        @(negedge clk);
        if (tick) begin
          for (int i = NWIN - 1; i > 0; i--) win[i] = win[i-1];
          win[0] = pop;
          nseen++;
        end
        if (exp_trig) m_changed = 1;
        checks++;
        if (trig !== exp_trig || changed !== m_changed) begin
          failures++;
          $display("frame %0d layer %0d: trig %0b/%0b changed %0b/%0b", f, l, trig, exp_trig, changed, m_changed);
        end
        if (trig) n_trig++;
        tick = 0;
      end
    end
    checks++;
    if (n_trig == 0) begin failures++; $display("never triggered"); end
    $display("triggers=%0d", n_trig);
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
