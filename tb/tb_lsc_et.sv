// Self-checking testbench of lsc_et at its default width (40 check nodes
// per layer). Random codes of 6 layers x 5 edges per check node are
// simulated as bit vectors: per iteration, per layer, the edge bits are
// either all consistent (every check XOR 0) or one random check is made odd.
// A model here tracks which iterations were fully satisfied and checks that
// stop pulses exactly one clock after iter_end of a satisfied iteration that
// is not the first of the frame, and never otherwise; unsat is checked after
// every layer. The hard-decision mux is checked with random vectors.
module tb_lsc_et;
  localparam int NPAR = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic            hd_upd, frame_start, layer_start, edge_v, layer_end, iter_end, stop, unsat;
  logic [NPAR-1:0] app_sign, hd_old, hd_new, hd_in;
  int checks = 0, failures = 0, n_stop = 0, n_nostop = 0;

  lsc_et dut (.*);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // one iteration; bad_layer < 0: all layers satisfied
  task automatic iteration(int bad_layer, bit first);
    bit m_unsat = 0;
    for (int l = 0; l < 6; l++) begin
      logic [NPAR-1:0] par = '0;
      @(negedge clk) layer_start = 1;
      @(negedge clk) layer_start = 0;
      for (int e = 0; e < 5; e++) begin
        edge_v = 1;
        hd_in = (e < 4) ? {$urandom, $urandom} : par;
        if (e == 4 && l == bad_layer) hd_in[$urandom_range(0, NPAR - 1)] ^= 1'b1;
        par ^= (e < 4) ? hd_in : '0;
        @(negedge clk);
      end
      edge_v = 0;
      layer_end = 1;
      iter_end = (l == 5);
      @(negedge clk);
      layer_end = 0;
      iter_end = 0;
      if (l == bad_layer) m_unsat = 1;
      if (l == 5) begin
        bit exp_stop = !first && (bad_layer < 0);
        chk(stop == exp_stop, $sformatf("stop=%0b expected %0b", stop, exp_stop));
        if (stop) n_stop++; else n_nostop++;
      end else begin
        chk(unsat == m_unsat, "unsat flag");
        chk(!stop, "stop outside iteration end");
      end
    end
  endtask

  initial begin
    hd_upd = 0; app_sign = '0; hd_old = '0; frame_start = 0; layer_start = 0;
    edge_v = 0; hd_in = '0; layer_end = 0; iter_end = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      @(negedge clk) frame_start = 1;
      @(negedge clk) frame_start = 0;
      for (int it = 0; it < 4; it++)
        iteration(($urandom_range(0, 2) == 0) ? -1 : $urandom_range(0, 5), it == 0);
      iteration(-1, 0);
    end
    for (int k = 0; k < 50; k++) begin
      hd_upd = $urandom_range(0, 1);
      app_sign = {$urandom, $urandom};
      hd_old = {$urandom, $urandom};
      #1;
      chk(hd_new == (hd_upd ? app_sign : hd_old), "hard-decision mux");
    end
    chk(n_stop > 0 && n_nostop > 0, "stop and no-stop both seen");
    $display("stops=%0d no_stops=%0d", n_stop, n_nostop);
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
