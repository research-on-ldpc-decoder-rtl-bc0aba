// Self-checking testbench of barrel_shifter at its defaults (40 lanes of
// 8 bits, the DVB-T2 PN0/PN1): every shift 0..39 several times with random
// data; checks dout[i] = din[(i + sh) mod 40] on every lane.
module tb_barrel_shifter;
  localparam int N = 40;
  logic [7:0] din [N], dout [N];
  logic [5:0] sh;
  int checks = 0, failures = 0;

  barrel_shifter dut (.din(din), .sh(sh), .dout(dout));

  initial begin
    for (int t = 0; t < 5 * N; t++) begin
      int bad;
      bad = 0;
      sh = 6'(t % N);
      for (int i = 0; i < N; i++) din[i] = 8'($urandom);
      #1;
      for (int i = 0; i < N; i++) if (dout[i] !== din[(i + sh) % N]) bad++;
      checks++;
      if (bad) begin failures++; $display("sh=%0d: %0d lanes wrong", sh, bad); end
    end
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
