// Self-checking testbench of wmx_pn (default 96 lines): random 2-bit data,
// random sub-block size z (24..96, the WiMAX sizes and others) and shift
// sh < z; checks every output against dout[i] = din[(i + sh) mod z] for
// i < z and 0 above z.
module tb_wmx_pn;
  localparam int NPU = 96;
  logic [1:0] din [NPU], dout [NPU];
  logic [6:0] z;
  logic [6:0] sh;
  int checks = 0, failures = 0;

  wmx_pn dut (.din(din), .z(z), .sh(sh), .dout(dout));

  initial begin
    for (int t = 0; t < 400; t++) begin
      int bad;
      bad = 0;
      z  = 7'($urandom_range(1, NPU));
      if (t < 20) z = 7'(NPU);
      sh = 7'($urandom_range(0, z - 1));
      for (int i = 0; i < NPU; i++) din[i] = 2'($urandom);
      #1;
      for (int i = 0; i < NPU; i++) begin
        logic [1:0] e;
        e = (i < z) ? din[(i + sh) % z] : 2'b00;
        if (dout[i] !== e) bad++;
      end
      checks++;
      if (bad) begin failures++; $display("z=%0d sh=%0d: %0d lanes wrong", z, sh, bad); end
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
