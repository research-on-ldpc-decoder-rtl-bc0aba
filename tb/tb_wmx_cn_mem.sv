// Self-checking testbench of wmx_cn_mem at its defaults (96 PUs x 12
// layers): fills every layer with random compressed CN words, reads them
// all back (combinational read), then does random writes and reads against
// a copy kept here, including a read of the address being written.
module tb_wmx_cn_mem;
  import wmx_pkg::*;
  localparam int NPU = 96, DEPTH = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [3:0] waddr, raddr;
  cn_word_t wdata [NPU], rdata [NPU];
  cn_word_t model [DEPTH][NPU];
  int checks = 0, failures = 0;

  wmx_cn_mem dut (.*);

  function automatic cn_word_t rnd();
    return cn_word_t'({$urandom, $urandom});
  endfunction

  task automatic rd_check(int a);
    int bad = 0;
    raddr = 4'(a);
    #1;
    for (int i = 0; i < NPU; i++) if (rdata[i] !== model[a][i]) bad++;
    checks++;
    if (bad) begin failures++; $display("layer %0d: %0d words wrong", a, bad); end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0;
    for (int i = 0; i < NPU; i++) wdata[i] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a);
      for (int i = 0; i < NPU; i++) begin wdata[i] = rnd(); model[a][i] = wdata[i]; end
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a++) rd_check(a);
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 4'($urandom_range(0, DEPTH - 1));
      for (int i = 0; i < NPU; i++) wdata[i] = rnd();
      rd_check(waddr);            // before the edge: old contents
      @(posedge clk);
      if (we) for (int i = 0; i < NPU; i++) model[waddr][i] = wdata[i];
      @(negedge clk) we = 0;
      rd_check($urandom_range(0, DEPTH - 1));
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
