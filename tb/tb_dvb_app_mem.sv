// Self-checking testbench of dvb_app_mem at its default depth (1620 blocks
// of 40 x 8 bits): random writes with random lane masks and random reads,
// compared with a copy kept here; every block is written once first so no
// read returns an unwritten value.
module tb_dvb_app_mem;
  import dvb_pkg::*;
  localparam int NB = 1620;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [10:0] raddr, waddr;
  logic [QA-1:0] rdata [P], wdata [P];
  logic we;
  logic [P-1:0] wmask;
  logic [QA-1:0] model [NB][P];
  int checks = 0, failures = 0;

  dvb_app_mem dut (.*);

  task automatic rd_check(int a);
    int bad = 0;
    raddr = 11'(a);
    #1;
    for (int i = 0; i < P; i++) if (rdata[i] !== model[a][i]) bad++;
    checks++;
    if (bad) begin failures++; $display("block %0d: %0d lanes wrong", a, bad); end
  endtask

  initial begin
    we = 0; raddr = 0; waddr = 0; wmask = '1;
    for (int i = 0; i < P; i++) wdata[i] = '0;
    for (int a = 0; a < NB; a++) begin
      @(negedge clk);
      we = 1; waddr = 11'(a); wmask = '1;
      for (int i = 0; i < P; i++) begin wdata[i] = QA'($urandom); model[a][i] = wdata[i]; end
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = 1; waddr = 11'($urandom_range(0, NB - 1)); wmask = {$urandom, $urandom};
      for (int i = 0; i < P; i++) wdata[i] = QA'($urandom);
      @(posedge clk);
      for (int i = 0; i < P; i++) if (wmask[i]) model[waddr][i] = wdata[i];
      @(negedge clk) we = 0;
      rd_check(waddr);
      rd_check($urandom_range(0, NB - 1));
    end
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
