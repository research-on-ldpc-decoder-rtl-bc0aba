// Self-checking testbench of dvb_sign_mem at its default depth (7128 words
// of 40 sign bits): all words written once, then random bit-masked writes
// and random reads compared with a copy kept here.
module tb_dvb_sign_mem;
  import dvb_pkg::*;
  localparam int DEPTH = 7128;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [12:0] raddr, waddr;
  logic [P-1:0] rdata, wdata, wmask;
  logic we;
  logic [P-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  dvb_sign_mem dut (.*);

  initial begin
    we = 0; raddr = 0; waddr = 0; wmask = '1; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 13'(a); wmask = '1; wdata = {$urandom, $urandom}; model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      we = 1; waddr = 13'($urandom_range(0, DEPTH - 1));
      wmask = {$urandom, $urandom}; wdata = {$urandom, $urandom};
      @(posedge clk);
      model[waddr] = (model[waddr] & ~wmask) | (wdata & wmask);
      @(negedge clk) we = 0;
      raddr = (t % 2) ? 13'($urandom_range(0, DEPTH - 1)) : waddr;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("word %0d wrong", raddr); end
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
