// Self-checking testbench of dvb_pcm_rom at its default depth (3960
// entries): the whole table is loaded through the write port with random
// (A, S) entries, then every entry and a random sequence of entries are
// read back on the shared address.
module tb_dvb_pcm_rom;
  import dvb_pkg::*;
  localparam int DEPTH = 3960;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [11:0] addr;
  pcm_entry_t wdata, rdata;
  pcm_entry_t model [DEPTH];
  int checks = 0, failures = 0;

  dvb_pcm_rom dut (.*);

  task automatic rd_check(int a);
    addr = 12'(a);
    #1;
    checks++;
    if (rdata !== model[a]) begin failures++; $display("entry %0d wrong", a); end
  endtask

  initial begin
    we = 0; addr = 0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; addr = 12'(a);
      wdata.a = AW'($urandom_range(0, 1619)); wdata.s = SW'($urandom_range(0, P - 1));
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a += 7) rd_check(a);
    for (int t = 0; t < 200; t++) rd_check($urandom_range(0, DEPTH - 1));
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
