// APP-MEM of the DVB-T2 decoder: dual-port memory of NB words, each word the
// P 8-bit APP messages of one 40-column block.
//
// One read port (combinational read) and one write port (written at the
// clock edge) with a per-lane write enable: a conflict sub-layer or the
// removed corner of the staircase must leave some lanes of a block as they
// are. 64800 / 40 = 1620 words of 320 bits.
module dvb_app_mem
  import dvb_pkg::*;
#(
  parameter int unsigned NB = 1620
) (
  input  logic                   clk,
  input  logic [$clog2(NB)-1:0]  raddr,
  output logic [QA-1:0]          rdata [P],
  input  logic                   we,
  input  logic [$clog2(NB)-1:0]  waddr,
  input  logic [QA-1:0]          wdata [P],
  input  logic [P-1:0]           wmask
);

  logic [QA-1:0] mem [NB][P];

  always_ff @(posedge clk) begin
    if (we)
      for (int i = 0; i < P; i++)
        if (wmask[i]) mem[waddr][i] <= wdata[i];
  end

  assign rdata = mem[raddr];

endmodule
