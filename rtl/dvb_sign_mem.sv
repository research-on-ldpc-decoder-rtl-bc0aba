// Sign-MEM of the DVB-T2 decoder: dual-port memory holding the sign of every
// extrinsic message, one P-bit word per (layer, block) edge group.
//
// Word address = layer x (row weight) + block index. One combinational read
// port, one write port with a per-PE bit mask. Depth 7128 covers the code
// rate with most edges (rate 3/5: 648 layers x 11 blocks).
module dvb_sign_mem
  import dvb_pkg::*;
#(
  parameter int unsigned DEPTH = 7128
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [P-1:0]             rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [P-1:0]             wdata,
  input  logic [P-1:0]             wmask
);

  logic [P-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= (mem[waddr] & ~wmask) | (wdata & wmask);
  end

  assign rdata = mem[raddr];

endmodule
