// CN message memory of the WiMAX decoder: NPU register blocks, one per PU,
// each holding one compressed CN word per layer.
//
// All blocks share one address (the layer): a read returns the word of every
// PU combinationally, a write stores the words of every PU at the clock edge.
// The memory is built from registers, as in the design, so the layered
// schedule can read the current layer while writing the previous one in the
// same cycle. Depth DEPTH is the largest number of layers of a supported code
// (12, WiMAX rate 1/2, when decoded one layer at a time).
module wmx_cn_mem
  import wmx_pkg::*;
#(
  parameter int unsigned NPU   = 96,
  parameter int unsigned DEPTH = 12
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  cn_word_t                 wdata [NPU],
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output cn_word_t                 rdata [NPU]
);

  cn_word_t mem [DEPTH][NPU];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
