// PCM-ROM of the DVB-T2 decoder: single-port memory with the rearranged
// parity-check matrix of all supported code rates.
//
// For every group of nine layers it stores one entry (APP block address A,
// shift S) per block of the group's first layer; the IGU derives the other
// eight layers. The contents come from the address tables of the DVB-T2
// standard (not part of this design), so the memory has a write port through
// which they are loaded; in silicon it would be a mask ROM. Depth 3960 holds
// the six normal-frame rates (q x row weight summed over the rates).
module dvb_pcm_rom
  import dvb_pkg::*;
#(
  parameter int unsigned DEPTH = 3960
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  pcm_entry_t               wdata,
  output pcm_entry_t               rdata
);

  pcm_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
