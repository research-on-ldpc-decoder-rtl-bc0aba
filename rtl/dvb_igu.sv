// Information generating unit (IGU) of the DVB-T2 decoder.
//
// After the PCM rearrangement with EPS = 9, nine successive layers share one
// stored description: the layer r+1 entry of a block follows from the
// layer r entry by
//     (A, S) -> (A - 8, S - 1)  if A mod 9 = 8,
//     (A, S) -> (A + 1, S)      otherwise,
// so the PCM-ROM keeps only the first layer of each group (one ninth of the
// matrix). The IGU holds WMAX buffers, one per block of a layer. They are
// filled from the PCM-ROM at the start of a group (load); during a layer the
// controller reads buffer rd_idx combinationally, and asserts adv on the
// last use of an entry in that layer to replace it by its successor.
// S counts modulo P (a shift of P is a shift of 0).
module dvb_igu
  import dvb_pkg::*;
(
  input  logic          clk,
  input  logic          load,
  input  logic [IW-1:0] load_idx,
  input  pcm_entry_t    load_entry,
  input  logic [IW-1:0] rd_idx,
  input  logic          adv,
  output pcm_entry_t    entry
);

  pcm_entry_t buf_q [WMAX];

  function automatic pcm_entry_t next_entry(input pcm_entry_t e);
    pcm_entry_t n;
    if ((32'(e.a) % EPS) == EPS - 1) begin
      n.a = e.a - AW'(EPS - 1);
      n.s = (e.s == '0) ? SW'(P - 1) : e.s - 1'b1;
    end else begin
      n.a = e.a + 1'b1;
      n.s = e.s;
    end
    return n;
  endfunction

  assign entry = buf_q[rd_idx];

  always_ff @(posedge clk) begin
    if (load)     buf_q[load_idx] <= load_entry;
    else if (adv) buf_q[rd_idx]   <= next_entry(buf_q[rd_idx]);
  end

endmodule
