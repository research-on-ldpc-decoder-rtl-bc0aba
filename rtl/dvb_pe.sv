// Processor element (PE) of the DVB-T2 decoder: one check node of a layer,
// normalized min-sum with factor 0.75.
//
// Read phase (in_v, one block per clock, in_idx = position of the block in
// the layer): the old extrinsic message of this edge is recovered from the
// row's compressed word (kept in the PE's own Word-MEM) and the edge's sign
// bit from Sign-MEM; the variable-to-check message
//     v2c = SAT8(APP - ext_old)
// goes into the buffer slot in_idx, and the serial check function unit
// (SCFU) updates the first and second minimum of min(|v2c|, 31), the
// position of the first minimum and the sign product.
// fin (one clock after the last input): the new compressed word
// {0.75 x min1, 0.75 x min2, pos} is written to Word-MEM at wm_addr.
// Write phase (out_idx): ext_new = sign x (pos == out_idx ? min2' : min1'),
// with sign = sign product XOR the sign of this edge's v2c, and
//     app_out = SAT8(v2c + ext_new),  sgn_out = sign of ext_new.
// out_ok tells whether this PE really owns the edge (it was active in this
// sub-layer and the edge is not the removed corner of the staircase).
//
// clr (one clock before the read phase) clears the SCFU and reads the old
// word from Word-MEM (single port: read at clr, written at fin).
// first_it forces the old extrinsic messages to zero (first iteration).
// The 0.75 scaling rounds down: (3m) >> 2.
module dvb_pe
  import dvb_pkg::*;
#(
  parameter int unsigned NLAYER = 810   // Word-MEM depth: layers per iteration
) (
  input  logic                      clk,
  input  logic                      clr,
  input  logic [$clog2(NLAYER)-1:0] wm_addr,
  input  logic                      first_it,
  input  logic                      active,
  // read phase
  input  logic                      in_v,
  input  logic [IW-1:0]             in_idx,
  input  logic                      in_cut,
  input  logic signed [QA-1:0]      app_in,
  input  logic                      sgn_old,
  // word update
  input  logic                      fin,
  // write phase
  input  logic [IW-1:0]             out_idx,
  output logic signed [QA-1:0]      app_out,
  output logic                      sgn_out,
  output logic                      out_ok
);

  ext_word_t wmem [NLAYER];      // Word-MEM
  ext_word_t old_q, new_q;

  logic signed [QA-1:0] v2c [WMAX];
  logic [WMAX-1:0]      own;
  logic [MW-1:0]        m1, m2;
  logic [IW-1:0]        p1;
  logic                 ps;

  // ---------------- read phase arithmetic ----------------
  logic [MW-1:0]         omag;
  logic signed [QA+1:0]  ext_old, diff;
  logic signed [QA-1:0]  v;
  logic [QA:0]           vabs;
  logic [MW-1:0]         vm;
  always_comb begin
    omag    = (in_idx == old_q.pos) ? old_q.min2 : old_q.min1;
    ext_old = first_it ? '0 : (sgn_old ? -(QA+2)'(omag) : (QA+2)'(omag));
    diff    = (QA+2)'(app_in) - ext_old;
    v       = sat_app(diff);
    vabs    = v[QA-1] ? (QA+1)'(-(QA+1)'(v)) : (QA+1)'(v);
    vm      = (vabs > (QA+1)'(2**MW - 1)) ? MW'(2**MW - 1) : vabs[MW-1:0];
  end

  function automatic logic [MW-1:0] norm(input logic [MW-1:0] m);
    return MW'(((MW+2)'(m) * 3) >> 2);
  endfunction

  logic take;
  assign take = in_v && active && !in_cut;

  always_ff @(posedge clk) begin
    if (clr) begin
      old_q <= wmem[wm_addr];
      m1    <= '1;
      m2    <= '1;
      p1    <= '0;
      ps    <= 1'b0;
      own   <= '0;
    end else if (take) begin
      v2c[in_idx] <= v;
      own[in_idx] <= 1'b1;
      ps          <= ps ^ v[QA-1];
      if (vm < m1) begin
        m2 <= m1;
        m1 <= vm;
        p1 <= in_idx;
      end else if (vm < m2) begin
        m2 <= vm;
      end
    end else if (fin) begin
      new_q.min1 <= norm(m1);
      new_q.min2 <= norm(m2);
      new_q.pos  <= p1;
      if (active) wmem[wm_addr] <= '{min1: norm(m1), min2: norm(m2), pos: p1};
    end
  end

  // ---------------- write phase ----------------
  logic [MW-1:0]        nmag;
  logic signed [QA+1:0] ext_new;
  always_comb begin
    nmag    = (out_idx == new_q.pos) ? new_q.min2 : new_q.min1;
    sgn_out = ps ^ v2c[out_idx][QA-1];
    ext_new = sgn_out ? -(QA+2)'(nmag) : (QA+2)'(nmag);
    app_out = sat_app((QA+2)'(v2c[out_idx]) + ext_new);
    out_ok  = own[out_idx];
  end

endmodule
