// Pattern decoder (PD) of the DVB-T2 decoder: the division pattern of a
// conflict block.
//
// A conflict block holds two shifted diagonals, S1 and S2. Their distance
// d = |S1 - S2| (taken as min(d, P - d), which describes the same pairs of
// rows) decides how the P check nodes of the layer are split into two
// sub-layers so that no APP message is updated twice in one sub-layer:
// halve d and P together while both are even (delta counts the halvings);
// if P is then odd no division exists (ok = 0); otherwise row x belongs to
// the second sub-layer when bit delta of x is 1. For P = 40 this yields the
// three patterns of delta = 0, 1, 2 (d odd, d = 2 x odd, d = 4 x odd); d = 8
// and d = 16 cannot be divided. Combinational.
module dvb_pd
  import dvb_pkg::*;
(
  input  logic [SW-1:0] s1,
  input  logic [SW-1:0] s2,
  output logic [P-1:0]  pattern,   // 1: row in the second sub-layer
  output logic          ok
);

  always_comb begin
    logic [SW-1:0] d, dd;
    int unsigned   pp, delta;
    d  = (s1 > s2) ? s1 - s2 : s2 - s1;
    if (32'(d) > P / 2) d = SW'(P) - d;
    dd    = d;
    pp    = P;
    delta = 0;
    for (int k = 0; k < SW; k++) begin
      if (dd != '0 && !dd[0] && (pp % 2 == 0)) begin
        dd    = dd >> 1;
        pp    = pp / 2;
        delta = delta + 1;
      end
    end
    ok = (dd != '0) && (pp % 2 == 0);
    for (int x = 0; x < P; x++) pattern[x] = ok && (((x >> delta) & 1) == 1);
  end

endmodule
