// CN_RECOVER unit of the 3-state processing unit.
//
// Expands a compressed CN word into the 24 sign-magnitude CN messages, one
// per serial line. In two-layer concurrent mode (dual = 1) the lower and
// upper halves are separate check nodes and each uses its own minima. In
// normal mode the two halves are merged first: the smaller of the two first
// minima is the CN's first minimum (its position is kept), and the second
// minimum is the smaller of the other half's first minimum and this half's
// second minimum. A line at the position of the first minimum receives the
// second minimum, every other line the first minimum. Combinational.
module wmx_cn_recover
  import wmx_pkg::*;
(
  input  cn_word_t         cn,
  input  logic             dual,
  output logic [NLINE-1:0] sgn,
  output logic [CMW-1:0]   mag [NLINE]
);

  logic [CMW-1:0]  a1, a2;
  logic [POSW-1:0] ap;
  always_comb begin
    if (cn.min1_l <= cn.min1_u) begin
      a1 = cn.min1_l;
      ap = cn.pos_l;
      a2 = (cn.min2_l < cn.min1_u) ? cn.min2_l : cn.min1_u;
    end else begin
      a1 = cn.min1_u;
      ap = cn.pos_u;
      a2 = (cn.min2_u < cn.min1_l) ? cn.min2_u : cn.min1_l;
    end
    sgn = cn.sgn;
    for (int i = 0; i < NLINE; i++) begin
      if (dual) begin
        if (i < HALF) mag[i] = (POSW'(i) == cn.pos_l) ? cn.min2_l : cn.min1_l;
        else          mag[i] = (POSW'(i) == cn.pos_u) ? cn.min2_u : cn.min1_u;
      end else begin
        mag[i] = (POSW'(i) == ap) ? a2 : a1;
      end
    end
  end

endmodule
