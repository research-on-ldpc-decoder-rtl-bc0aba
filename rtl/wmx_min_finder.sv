// Min finder of the 3-state processing unit (CNU of offset min-sum).
//
// Takes the 24 current-layer VN messages of one PU, converts them to
// sign-magnitude (2C-SM) and runs two independent comparator trees, one over
// the lower 12 lines and one over the upper 12. Each tree gives the smallest
// and second smallest magnitude and the line of the smallest. The outputs are
// stored per half, already turned into CN magnitudes (minus one ulp offset,
// floored at 0, clamped to 4 bits), so one word serves both the normal mode
// (one CN over 24 lines: the two halves are merged when the word is read,
// see wmx_cn_recover) and the two-layer concurrent mode (one CN per half).
//
// Lines with en = 0 do not take part: their magnitude counts as the largest
// possible value and their sign is left out of the sign products.
// Outputs: the CN word with the 24 CN-message signs (sign product of the CN
// excluding the line, i.e. product of all signs XOR own sign), and the
// pseudo-unsatisfied flags ps_u / ps_l (product of the VN signs is negative).
//
// This block is purely combinational; the PU registers its result at the end
// of S2. The design computes the two minima over two clock cycles to shorten
// the critical path; here they come from one combinational tree.
module wmx_min_finder
  import wmx_pkg::*;
(
  input  logic signed [QW-1:0] vn [NLINE],
  input  logic [NLINE-1:0]     en,
  input  logic                 dual,    // two-layer concurrent mode
  output cn_word_t             cn,
  output logic                 ps_u,
  output logic                 ps_l
);

  logic [QW-1:0]  mag [NLINE];
  logic [NLINE-1:0] s;

  always_comb begin
    for (int i = 0; i < NLINE; i++) begin
      s[i]   = vn[i][QW-1] && en[i];
      mag[i] = !en[i] ? '1 : (vn[i][QW-1] ? QW'(-vn[i]) : QW'(vn[i]));
    end
  end

  // one tree per half
  logic [QW-1:0]   m1 [2], m2 [2];
  logic [POSW-1:0] p1 [2];
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      m1[h] = '1;
      m2[h] = '1;
      p1[h] = POSW'(h * HALF);
      for (int i = h * HALF; i < (h + 1) * HALF; i++) begin
        if (mag[i] < m1[h]) begin
          m2[h] = m1[h];
          m1[h] = mag[i];
          p1[h] = POSW'(i);
        end else if (mag[i] < m2[h]) begin
          m2[h] = mag[i];
        end
      end
    end
  end

  logic pl, pu, pall;
  always_comb begin
    pl   = ^s[HALF-1:0];
    pu   = ^s[NLINE-1:HALF];
    pall = pl ^ pu;
    ps_l = pl;
    ps_u = pu;
    cn.min1_l = cn_mag(m1[0]);
    cn.min2_l = cn_mag(m2[0]);
    cn.pos_l  = p1[0];
    cn.min1_u = cn_mag(m1[1]);
    cn.min2_u = cn_mag(m2[1]);
    cn.pos_u  = p1[1];
    for (int i = 0; i < NLINE; i++)
      cn.sgn[i] = s[i] ^ (dual ? ((i < HALF) ? pl : pu) : pall);
  end

endmodule
