// 3-state processing unit (PU) of the WiMAX fully-parallel layered decoder.
//
// One PU serves one check node of a layer (two in two-layer concurrent
// mode). It holds 24 two-bit serial lines (wmx_vnu_line), one per block
// column of the base matrix, a CN_RECOVER unit for the old CN message read
// from CN memory (pre-VNU), the min finder (CNU) and a register holding the
// new CN message, which a second CN_RECOVER expands for the post-VNU of the
// next round.
//
// Round timing (three clocks, st = S0, S1, S2):
//   S0..S2  pre-VNU of layer k on bits [1:0], [3:2], [5:4] arriving from the
//           PN, and at the same time post-VNU of layer k-1 sending its new
//           APP bits to the PN;
//   end S2  the min finder sees the complete layer-k VN values (the S2 bits
//           come straight from the adders) and its result is registered in
//           cn_new together with the pseudo-unsatisfied flag adq.
// cn_new and adq are therefore valid from S0 of the following round, which
// is when the controller writes cn_new to CN memory.
//
// pre_en / pst_en select per line whether the VN takes part in the current /
// previous layer; a line that does not simply carries its APP message on.
// Parity-check mode (par = 1) stores the APP messages unchanged while the
// min finder still forms the sign product of the enabled lines, so adq is
// then the parity-check failure of the check node.
// adq: normal mode, the product of the 24 VN signs is negative; two-layer
// mode, either half's product is negative (one OR gate).
module wmx_pu
  import wmx_pkg::*;
(
  input  logic             clk,
  input  pu_state_e        st,
  input  logic             dual,
  input  logic             par,
  input  logic             qchg,
  input  logic [1:0]       app_in  [NLINE],
  input  logic [NLINE-1:0] pre_en,
  input  logic [NLINE-1:0] pst_en,
  input  cn_word_t         cn_old,
  output logic [1:0]       app_out [NLINE],
  output cn_word_t         cn_new,
  output logic             adq
);

  logic [NLINE-1:0]     old_sgn, new_sgn;
  logic [CMW-1:0]       old_mag [NLINE];
  logic [CMW-1:0]       new_mag [NLINE];
  logic signed [QW-1:0] vn_full [NLINE];

  wmx_cn_recover u_rec_old (.cn(cn_old), .dual(dual), .sgn(old_sgn), .mag(old_mag));
  wmx_cn_recover u_rec_new (.cn(cn_new), .dual(dual), .sgn(new_sgn), .mag(new_mag));

  for (genvar i = 0; i < NLINE; i++) begin : g_line
    wmx_vnu_line u_line (
      .clk    (clk),
      .st     (st),
      .app_in (app_in[i]),
      .pre_en (pre_en[i]),
      .pst_en (pst_en[i]),
      .par    (par),
      .qchg   (qchg),
      .old_sgn(old_sgn[i]),
      .old_mag(old_mag[i]),
      .new_sgn(new_sgn[i]),
      .new_mag(new_mag[i]),
      .app_out(app_out[i]),
      .vn_full(vn_full[i])
    );
  end

  cn_word_t mf_cn;
  logic     ps_u, ps_l;
  wmx_min_finder u_mf (
    .vn  (vn_full),
    .en  (pre_en),
    .dual(dual),
    .cn  (mf_cn),
    .ps_u(ps_u),
    .ps_l(ps_l)
  );

  always_ff @(posedge clk) begin
    if (st == ST_S2) begin
      cn_new <= mf_cn;
      adq    <= dual ? (ps_u | ps_l) : (ps_u ^ ps_l);
    end
  end

endmodule
