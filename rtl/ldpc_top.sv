// Top level: the three designs of the work side by side. They are separate
// decoders for separate standards and share only the clock and reset:
//   * wmx_decoder - WiMAX 3-state bit-serial fully-parallel layered decoder
//                   (96 PUs, 24 block columns, offset min-sum, ADQ);
//   * dvb_decoder - DVB-T2 40-parallel layered decoder with conflict
//                   resolution by layer division (normalized min-sum);
//   * lsc_et      - LSC-ET early-termination checker for a layered decoder.
// Every port of the three blocks is brought out unchanged with a prefix
// (w_, d_, e_); see the blocks for timing. Parameters default to the sizes
// of the work.
module ldpc_top
  import wmx_pkg::*;
  import dvb_pkg::*;
#(
  parameter int unsigned W_NPU     = 96,
  parameter int unsigned W_MAXL    = 12,
  parameter int unsigned W_NWIN    = 4,
  parameter int unsigned D_NB      = 1620,
  parameter int unsigned D_NLAYER  = 810,
  parameter int unsigned D_SGN     = 7128,
  parameter int unsigned D_ROM     = 3960,
  parameter int unsigned E_NPAR    = 40
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ---- WiMAX decoder ----
  input  logic [$clog2(W_NPU+1)-1:0]    w_z,
  input  logic [$clog2(W_MAXL+1)-1:0]   w_nlayers,
  input  logic [5:0]                    w_niter,
  input  logic [8:0]                    w_ps_th,
  input  logic                          w_adq_en,
  input  logic                          w_bm_we,
  input  logic [$clog2(W_MAXL)-1:0]     w_bm_layer,
  input  logic [$clog2(NLINE)-1:0]      w_bm_col,
  input  logic                          w_bm_nz,
  input  logic [$clog2(W_NPU)-1:0]      w_bm_shift,
  input  logic [QW-1:0]                 w_llr [NLINE][W_NPU],
  input  logic                          w_start,
  output logic                          w_busy,
  output logic                          w_done,
  output logic                          w_ok,
  output logic [W_NPU-1:0]              w_hd [NLINE],
  output logic                          w_adq_changed,
  // ---- DVB-T2 decoder ----
  input  logic [AW-1:0]                 d_kb,
  input  logic [6:0]                    d_q,
  input  logic [IW-1:0]                 d_w,
  input  logic [$clog2(D_ROM)-1:0]      d_rom_base,
  input  logic [5:0]                    d_niter,
  input  logic                          d_rom_we,
  input  logic [$clog2(D_ROM)-1:0]      d_rom_addr,
  input  pcm_entry_t                    d_rom_wdata,
  input  logic                          d_llr_we,
  input  logic [$clog2(D_NB)-1:0]       d_llr_addr,
  input  logic [QA-1:0]                 d_llr_data [P],
  input  logic [$clog2(D_NB)-1:0]       d_hd_addr,
  output logic [P-1:0]                  d_hd_data,
  input  logic                          d_start,
  output logic                          d_busy,
  output logic                          d_done,
  output logic                          d_pd_err,
  // ---- LSC-ET ----
  input  logic                          e_hd_upd,
  input  logic [E_NPAR-1:0]             e_app_sign,
  input  logic [E_NPAR-1:0]             e_hd_old,
  output logic [E_NPAR-1:0]             e_hd_new,
  input  logic                          e_frame_start,
  input  logic                          e_layer_start,
  input  logic                          e_edge_v,
  input  logic [E_NPAR-1:0]             e_hd_in,
  input  logic                          e_layer_end,
  input  logic                          e_iter_end,
  output logic                          e_stop,
  output logic                          e_unsat
);

  wmx_decoder #(.NPU(W_NPU), .MAXL(W_MAXL), .NWIN(W_NWIN)) u_wmx (
    .clk(clk), .rst_n(rst_n),
    .z(w_z), .nlayers(w_nlayers), .niter(w_niter), .ps_th(w_ps_th), .adq_en(w_adq_en),
    .bm_we(w_bm_we), .bm_layer(w_bm_layer), .bm_col(w_bm_col), .bm_nz(w_bm_nz),
    .bm_shift(w_bm_shift), .llr(w_llr), .start(w_start), .busy(w_busy), .done(w_done),
    .ok(w_ok), .hd(w_hd), .adq_changed(w_adq_changed)
  );

  dvb_decoder #(.NB(D_NB), .NLAYER(D_NLAYER), .SGN_DEPTH(D_SGN), .ROM_DEPTH(D_ROM)) u_dvb (
    .clk(clk), .rst_n(rst_n),
    .kb(d_kb), .q(d_q), .w(d_w), .rom_base(d_rom_base), .niter(d_niter),
    .rom_we(d_rom_we), .rom_addr(d_rom_addr), .rom_wdata(d_rom_wdata),
    .llr_we(d_llr_we), .llr_addr(d_llr_addr), .llr_data(d_llr_data),
    .hd_addr(d_hd_addr), .hd_data(d_hd_data),
    .start(d_start), .busy(d_busy), .done(d_done), .pd_err(d_pd_err)
  );

  lsc_et #(.NPAR(E_NPAR)) u_et (
    .clk(clk), .rst_n(rst_n),
    .hd_upd(e_hd_upd), .app_sign(e_app_sign), .hd_old(e_hd_old), .hd_new(e_hd_new),
    .frame_start(e_frame_start), .layer_start(e_layer_start), .edge_v(e_edge_v),
    .hd_in(e_hd_in), .layer_end(e_layer_end), .iter_end(e_iter_end),
    .stop(e_stop), .unsat(e_unsat)
  );

endmodule
