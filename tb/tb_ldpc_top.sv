// End-to-end testbench of ldpc_top at its default sizes (96-PU WiMAX
// decoder, 1620-block DVB-T2 decoder, 40-row LSC-ET checker), all three
// running side by side on one clock.
//
// WiMAX: a rate-1/2, N = 2304 code with z = 96, 12 layers and 24 block
// columns (random information part, dual-diagonal parity part), frames
// encoded here. Checked: ADQ frames raise adq_changed; whenever ok = 1 the
// hard decisions equal the codeword; at least one frame decodes; a heavily
// corrupted frame gives ok = 0; clock count 3 x 12 x niter + 17 on every
// frame. (With 6-bit APPs a single frame may fail to decode: saturated
// APPs in layered decoding, the effect the quantization change works on.)
// DVB-T2: a small code in DVB-T2 form (q = 3, N = 2520) with one planted
// conflict per group; noisy frames must decode to the codeword. A second
// table whose first group holds a conflict at distance 8 must raise pd_err.
// LSC-ET: fed with the parity checks of the DVB-T2 code layer by layer: an
// iteration on a noisy word and then one on the codeword must stop; a
// codeword followed by a noisy word must not; plus the hard-decision mux.
// Mechanisms counted: WiMAX decoded / failed / ADQ frames, early-detect
// saturations in PU 0, DVB conflict sub-layers, removed staircase edges,
// pd_err, LSC-ET stops.
module tb_ldpc_top;
  import wmx_pkg::*;
  import dvb_pkg::*;

  localparam int WZ  = 96;
  localparam int WNL = 12;
  localparam int NC  = NLINE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [6:0]  w_z;
  logic [3:0]  w_nlayers;
  logic [5:0]  w_niter;
  logic [8:0]  w_ps_th;
  logic        w_adq_en, w_bm_we, w_bm_nz, w_start, w_busy, w_done, w_ok, w_adq_changed;
  logic [3:0]  w_bm_layer;
  logic [4:0]  w_bm_col;
  logic [6:0]  w_bm_shift;
  logic [QW-1:0] w_llr [NC][WZ];
  logic [WZ-1:0] w_hd [NC];

  logic [AW-1:0]  d_kb;
  logic [6:0]     d_q;
  logic [IW-1:0]  d_w;
  logic [11:0]    d_rom_base, d_rom_addr;
  logic [5:0]     d_niter;
  logic           d_rom_we, d_llr_we, d_start, d_busy, d_done, d_pd_err;
  pcm_entry_t     d_rom_wdata;
  logic [10:0]    d_llr_addr, d_hd_addr;
  logic [QA-1:0]  d_llr_data [P];
  logic [P-1:0]   d_hd_data;

  logic           e_hd_upd, e_frame_start, e_layer_start, e_edge_v, e_layer_end, e_iter_end;
  logic           e_stop, e_unsat;
  logic [39:0]    e_app_sign, e_hd_old, e_hd_new, e_hd_in;

  ldpc_top dut (.*);

  int checks = 0, failures = 0;
  int n_w_ok = 0, n_w_fail = 0, n_w_adq = 0, n_sat = 0;
  int n_conf_layers = 0, n_cut = 0, n_d_ok = 0, n_pderr = 0, n_stop = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ================= WiMAX =================
  bit bv [WNL][NC];
  int bs [WNL][NC];
  bit wcw [NC][WZ];

  task automatic w_make_code();
    for (int l = 0; l < WNL; l++) for (int c = 0; c < NC; c++) begin
      bv[l][c] = (c >= NC - WNL) && (c == NC - WNL + l || c == NC - WNL + l - 1);
      bs[l][c] = (c < NC - WNL) ? $urandom_range(0, WZ - 1) : 0;
    end
    // every information column in four different layers
    for (int c = 0; c < NC - WNL; c++)
      for (int k = 0; k < 4; k++) begin
        int l = (c + 3 * k) % WNL;
        bv[l][c] = 1;
      end
    for (int l = 0; l < WNL; l++) for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      w_bm_we = 1; w_bm_layer = 4'(l); w_bm_col = 5'(c); w_bm_nz = bv[l][c]; w_bm_shift = 7'(bs[l][c]);
    end
    @(negedge clk) w_bm_we = 0;
  endtask

  task automatic w_frame(int ni, bit aen, int th, int amp, int nflip, int expect_ok);
    int cyc, bad;
    bit sacc;
    for (int c = 0; c < NC - WNL; c++) for (int j = 0; j < WZ; j++) wcw[c][j] = $urandom_range(0, 1);
    for (int l = 0; l < WNL; l++)
      for (int r = 0; r < WZ; r++) begin
        sacc = 0;
        for (int c = 0; c < NC - WNL; c++) if (bv[l][c]) sacc ^= wcw[c][(r + bs[l][c]) % WZ];
        wcw[NC - WNL + l][r] = sacc ^ ((l > 0) ? wcw[NC - WNL + l - 1][r] : 1'b0);
      end
    for (int c = 0; c < NC; c++) for (int j = 0; j < WZ; j++) begin
      int v = $urandom_range(2, amp);
      if ($urandom_range(0, 999) < nflip) v = -$urandom_range(0, 5);
      if (v > 31) v = 31;
      w_llr[c][j] = QW'(wcw[c][j] ? -v : v);
    end
    w_niter = 6'(ni); w_adq_en = aen; w_ps_th = 9'(th); w_z = 7'(WZ); w_nlayers = 4'(WNL);
    @(negedge clk) w_start = 1;
    @(negedge clk) w_start = 0;
    cyc = 1;
    while (!w_done) begin @(negedge clk); cyc++; end
    bad = 0;
    for (int c = 0; c < NC; c++) for (int j = 0; j < WZ; j++) if (w_hd[c][j] != wcw[c][j]) bad++;
    check(cyc == 3 * WNL * ni + WNL + 5, "WiMAX clock count");
    if (expect_ok == 1) begin
      check(w_ok && bad == 0, $sformatf("WiMAX frame not decoded (%0d bits wrong, ok=%0b)", bad, w_ok));
    end else if (expect_ok == 0) begin
      check(!w_ok && bad != 0, "WiMAX heavy-noise frame reported as decoded");
    end
    if (aen) check(w_adq_changed, "ADQ did not fire");
    if (w_ok) check(bad == 0, "WiMAX ok = 1 but hard decisions differ from the codeword");
    if (w_ok) n_w_ok++; else n_w_fail++;
    if (w_adq_changed) n_w_adq++;
  endtask

  for (genvar c = 0; c < NC; c++) begin : g_satmon
    always @(posedge clk)
      if (dut.u_wmx.g_pu[0].u_pu.g_line[c].u_line.edp || dut.u_wmx.g_pu[0].u_pu.g_line[c].u_line.edn)
        n_sat++;
  end

  // ================= DVB-T2 =================
  localparam int Q      = 3;
  localparam int KG     = 4;
  localparam int KB     = KG * EPS;
  localparam int NK     = 360 * Q;
  localparam int KBITS  = 360 * KG;
  localparam int NBITS  = KBITS + NK;
  localparam int NBLK   = KB + EPS * Q;
  localparam int WINFO  = 6;
  localparam int W      = WINFO + 2;
  localparam int RBASE  = 5;
  localparam int RBAD   = 100;

  int rows [KG][$];            // address table, one row per information group
  int chk [NK][$];             // variables of every check
  int confd [Q];               // planted conflict distance per group (0: none)
  int delta [Q];

  function automatic int blk_of(int v);     // APP block of variable v
    if (v < KBITS) return (v / 360) * EPS + (v % 360) % EPS;
    begin
      int c = v - KBITS, j = c % (EPS * Q);
      return KB + (j % Q) * EPS + j / Q;
    end
  endfunction
  function automatic int lane_of(int v);
    if (v < KBITS) return (v % 360) / EPS;
    return (v - KBITS) / (EPS * Q);
  endfunction

  function automatic bit row_has(int b, int x);
    foreach (rows[b][i]) if (rows[b][i] == x) return 1;
    return 0;
  endfunction

  // any two entries of one row in the same group with m equal mod 9 conflict
  function automatic bit accidental(int b, int x);
    foreach (rows[b][i])
      if (rows[b][i] % Q == x % Q && (rows[b][i] / Q) % EPS == (x / Q) % EPS) return 1;
    return 0;
  endfunction

  task automatic build_code();
    int gcnt [Q];
    int sizes [KG] = '{6, 6, 3, 3};
    int dst  [Q]  = '{3, 6, 4};
    for (int g = 0; g < Q; g++) gcnt[g] = 0;
    // plant one conflict pair per group in rows 0 and 1
    for (int g = 0; g < Q; g++) begin
      int b = (g == 2) ? 1 : 0;
      int m = $urandom_range(0, 359 - 9 * dst[g]);
      rows[b].push_back(g + Q * m);
      rows[b].push_back(g + Q * (m + 9 * dst[g]));
      gcnt[g] += 2;
      confd[g] = dst[g];
    end
    for (int b = 0; b < KG; b++)
      while (rows[b].size() < sizes[b]) begin
        int g = $urandom_range(0, Q - 1);
        int x = g + Q * $urandom_range(0, 359);
        if (gcnt[g] < WINFO && !row_has(b, x) && !accidental(b, x)) begin
          rows[b].push_back(x);
          gcnt[g]++;
        end
      end
    for (int g = 0; g < Q; g++) begin
      int d = confd[g], p = P;
      delta[g] = 0;
      while (d % 2 == 0 && p % 2 == 0) begin d /= 2; p /= 2; delta[g]++; end
    end
    for (int c = 0; c < NK; c++) chk[c].delete();
    for (int n = 0; n < KBITS; n++)
      foreach (rows[n / 360][i]) chk[(rows[n / 360][i] + (n % 360) * Q) % NK].push_back(n);
    for (int c = 0; c < NK; c++) begin
      if (c > 0) chk[c].push_back(KBITS + c - 1);
      chk[c].push_back(KBITS + c);
    end
  endtask

  // first-layer PCM entries of group g, sorted by block address
  task automatic load_rom(int base, bit bad);
    for (int g = 0; g < Q; g++) begin
      int ea [$], es [$];
      for (int b = 0; b < KG; b++)
        foreach (rows[b][i]) if (rows[b][i] % Q == g) begin
          int m = rows[b][i] / Q;
          int k0 = (EPS - m % EPS) % EPS;
          ea.push_back(EPS * b + k0);
          es.push_back(((m + k0) / EPS) % P);
        end
      // sort (insertion) by address
      for (int i = 1; i < ea.size(); i++)
        for (int j = i; j > 0 && ea[j] < ea[j-1]; j--) begin
          int t = ea[j]; ea[j] = ea[j-1]; ea[j-1] = t;
          t = es[j]; es[j] = es[j-1]; es[j-1] = t;
        end
      if (bad && g == 0) begin ea[0] = 0; es[0] = 0; ea[1] = 0; es[1] = 8; end
      ea.push_back(KB + EPS * g); es.push_back(0);
      if (g == 0) begin ea.push_back(KB + EPS * (Q - 1) + EPS - 1); es.push_back(1); end
      else        begin ea.push_back(KB + EPS * (g - 1));           es.push_back(0); end
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        d_rom_we = 1; d_rom_addr = 12'(base + g * W + i);
        d_rom_wdata.a = AW'(ea[i]); d_rom_wdata.s = SW'(es[i]);
      end
    end
    @(negedge clk) d_rom_we = 0;
  endtask

  // ---------------- frames ----------------
  bit cw [NBITS];
  int llr [NBITS];
  int L [NBITS];
  int blk [NBLK][P];
  int ext [NK][$];

  task automatic make_frame(int amp, int nflip);
    bit acc [NK];
    for (int c = 0; c < NK; c++) acc[c] = 0;
    for (int n = 0; n < KBITS; n++) cw[n] = $urandom_range(0, 1);
    for (int c = 0; c < NK; c++) foreach (chk[c][i]) if (chk[c][i] < KBITS) acc[c] ^= cw[chk[c][i]];
    for (int c = 0; c < NK; c++) begin
      cw[KBITS + c] = acc[c] ^ ((c > 0) ? cw[KBITS + c - 1] : 1'b0);
    end
    for (int v = 0; v < NBITS; v++) begin
      int x = $urandom_range(2, amp);
      if ($urandom_range(0, 999) < nflip) x = -$urandom_range(0, 6);
      llr[v] = cw[v] ? -x : x;
    end
  endtask


  task automatic d_frame(int ni, int amp, int nflip);
    int wrong;
    make_frame(amp, nflip);
    for (int bk = 0; bk < NBLK; bk++) for (int t = 0; t < P; t++) blk[bk][t] = 0;
    for (int v = 0; v < NBITS; v++) blk[blk_of(v)][lane_of(v)] = llr[v];
    for (int bk = 0; bk < NBLK; bk++) begin
      @(negedge clk);
      d_llr_we = 1; d_llr_addr = 11'(bk);
      for (int t = 0; t < P; t++) d_llr_data[t] = QA'(blk[bk][t]);
    end
    @(negedge clk) d_llr_we = 0;
    d_niter = 6'(ni);
    @(negedge clk) d_start = 1;
    @(negedge clk) d_start = 0;
    while (!d_done) @(negedge clk);
    wrong = 0;
    for (int v = 0; v < NBITS; v++) begin
      d_hd_addr = 11'(blk_of(v));
      #1;
      if (d_hd_data[lane_of(v)] != cw[v]) wrong++;
    end
    if (d_rom_base == RBASE) begin
      check(wrong == 0, "DVB-T2 frame not decoded");
      check(!d_pd_err, "DVB-T2 pd_err on a dividable table");
      if (wrong == 0) n_d_ok++;
    end else begin
      check(d_pd_err, "DVB-T2 pd_err missing for distance 8");
    end
    if (d_pd_err) n_pderr++;
  endtask

  always @(posedge clk) begin
    if (dut.u_dvb.g_pe[0].u_pe.clr && dut.u_dvb.conflict) n_conf_layers++;
    if (dut.u_dvb.g_pe[0].u_pe.in_v && dut.u_dvb.g_pe[0].u_pe.in_cut) n_cut++;
    if (e_stop) n_stop++;
  end

  // ================= LSC-ET =================
  // one iteration of parity checks over the DVB-T2 code, with hard
  // decisions hdw (layer order of the decoder)
  bit hdw [NBITS];
  task automatic et_iteration();
    for (int g = 0; g < Q; g++)
      for (int r = 0; r < EPS; r++) begin
        int j = r * Q + g;
        @(negedge clk);
        e_layer_start = 1;
        @(negedge clk);
        e_layer_start = 0;
        for (int e = 0; e < 12; e++) begin
          e_edge_v = 1;
          for (int s = 0; s < P; s++) begin
            int c = j + EPS * Q * s;
            e_hd_in[s] = (e < chk[c].size()) ? hdw[chk[c][e]] : 1'b0;
          end
          @(negedge clk);
        end
        e_edge_v = 0;
        e_layer_end = 1;
        e_iter_end = (g == Q - 1) && (r == EPS - 1);
        @(negedge clk);
        e_layer_end = 0;
        e_iter_end = 0;
      end
  endtask

  task automatic et_frame(bit first_clean, bit second_clean);
    int s0 = n_stop;
    @(negedge clk) e_frame_start = 1;
    @(negedge clk) e_frame_start = 0;
    for (int v = 0; v < NBITS; v++) hdw[v] = cw[v] ^ (!first_clean && $urandom_range(0, 99) < 5);
    et_iteration();
    check(n_stop == s0, "LSC-ET stopped in the first iteration");
    for (int v = 0; v < NBITS; v++) hdw[v] = cw[v] ^ (!second_clean && $urandom_range(0, 99) < 5);
    et_iteration();
    @(negedge clk);
    if (second_clean) check(n_stop == s0 + 1, "LSC-ET did not stop on a codeword");
    else              check(n_stop == s0, "LSC-ET stopped on a noisy word");
  endtask

  initial begin
    w_start = 0; w_bm_we = 0; w_bm_nz = 0; w_bm_layer = 0; w_bm_col = 0; w_bm_shift = 0;
    w_z = 7'(WZ); w_nlayers = 4'(WNL); w_niter = 1; w_ps_th = 0; w_adq_en = 0;
    for (int c = 0; c < NC; c++) for (int j = 0; j < WZ; j++) w_llr[c][j] = '0;
    d_start = 0; d_rom_we = 0; d_llr_we = 0; d_rom_addr = 0; d_llr_addr = 0; d_hd_addr = 0;
    d_rom_wdata = '0;
    for (int t = 0; t < P; t++) d_llr_data[t] = '0;
    d_kb = AW'(KB); d_q = 7'(Q); d_w = IW'(W); d_rom_base = 12'(RBASE); d_niter = 1;
    e_hd_upd = 0; e_app_sign = '0; e_hd_old = '0; e_frame_start = 0; e_layer_start = 0;
    e_edge_v = 0; e_hd_in = '0; e_layer_end = 0; e_iter_end = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // WiMAX
    w_make_code();
    w_frame(6, 1, 500, 8, 10, 2);
    w_frame(8, 1, 500, 6, 5, 2);
    w_frame(3, 0, 0, 5, 10, 2);
    w_frame(3, 0, 0, 3, 480, 0);

    // DVB-T2
    build_code();
    load_rom(RBASE, 0);
    load_rom(RBAD, 1);
    d_frame(8, 24, 40);
    d_frame(10, 80, 60);
    d_rom_base = 12'(RBAD);
    d_frame(1, 24, 0);
    d_rom_base = 12'(RBASE);

    // LSC-ET
    et_frame(0, 1);
    et_frame(1, 0);
    et_frame(1, 1);
    for (int k = 0; k < 20; k++) begin
      e_hd_upd = $urandom_range(0, 1);
      e_app_sign = {$urandom, $urandom};
      e_hd_old = {$urandom, $urandom};
      #1;
      check(e_hd_new == (e_hd_upd ? e_app_sign : e_hd_old), "LSC-ET hard-decision mux");
    end

    check(n_w_ok > 0 && n_w_fail > 0 && n_w_adq > 0 && n_sat > 0, "WiMAX mechanisms not all exercised");
    check(n_conf_layers > 0 && n_cut > 0 && n_d_ok > 0 && n_pderr > 0, "DVB-T2 mechanisms not all exercised");
    check(n_stop > 0, "LSC-ET never stopped");
    $display("wimax: decoded=%0d failed=%0d adq=%0d saturations_pu0=%0d", n_w_ok, n_w_fail, n_w_adq, n_sat);
    $display("dvb-t2: decoded=%0d conflict_sublayers=%0d removed_edge_reads=%0d pd_err_frames=%0d",
             n_d_ok, n_conf_layers, n_cut, n_pderr);
    $display("lsc-et: stops=%0d", n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
