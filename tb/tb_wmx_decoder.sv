// Self-checking testbench of wmx_decoder.
//
// Builds a small quasi-cyclic code with a dual-diagonal parity part (so a
// codeword is easy to encode), sends noisy frames, and compares the decoder
// against a reference model written here from the algorithm: layered offset
// min-sum, lambda = SAT(L - Lambda_old), Lambda = sign product x max(min-1,0)
// limited to 15, L = lambda + Lambda with the early-detect saturation rule,
// and the ADQ trigger (window of NWIN layers, halve everything two layers
// after the layer that fired). Checked per frame: all hard decisions, the
// parity flag, the ADQ flag, and the clock count 3*nl*niter + nl + 5.
// Also counts how often saturation, ADQ and parity failure happened.
module tb_wmx_decoder;
  import wmx_pkg::*;

  localparam int NPU  = 8;
  localparam int MAXL = 4;
  localparam int NWIN = 4;
  localparam int NC   = NLINE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [$clog2(NPU+1)-1:0]  z;
  logic [$clog2(MAXL+1)-1:0] nlayers;
  logic [5:0]  niter;
  logic [8:0]  ps_th;
  logic        adq_en;
  logic        bm_we, bm_nz;
  logic [$clog2(MAXL)-1:0] bm_layer;
  logic [$clog2(NC)-1:0]   bm_col;
  logic [$clog2(NPU)-1:0]  bm_shift;
  logic [QW-1:0] llr [NC][NPU];
  logic start, busy, done, ok, adq_changed;
  logic [NPU-1:0] hd [NC];

  wmx_decoder #(.NPU(NPU), .MAXL(MAXL), .NWIN(NWIN)) dut (.*);

  int checks = 0, failures = 0;
  int n_sat = 0, n_adq = 0, n_fail = 0, n_ok = 0;

  // code description
  bit bv [MAXL][NC];
  int bs [MAXL][NC];

  // ---------------- reference model ----------------
  function automatic int sat6(int x);
    if (x > 31) return 31;
    if (x < -32) return -32;
    return x;
  endfunction
  function automatic int cmag(int m);
    int t = (m > 0) ? m - 1 : 0;
    return (t > 15) ? 15 : t;
  endfunction
  function automatic int asr1(int x);  // arithmetic shift right of a 6-bit value
    return (x >= 0) ? x / 2 : -((-x + 1) / 2);
  endfunction
  // post-VNU addition with the early-detect saturation rule
  function automatic int post_add(int lam, int s, int m, ref int sat_cnt);
    int lb = lam & 63;
    int carry, sum, r;
    if (s == 0) carry = (((lb & 15) + m) >= 16);
    else        carry = (((lb & 15) + ((~m) & 15) + 1) >= 16);
    sum = lam + (s ? -m : m);
    if (((lb >> 5) & 1) == 0 && ((lb >> 4) & 1) == 1 && s == 0 && carry == 1) begin
      sat_cnt++;
      r = 'b011100 | (sum & 3);
      return r;
    end
    if (((lb >> 5) & 1) == 1 && ((lb >> 4) & 1) == 0 && s == 1 && carry == 0) begin
      sat_cnt++;
      r = 'b100000 | (sum & 3);
      return r - 64;
    end
    return sum;
  endfunction

  int mL  [NC][NPU];
  int cs  [MAXL][NPU][NC];   // stored CN message sign
  int cm  [MAXL][NPU][NC];   // stored CN message magnitude
  bit m_hd [NC][NPU];
  bit m_ok, m_chg;

  task automatic ref_decode(int zz, int nl, int ni, int th, bit aen);
    int lam [NPU][NC];
    int win [NWIN];
    int nseen = 0;
    int qdue = -1;
    int round = 0;
    bit changed = 0;
    for (int c = 0; c < NC; c++) for (int j = 0; j < zz; j++) mL[c][j] = $signed(llr[c][j]);
    for (int i = 0; i < NWIN; i++) win[i] = 0;
    for (int it = 0; it < ni; it++) begin
      for (int l = 0; l < nl; l++) begin
        bit q = (round == qdue);
        int pop = 0;
        for (int r = 0; r < zz; r++) begin
          int prod = 0;
          for (int c = 0; c < NC; c++) if (bv[l][c]) begin
            int j = (r + bs[l][c]) % zz;
            int old = (it == 0) ? 0 : (cs[l][r][c] ? -cm[l][r][c] : cm[l][r][c]);
            lam[r][c] = sat6(mL[c][j] - old);
            if (q) lam[r][c] = asr1(lam[r][c]);
            prod ^= (lam[r][c] < 0);
          end
          if (prod) pop++;
          for (int c = 0; c < NC; c++) if (bv[l][c]) begin
            int mn = 63, sg = prod ^ (lam[r][c] < 0);
            for (int k = 0; k < NC; k++)
              if (bv[l][k] && k != c) begin
                int a = (lam[r][k] < 0) ? -lam[r][k] : lam[r][k];
                if (a < mn) mn = a;
              end
            cs[l][r][c] = sg;
            cm[l][r][c] = cmag(mn);
          end
        end
        // VNs outside the layer are halved too on the change round
        if (q)
          for (int c = 0; c < NC; c++) if (!bv[l][c])
            for (int j = 0; j < zz; j++) mL[c][j] = asr1(mL[c][j]);
        if (q)
          for (int l2 = 0; l2 < nl; l2++) if (l2 != l)
            for (int r = 0; r < zz; r++) for (int c = 0; c < NC; c++) cm[l2][r][c] = cm[l2][r][c] >> 1;
        for (int r = 0; r < zz; r++)
          for (int c = 0; c < NC; c++) if (bv[l][c]) begin
            int j = (r + bs[l][c]) % zz;
            mL[c][j] = post_add(lam[r][c], cs[l][r][c], cm[l][r][c], n_sat);
          end
        // ADQ window
        begin
          int sum = pop;
          for (int i = 0; i < NWIN - 1; i++) sum += win[i];
          if (aen && !changed && sum < th && nseen >= NWIN) begin
            changed = 1;
            qdue = round + 2;
          end
          for (int i = NWIN - 1; i > 0; i--) win[i] = win[i-1];
          win[0] = pop;
          nseen++;
        end
        round++;
      end
    end
    for (int c = 0; c < NC; c++) for (int j = 0; j < zz; j++) m_hd[c][j] = (mL[c][j] < 0);
    m_ok = 1;
    for (int l = 0; l < nl; l++)
      for (int r = 0; r < zz; r++) begin
        bit p = 0;
        for (int c = 0; c < NC; c++) if (bv[l][c]) p ^= m_hd[c][(r + bs[l][c]) % zz];
        if (p) m_ok = 0;
      end
    m_chg = changed;
  endtask

  // ---------------- stimulus ----------------
  task automatic make_code(int zz, int nl);
    for (int l = 0; l < MAXL; l++) for (int c = 0; c < NC; c++) begin bv[l][c] = 0; bs[l][c] = 0; end
    for (int l = 0; l < nl; l++) begin
      for (int c = 0; c < NC - nl; c++) begin
        bv[l][c] = ($urandom_range(0, 99) < 60);
        bs[l][c] = $urandom_range(0, zz - 1);
      end
      bv[l][NC - nl + l] = 1;
      if (l > 0) bv[l][NC - nl + l - 1] = 1;
    end
    for (int l = 0; l < nl; l++) for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      bm_we = 1; bm_layer = l; bm_col = c; bm_nz = bv[l][c]; bm_shift = bs[l][c];
    end
    @(negedge clk) bm_we = 0;
  endtask

  bit cw [NC][NPU];
  task automatic make_frame(int zz, int nl, int amp, int nflip);
    bit s [NPU];
    for (int c = 0; c < NC - nl; c++) for (int j = 0; j < zz; j++) cw[c][j] = $urandom_range(0, 1);
    for (int l = 0; l < nl; l++) begin
      for (int r = 0; r < zz; r++) begin
        s[r] = 0;
        for (int c = 0; c < NC - nl; c++) if (bv[l][c]) s[r] ^= cw[c][(r + bs[l][c]) % zz];
        cw[NC - nl + l][r] = s[r] ^ ((l > 0) ? cw[NC - nl + l - 1][r] : 1'b0);
      end
    end
    for (int c = 0; c < NC; c++) for (int j = 0; j < NPU; j++) begin
      int v = (j < zz) ? $urandom_range(1, amp) : 0;
      if (j < zz && $urandom_range(0, 999) < nflip) v = -$urandom_range(0, 4);
      if (j < zz && cw[c][j]) v = -v;
      llr[c][j] = QW'(sat6(v));
    end
  endtask

  task automatic run_frame(int zz, int nl, int ni, int th, bit aen, int amp, int nflip);
    int t0, cyc;
    bit bad;
    z = zz; nlayers = nl; niter = ni; ps_th = th; adq_en = aen;
    make_frame(zz, nl, amp, nflip);
    ref_decode(zz, nl, ni, th, aen);
    @(negedge clk) start = 1;
    t0 = 0;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    bad = 0;
    for (int c = 0; c < NC; c++) for (int j = 0; j < zz; j++) if (hd[c][j] != m_hd[c][j]) bad = 1;
    checks++; if (bad) begin failures++; $display("hard decisions differ (z=%0d nl=%0d)", zz, nl); end
    checks++; if (ok != m_ok) begin failures++; $display("ok %0b expected %0b", ok, m_ok); end
    checks++; if (adq_changed != m_chg) begin failures++; $display("adq %0b expected %0b", adq_changed, m_chg); end
    checks++; if (cyc != 3 * nl * ni + nl + 5) begin failures++; $display("cycles %0d expected %0d", cyc, 3*nl*ni+nl+5); end
    if (m_ok) n_ok++; else n_fail++;
    if (m_chg) n_adq++;
  endtask

  initial begin
    start = 0; bm_we = 0; bm_nz = 0; bm_layer = 0; bm_col = 0; bm_shift = 0;
    z = NPU; nlayers = MAXL; niter = 1; ps_th = 0; adq_en = 0;
    for (int c = 0; c < NC; c++) for (int j = 0; j < NPU; j++) llr[c][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_code(NPU, MAXL);
    for (int f = 0; f < 6; f++) run_frame(NPU, MAXL, 5, 0, 0, 12, 15);      // fixed quantization
    for (int f = 0; f < 6; f++) run_frame(NPU, MAXL, 6, 400, 1, 31, 20);    // ADQ fires
    for (int f = 0; f < 4; f++) run_frame(NPU, MAXL, 4, 0, 0, 3, 450);      // heavy noise
    make_code(6, 3);
    for (int f = 0; f < 6; f++) run_frame(6, 3, 5, 300, 1, 20, 20);         // z < NPU
    checks++; if (n_sat == 0)  begin failures++; $display("no saturation exercised"); end
    checks++; if (n_adq == 0)  begin failures++; $display("no ADQ change exercised"); end
    checks++; if (n_fail == 0) begin failures++; $display("no parity failure exercised"); end
    checks++; if (n_ok == 0)   begin failures++; $display("no successful frame"); end
    $display("saturations=%0d adq_frames=%0d ok_frames=%0d failed_frames=%0d", n_sat, n_adq, n_ok, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
