// Self-checking testbench of dvb_decoder on a small code built like the
// DVB-T2 codes: q = 3 (N - K = 1080), four 360-bit information groups
// (K = 1440, N = 2520), so 36 information blocks, 27 parity blocks and 27
// layers of w = 8 blocks. The address table is drawn at random and then
// three conflict blocks are planted, one per group, with shift distances 3,
// 6 and 4, so all three division patterns are used.
//
// The testbench encodes random information with the usual IRA accumulator,
// maps the codeword to APP blocks and the table to first-layer (A, S) PCM
// entries, and decodes noisy frames. The reference model works on the
// original parity-check matrix (check c = j + 9q s of layer
// (j mod q) x 9 + j div q, rows of the same layer in the order of the
// hardware's sub-layers) with layered normalized min-sum, 8-bit APP,
// min(|v2c|, 31) magnitudes and 0.75 x min rounded down. Checked per frame:
// every hard decision against the model, the model against the codeword
// (noise kept low enough to decode), the clock count, and pd_err = 0.
// Counts conflict layers and removed staircase edges processed.
module tb_dvb_decoder;
  import dvb_pkg::*;

  localparam int Q      = 3;
  localparam int KG     = 4;               // 360-bit information groups
  localparam int KB     = KG * EPS;        // information blocks
  localparam int NK     = 360 * Q;         // parity bits
  localparam int KBITS  = 360 * KG;
  localparam int NBITS  = KBITS + NK;
  localparam int NBLK   = KB + EPS * Q;
  localparam int NLY    = EPS * Q;
  localparam int WINFO  = 6;               // information entries per group
  localparam int W      = WINFO + 2;
  localparam int NBP    = 64;
  localparam int ROMD   = 32;
  localparam int SGND   = NLY * W;
  localparam int RBASE  = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0]            kb;
  logic [6:0]               q;
  logic [IW-1:0]            w;
  logic [$clog2(ROMD)-1:0]  rom_base, rom_addr;
  logic [5:0]               niter;
  logic                     rom_we, llr_we, start, busy, done, pd_err;
  pcm_entry_t               rom_wdata;
  logic [$clog2(NBP)-1:0]   llr_addr, hd_addr;
  logic [QA-1:0]            llr_data [P];
  logic [P-1:0]             hd_data;

  dvb_decoder #(.NB(NBP), .NLAYER(NLY), .SGN_DEPTH(SGND), .ROM_DEPTH(ROMD)) dut (.*);

  int checks = 0, failures = 0;
  int n_conf_layers = 0, n_cut = 0, n_frames_ok = 0;

  // ---------------- code ----------------
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
  task automatic load_rom();
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
      ea.push_back(KB + EPS * g); es.push_back(0);
      if (g == 0) begin ea.push_back(KB + EPS * (Q - 1) + EPS - 1); es.push_back(1); end
      else        begin ea.push_back(KB + EPS * (g - 1));           es.push_back(0); end
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        rom_we = 1; rom_addr = RBASE + g * W + i;
        rom_wdata.a = AW'(ea[i]); rom_wdata.s = SW'(es[i]);
      end
    end
    @(negedge clk) rom_we = 0;
  endtask

  // ---------------- frames ----------------
  bit cw [NBITS];
  int llr [NBITS];
  int L [NBITS];
  int blk [NBLK][P];
  int ext [NK][$];
  // loop bounds held in variables so that the loops stay loops
  int npass = 2, nrows = P, ngrp = Q, nlay = EPS;

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

  function automatic int sat8(int x);
    return (x > 127) ? 127 : (x < -128) ? -128 : x;
  endfunction

  task automatic ref_row(int c, bit first);
    int v2c [$];
    int m1 = 31, m2 = 31, p1 = 0, ps = 0;
    if (first) begin ext[c].delete(); foreach (chk[c][i]) ext[c].push_back(0); end
    foreach (chk[c][i]) begin
      int v = sat8(L[chk[c][i]] - ext[c][i]);
      int a = (v < 0) ? -v : v;
      if (a > 31) a = 31;
      v2c.push_back(v);
      ps ^= (v < 0);
      if (a < m1) begin m2 = m1; m1 = a; p1 = i; end
      else if (a < m2) m2 = a;
    end
    foreach (chk[c][i]) begin
      int mag = (i == p1) ? (3 * m2) / 4 : (3 * m1) / 4;
      int sg  = ps ^ (v2c[i] < 0);
      ext[c][i] = sg ? -mag : mag;
      L[chk[c][i]] = sat8(v2c[i] + ext[c][i]);
    end
  endtask

  task automatic ref_decode(int ni);
    for (int v = 0; v < NBITS; v++) L[v] = llr[v];
    for (int it = 0; it < ni; it++)
      for (int g = 0; g < ngrp; g++)
        for (int r = 0; r < nlay; r++) begin
          int j = r * Q + g;
          for (int pass = 0; pass < npass; pass++)
            for (int s = 0; s < nrows; s++) begin
              bit in_set = (confd[g] == 0) ? (pass == 0) : (((s >> delta[g]) & 1) == pass);
              if (in_set) ref_row(j + EPS * Q * s, it == 0);
            end
        end
  endtask

  task automatic run_frame(int ni, int amp, int nflip);
    int cyc, bad, wrong, exp_cyc;
    make_frame(amp, nflip);
    for (int bk = 0; bk < NBLK; bk++) for (int t = 0; t < P; t++) blk[bk][t] = 0;
    for (int v = 0; v < NBITS; v++) blk[blk_of(v)][lane_of(v)] = llr[v];
    for (int bk = 0; bk < NBLK; bk++) begin
      @(negedge clk);
      llr_we = 1; llr_addr = bk;
      for (int t = 0; t < P; t++) llr_data[t] = QA'(blk[bk][t]);
    end
    @(negedge clk) llr_we = 0;
    ref_decode(ni);
    niter = ni;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    bad = 0; wrong = 0;
    for (int v = 0; v < NBITS; v++) begin
      hd_addr = blk_of(v);
      #1;
      if (hd_data[lane_of(v)] != (L[v] < 0)) bad++;
      if ((L[v] < 0) != cw[v]) wrong++;
    end
    exp_cyc = ni * (Q * (W + EPS * (2 * W + 2)) + Q * EPS * (2 * W + 2)) + 1;
    checks++; if (bad != 0) begin failures++; $display("%0d hard decisions differ from the model", bad); end
    checks++; if (cyc != exp_cyc) begin failures++; $display("cycles %0d expected %0d", cyc, exp_cyc); end
    checks++; if (pd_err) begin failures++; $display("pd_err set"); end
    if (wrong == 0) n_frames_ok++;
    else $display("frame not decoded by the model: %0d bit errors", wrong);
  endtask

  // coverage of the special cases, sampled on the datapath
  always @(posedge clk) begin
    if (dut.g_pe[0].u_pe.clr && dut.conflict) n_conf_layers++;
    if (dut.g_pe[0].u_pe.in_v && dut.g_pe[0].u_pe.in_cut) n_cut++;
  end

  initial begin
    start = 0; rom_we = 0; llr_we = 0; rom_addr = 0; llr_addr = 0; hd_addr = 0;
    rom_wdata = '0;
    for (int t = 0; t < P; t++) llr_data[t] = '0;
    kb = KB; q = Q; w = W; rom_base = RBASE; niter = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    build_code();
    load_rom();
    run_frame(1, 30, 0);      // clean frame, one iteration
    for (int f = 0; f < 3; f++) run_frame(8, 24, 40);
    for (int f = 0; f < 2; f++) run_frame(10, 80, 60);   // saturating magnitudes
    checks++; if (n_frames_ok != 6) begin failures++; $display("only %0d of 6 frames decoded", n_frames_ok); end
    checks++; if (n_conf_layers == 0) begin failures++; $display("no conflict layer"); end
    checks++; if (n_cut == 0) begin failures++; $display("removed edge never seen"); end
    $display("conflict_sublayers=%0d removed_edge_reads=%0d decoded=%0d", n_conf_layers, n_cut, n_frames_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
