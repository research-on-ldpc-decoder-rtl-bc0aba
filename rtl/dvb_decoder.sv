// DVB-T2 normal-frame LDPC decoder: 40-parallel, pure layered normalized
// min-sum decoding with conflict resolution by layer division.
//
// Matrix view. With EPS = 9 the 360-periodic DVB-T2 matrix is rearranged
// into 40 x 40 blocks so that nine successive layers form a group sharing
// one PCM-ROM description (see dvb_igu). A check node c = j + 9q s
// (0 <= j < 9q, 0 <= s < 40, q = (N-K)/360) is row s of layer
// J = (j mod q) x 9 + (j div q). Information bit b x 360 + k + 9t is lane t
// of APP block 9b + k; parity bit c is lane s of APP block kb + J. In a
// block with shift S, row s is connected to lane (s - S) mod 40. The
// staircase edge from parity bit -1 does not exist: the controller removes
// it (first layer, PE 0, last parity block).
//
// Datapath. APP-MEM (1620 x 40 x 8 bit) -> PN0 (rotation by 40 - S) -> 40 PEs
// -> PN1 (rotation by S) -> APP-MEM, with Sign-MEM holding the extrinsic
// signs and each PE a Word-MEM with its rows' compressed words.
//
// Controller (this module, CTRL). For every group it loads the w entries of
// the group from the PCM-ROM into the IGU (w clocks) and lets the pattern
// decoder look for a conflict block (two consecutive entries with the same
// block address). Each layer then takes: one clock to open the rows (clr),
// w read clocks, one clock to finish the check-node update, w write clocks.
// A conflict layer is decoded as two sub-layers, one after the other: the
// rows of the first set of the division pattern first, then the rest, each
// reading the messages the other left; lanes and signs of rows not in the
// sub-layer are not written. Clocks per iteration:
//     q x (w + 9 x (2w + 2)) + (2w + 2) x (number of conflict layers).
// The design overlaps the read and write phases of successive layers and
// the two sub-layers of a conflict layer (bypass unit, APP selector), which
// this controller does not do: it needs about twice the clocks.
//
// Interface. Load the PCM-ROM (rom_we) and the channel LLRs (llr_we, one
// block per clock, 8-bit, positive = bit 0) while idle; pulse start with the
// code held on kb (information blocks = K/40), q, w (blocks per layer),
// rom_base and niter; done pulses after niter iterations; then hd_data
// gives the hard decisions of block hd_addr (1 = bit one). pd_err reports a
// group with a conflict the division cannot resolve or with two conflict
// blocks.
module dvb_decoder
  import dvb_pkg::*;
#(
  parameter int unsigned NB        = 1620,   // APP blocks (64800 / 40)
  parameter int unsigned NLAYER    = 810,    // most layers (rate 1/2: 9 x 90)
  parameter int unsigned SGN_DEPTH = 7128,   // most edges / 40 (rate 3/5)
  parameter int unsigned ROM_DEPTH = 3960    // PCM-ROM entries, six rates
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // code configuration
  input  logic [AW-1:0]                kb,
  input  logic [6:0]                   q,
  input  logic [IW-1:0]                w,
  input  logic [$clog2(ROM_DEPTH)-1:0] rom_base,
  input  logic [5:0]                   niter,
  // PCM-ROM load
  input  logic                         rom_we,
  input  logic [$clog2(ROM_DEPTH)-1:0] rom_addr,
  input  pcm_entry_t                   rom_wdata,
  // channel LLR load
  input  logic                         llr_we,
  input  logic [$clog2(NB)-1:0]        llr_addr,
  input  logic [QA-1:0]                llr_data [P],
  // hard-decision read
  input  logic [$clog2(NB)-1:0]        hd_addr,
  output logic [P-1:0]                 hd_data,
  // control
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  output logic                         pd_err
);

  localparam int unsigned NBW = $clog2(NB);
  localparam int unsigned LYW = $clog2(NLAYER);
  localparam int unsigned SGW = $clog2(SGN_DEPTH);
  localparam int unsigned RMW = $clog2(ROM_DEPTH);
  localparam int unsigned PW  = $clog2(P);

  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_PRE, C_RD, C_FIN, C_WR} ctrl_e;

  ctrl_e         cs;
  logic [5:0]    iter;
  logic [6:0]    g;
  logic [3:0]    r;
  logic [IW-1:0] idx;
  logic          pass;
  logic          conflict;
  logic [SW-1:0] cs1, cs2;
  pcm_entry_t    prev_e;

  assign busy = (cs != C_IDLE);

  // layer index inside the iteration and its Sign-MEM base
  logic [LYW-1:0] layer;
  logic [SGW-1:0] sgn_addr;
  assign layer    = LYW'(g * EPS + r);
  assign sgn_addr = SGW'(32'(layer) * 32'(w) + 32'(idx));

  // ---------------- PCM-ROM and IGU ----------------
  pcm_entry_t rom_rd, entry;
  logic [RMW-1:0] rom_a;
  assign rom_a = busy ? RMW'(32'(rom_base) + 32'(g) * 32'(w) + 32'(idx)) : rom_addr;
  dvb_pcm_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk(clk), .we(rom_we && !busy), .addr(rom_a), .wdata(rom_wdata), .rdata(rom_rd)
  );

  logic igu_adv;
  assign igu_adv = (cs == C_WR) && (!conflict || pass);
  dvb_igu u_igu (
    .clk(clk), .load(cs == C_LOAD), .load_idx(idx), .load_entry(rom_rd),
    .rd_idx(idx), .adv(igu_adv), .entry(entry)
  );

  // ---------------- pattern decoder ----------------
  logic [P-1:0] pattern;
  logic         pd_ok;
  dvb_pd u_pd (.s1(cs1), .s2(cs2), .pattern(pattern), .ok(pd_ok));

  logic [P-1:0] active;
  always_comb begin
    for (int i = 0; i < P; i++) active[i] = !conflict || (pattern[i] == pass);
  end

  // the staircase corner that does not exist
  logic cut_edge;
  assign cut_edge = (g == '0) && (r == '0) &&
                    (32'(entry.a) == 32'(kb) + EPS * 32'(q) - 1);

  // ---------------- APP-MEM, PN0, PN1 ----------------
  logic [QA-1:0] app_rd [P];
  logic [QA-1:0] pn0_out [P];
  logic [QA-1:0] pe_out [P];
  logic [QA-1:0] pn1_out [P];
  logic [P-1:0]  pe_ok, pe_sgn;
  logic [0:0]    ok_lane [P];
  logic [0:0]    ok_rot  [P];
  logic [P-1:0]  wmask;
  logic [PW-1:0] sh0, sh1;

  assign sh0 = (entry.s == '0) ? '0 : PW'(P - 32'(entry.s));
  assign sh1 = PW'(entry.s);

  logic [QA-1:0] wr_data [P];
  logic          app_we;
  logic [NBW-1:0] app_waddr, app_raddr;
  always_comb begin
    for (int i = 0; i < P; i++) ok_lane[i] = pe_ok[i];
    for (int i = 0; i < P; i++) wmask[i] = ok_rot[i][0];
    if (busy) begin
      app_we    = (cs == C_WR);
      app_waddr = NBW'(entry.a);
      wr_data   = pn1_out;
    end else begin
      app_we    = llr_we;
      app_waddr = llr_addr;
      wr_data   = llr_data;
      wmask     = '1;
    end
    app_raddr = busy ? NBW'(entry.a) : hd_addr;
  end

  dvb_app_mem #(.NB(NB)) u_app (
    .clk(clk), .raddr(app_raddr), .rdata(app_rd),
    .we(app_we), .waddr(app_waddr), .wdata(wr_data), .wmask(wmask)
  );
  always_comb begin
    for (int i = 0; i < P; i++) hd_data[i] = app_rd[i][QA-1];
  end

  barrel_shifter #(.N(P), .W(QA)) u_pn0 (.din(app_rd), .sh(sh0), .dout(pn0_out));
  barrel_shifter #(.N(P), .W(QA)) u_pn1 (.din(pe_out), .sh(sh1), .dout(pn1_out));
  barrel_shifter #(.N(P), .W(1))  u_pn1m (.din(ok_lane), .sh(sh1), .dout(ok_rot));

  // ---------------- Sign-MEM ----------------
  logic [P-1:0] sgn_rd;
  dvb_sign_mem #(.DEPTH(SGN_DEPTH)) u_sgn (
    .clk(clk), .raddr(sgn_addr), .rdata(sgn_rd),
    .we(cs == C_WR), .waddr(sgn_addr), .wdata(pe_sgn), .wmask(pe_ok)
  );

  // ---------------- processor elements ----------------
  for (genvar i = 0; i < P; i++) begin : g_pe
    dvb_pe #(.NLAYER(NLAYER)) u_pe (
      .clk     (clk),
      .clr     (cs == C_PRE),
      .wm_addr (layer),
      .first_it(iter == '0),
      .active  (active[i]),
      .in_v    (cs == C_RD),
      .in_idx  (idx),
      .in_cut  (cut_edge && (i == 0)),
      .app_in  (pn0_out[i]),
      .sgn_old (sgn_rd[i]),
      .fin     (cs == C_FIN),
      .out_idx (idx),
      .app_out (pe_out[i]),
      .sgn_out (pe_sgn[i]),
      .out_ok  (pe_ok[i])
    );
  end

  // ---------------- controller ----------------
  logic last_idx;
  assign last_idx = (idx == w - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs       <= C_IDLE;
      iter     <= '0;
      g        <= '0;
      r        <= '0;
      idx      <= '0;
      pass     <= 1'b0;
      conflict <= 1'b0;
      cs1      <= '0;
      cs2      <= '0;
      prev_e   <= '0;
      done     <= 1'b0;
      pd_err   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (cs)
        C_IDLE: begin
          if (start) begin
            cs       <= C_LOAD;
            iter     <= '0;
            g        <= '0;
            r        <= '0;
            idx      <= '0;
            pass     <= 1'b0;
            conflict <= 1'b0;
            pd_err   <= 1'b0;
          end
        end
        C_LOAD: begin
          prev_e <= rom_rd;
          if (idx != '0 && rom_rd.a == prev_e.a) begin
            if (conflict) pd_err <= 1'b1;
            conflict <= 1'b1;
            cs1      <= prev_e.s;
            cs2      <= rom_rd.s;
          end
          if (last_idx) begin
            idx <= '0;
            cs  <= C_PRE;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        C_PRE: begin
          if (conflict && !pd_ok) pd_err <= 1'b1;
          idx <= '0;
          cs  <= C_RD;
        end
        C_RD: begin
          if (last_idx) cs <= C_FIN;
          else idx <= idx + 1'b1;
        end
        C_FIN: begin
          idx <= '0;
          cs  <= C_WR;
        end
        default: begin  // C_WR
          if (!last_idx) begin
            idx <= idx + 1'b1;
          end else begin
            idx <= '0;
            if (conflict && !pass) begin
              pass <= 1'b1;
              cs   <= C_PRE;
            end else begin
              pass <= 1'b0;
              if (r != 4'(EPS - 1)) begin
                r  <= r + 1'b1;
                cs <= C_PRE;
              end else begin
                r        <= '0;
                conflict <= 1'b0;
                if (g == q - 1'b1) begin
                  g <= '0;
                  if (iter == niter - 1'b1) begin
                    cs   <= C_IDLE;
                    done <= 1'b1;
                  end else begin
                    iter <= iter + 1'b1;
                    cs   <= C_LOAD;
                  end
                end else begin
                  g  <= g + 1'b1;
                  cs <= C_LOAD;
                end
              end
            end
          end
        end
      endcase
    end
  end

endmodule
