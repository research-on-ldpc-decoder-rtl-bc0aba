// WiMAX (IEEE 802.16e) QC-LDPC decoder core: 3-state, fully-parallel layered
// offset min-sum decoder with (6,1) messages and advanced dynamic
// quantization (ADQ).
//
// Structure. NPU processing units (PU r serves row r of every z x z block
// layer), each with NLINE 2-bit serial lines (line c serves block column c).
// There is no APP memory: the 6-bit APP messages stream, two bits per clock,
// out of the post-VNU of one layer, through one barrel-shifter PN per block
// column, into the pre-VNU of the next layer. A whole layer therefore takes
// one round of three clocks (S0, S1, S2), i.e. 3 x layers clocks per
// iteration. CN messages live in the register CN memory (one compressed word
// per PU and layer). A central controller (this module) holds the base matrix
// (shift value and non-zero flag per layer and block column), sequences the
// rounds, tells every line whether its VN takes part in the current layer
// (pre_en) and in the previous one (pst_en), sets the PN rotations, loads the
// intrinsic messages, runs the ADQ trigger, checks parity and delivers the
// hard decisions.
//
// Alignment. Line r of column c holds VN (c, (r + a_c) mod z). For a
// non-zero block with shift s (row r connected to column (r + s) mod z) the
// PN of column c rotates by (s - a_c) mod z and a_c becomes s; zero blocks
// leave the column where it is (its lines bypass).
//
// Frame sequence after 'start' (cfg inputs and llr held stable):
//   decoding  niter x nlayers rounds. The intrinsic messages enter through
//             the 2-to-1 MUX in front of the PNs during the first round
//             (initialisation merged into decoding); the old CN messages are
//             taken as zero during the first iteration.
//   parity    one full round (the post-VNU of the last layer) and then one
//             clock per further layer with the PU frozen in S2, CN messages
//             ignored (par = 1), so that each PU's sign product is the
//             parity check of its row; 'ok' is set if no row fails.
//   output    one more clock rotates every column back to a_c = 0 and the
//             signs of the VN registers are captured in 'hd' (hd[c][i] is
//             bit i of block column c); 'done' pulses.
// Clocks from the edge that samples start to the one that raises done:
// 3 x nlayers x niter + nlayers + 5.
//
// ADQ: after every decoding round the PUs' pseudo-unsatisfied flags go to
// wmx_adq; when it fires, the round after next stores all VN values halved
// and every CN word written before that round is halved once when it is
// next read (the 16-bit minima MUX of the controller).
//
// Not built here: the two-layer concurrent mode with its switch arrays
// SA_0 / SA_1 (the PUs support it, dual is tied to 0), so WiMAX rate 1/2
// takes 12 rounds per iteration instead of 6.
module wmx_decoder
  import wmx_pkg::*;
#(
  parameter int unsigned NPU  = 96,   // PUs = largest sub-block size
  parameter int unsigned MAXL = 12,   // largest number of layers
  parameter int unsigned NWIN = 4     // ADQ window (layers)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration
  input  logic [$clog2(NPU+1)-1:0] z,
  input  logic [$clog2(MAXL+1)-1:0] nlayers,
  input  logic [5:0]               niter,
  input  logic [8:0]               ps_th,
  input  logic                     adq_en,
  // base matrix load
  input  logic                     bm_we,
  input  logic [$clog2(MAXL)-1:0]  bm_layer,
  input  logic [$clog2(NLINE)-1:0]  bm_col,
  input  logic                     bm_nz,
  input  logic [$clog2(NPU)-1:0]   bm_shift,
  // frame
  input  logic [QW-1:0]            llr [NLINE][NPU],
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     ok,
  output logic [NPU-1:0]           hd [NLINE],
  output logic                     adq_changed
);

  localparam int unsigned ZW = $clog2(NPU + 1);
  localparam int unsigned SW = $clog2(NPU);
  localparam int unsigned LW = $clog2(MAXL);

  typedef enum logic [2:0] {
    PH_IDLE, PH_DEC, PH_PAR1, PH_PARS, PH_UNROT, PH_OUT
  } phase_e;

  // ---------------- base matrix ----------------
  logic          bm_v [MAXL][NLINE];
  logic [SW-1:0] bm_s [MAXL][NLINE];
  always_ff @(posedge clk) begin
    if (bm_we) begin
      bm_v[bm_layer][bm_col] <= bm_nz;
      bm_s[bm_layer][bm_col] <= bm_shift;
    end
  end

  // ---------------- sequencing state ----------------
  phase_e        phase;
  pu_state_e     st;
  logic [LW-1:0] lay, lay_prev;
  logic [5:0]    iter;
  logic          first;          // first decoding round of the frame
  logic          prev_dec;       // previous round was a decoding round
  logic [SW-1:0] align [NLINE];
  logic          qpend, qact;
  logic [MAXL-1:0] stale;
  logic          fail;

  // ---------------- PU array and PNs ----------------
  logic [1:0]  pu_out [NPU][NLINE];
  logic [1:0]  pn_in  [NLINE][NPU];
  logic [1:0]  pn_out [NLINE][NPU];
  logic [SW-1:0] pn_sh [NLINE];
  cn_word_t    cn_rd  [NPU];
  cn_word_t    cn_old [NPU];
  cn_word_t    cn_new [NPU];
  logic [NPU-1:0] adq_flag;
  logic [NLINE-1:0] pre_en, pst_en;
  logic        par;

  // target layer of this round's pre-VNU
  logic [LW-1:0] lay_tgt;
  always_comb begin
    unique case (phase)
      PH_PAR1:  lay_tgt = '0;
      default:  lay_tgt = lay;
    endcase
  end

  always_comb begin
    par = (phase == PH_PAR1) || (phase == PH_PARS) || (phase == PH_UNROT);
    for (int c = 0; c < NLINE; c++) begin
      logic [SW:0] d;  // top bit only absorbs the borrow of the subtraction
      if (phase == PH_UNROT) begin
        pre_en[c] = 1'b0;
        d = (align[c] == '0) ? '0 : (SW+1)'(z) - (SW+1)'(align[c]);
      end else begin
        pre_en[c] = bm_v[lay_tgt][c];
        if (!bm_v[lay_tgt][c])                 d = '0;
        else if (bm_s[lay_tgt][c] >= align[c]) d = (SW+1)'(bm_s[lay_tgt][c]) - (SW+1)'(align[c]);
        else d = (SW+1)'(bm_s[lay_tgt][c]) + (SW+1)'(z) - (SW+1)'(align[c]);
      end
      pn_sh[c] = d[SW-1:0];
      pst_en[c] = ((phase == PH_DEC && !first) || phase == PH_PAR1) ? bm_v[lay_prev][c] : 1'b0;
    end
  end

  // intrinsic MUX in front of the PNs
  always_comb begin
    for (int c = 0; c < NLINE; c++)
      for (int r = 0; r < NPU; r++) begin
        if (first) begin
          unique case (st)
            ST_S0:   pn_in[c][r] = llr[c][r][1:0];
            ST_S1:   pn_in[c][r] = llr[c][r][3:2];
            default: pn_in[c][r] = llr[c][r][5:4];
          endcase
        end else begin
          pn_in[c][r] = pu_out[r][c];
        end
      end
  end

  for (genvar c = 0; c < NLINE; c++) begin : g_pn
    wmx_pn #(.NPU(NPU)) u_pn (.din(pn_in[c]), .z(z), .sh(pn_sh[c]), .dout(pn_out[c]));
  end

  // CN memory and the ADQ halving MUX on its read port
  logic cn_we;
  assign cn_we = prev_dec && (st == ST_S0) && (phase == PH_DEC || phase == PH_PAR1);
  wmx_cn_mem #(.NPU(NPU), .DEPTH(MAXL)) u_cnm (
    .clk(clk), .we(cn_we), .waddr(lay_prev), .wdata(cn_new), .raddr(lay), .rdata(cn_rd)
  );
  always_comb begin
    for (int r = 0; r < NPU; r++) begin
      if (iter == '0)      cn_old[r] = '0;
      else if (stale[lay]) cn_old[r] = cn_halve(cn_rd[r]);
      else                 cn_old[r] = cn_rd[r];
    end
  end

  for (genvar r = 0; r < NPU; r++) begin : g_pu
    logic [1:0] ain [NLINE];
    for (genvar c = 0; c < NLINE; c++) begin : g_c
      assign ain[c] = pn_out[c][r];
    end
    wmx_pu u_pu (
      .clk    (clk),
      .st     (st),
      .dual   (1'b0),
      .par    (par),
      .qchg   (qact),
      .app_in (ain),
      .pre_en (pre_en),
      .pst_en (pst_en),
      .cn_old (cn_old[r]),
      .app_out(pu_out[r]),
      .cn_new (cn_new[r]),
      .adq    (adq_flag[r])
    );
  end

  // flags of the PUs in use
  logic [NPU-1:0] flag_z;
  always_comb begin
    for (int r = 0; r < NPU; r++) flag_z[r] = adq_flag[r] && (ZW'(r) < z);
  end

  logic adq_trig;
  wmx_adq #(.NPU(NPU), .NWIN(NWIN)) u_adq (
    .clk(clk), .rst_n(rst_n), .clear(start && !busy), .en(adq_en),
    .tick(cn_we), .flags(flag_z), .ps_th(ps_th), .trig(adq_trig), .changed(adq_changed)
  );

  // ---------------- controller ----------------
  logic last_layer;
  assign last_layer = (32'(lay) == 32'(nlayers) - 1);
  assign busy = (phase != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      st       <= ST_S0;
      lay      <= '0;
      lay_prev <= '0;
      iter     <= '0;
      first    <= 1'b0;
      prev_dec <= 1'b0;
      qpend    <= 1'b0;
      qact     <= 1'b0;
      stale    <= '0;
      fail     <= 1'b0;
      done     <= 1'b0;
      ok       <= 1'b0;
      for (int c = 0; c < NLINE; c++) align[c] <= '0;
    end else begin
      done <= 1'b0;
      if (adq_trig) qpend <= 1'b1;
      if (cn_we) stale[lay_prev] <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          if (start) begin
            phase    <= PH_DEC;
            st       <= ST_S0;
            lay      <= '0;
            iter     <= '0;
            first    <= 1'b1;
            prev_dec <= 1'b0;
            qpend    <= 1'b0;
            qact     <= 1'b0;
            stale    <= '0;
            fail     <= 1'b0;
            for (int c = 0; c < NLINE; c++) align[c] <= '0;
          end
        end
        PH_DEC, PH_PAR1: begin
          unique case (st)
            ST_S0:   st <= ST_S1;
            ST_S1:   st <= ST_S2;
            default: begin
              st <= ST_S0;
              for (int c = 0; c < NLINE; c++) if (pre_en[c]) align[c] <= bm_s[lay_tgt][c];
              first    <= 1'b0;
              lay_prev <= lay_tgt;
              if (qact) stale <= '1;
              qact     <= qpend || (adq_trig && !qact);
              if (qpend || adq_trig) qpend <= 1'b0;
              if (phase == PH_DEC) begin
                prev_dec <= 1'b1;
                if (last_layer) begin
                  lay <= '0;
                  if (32'(iter) == 32'(niter) - 1) phase <= PH_PAR1;
                  else iter <= iter + 1'b1;
                end else begin
                  lay <= lay + 1'b1;
                end
              end else begin
                // parity check of layer 0 done; remaining layers in S2 only
                prev_dec <= 1'b0;
                lay      <= LW'(1);
                st       <= ST_S2;
                qact     <= 1'b0;
                phase    <= (nlayers == 1) ? PH_UNROT : PH_PARS;
              end
            end
          endcase
        end
        PH_PARS: begin
          // st stays S2: one parity layer per clock
          for (int c = 0; c < NLINE; c++) if (pre_en[c]) align[c] <= bm_s[lay][c];
          if (|flag_z) fail <= 1'b1;
          if (last_layer) phase <= PH_UNROT;
          else lay <= lay + 1'b1;
        end
        PH_UNROT: begin
          for (int c = 0; c < NLINE; c++) align[c] <= '0;
          if (|flag_z) fail <= 1'b1;
          phase <= PH_OUT;
        end
        default: begin  // PH_OUT
          for (int c = 0; c < NLINE; c++)
            for (int r = 0; r < NPU; r++) hd[c][r] <= pu_out[r][c][1];
          ok    <= !fail;
          done  <= 1'b1;
          phase <= PH_IDLE;
        end
      endcase
    end
  end

endmodule
