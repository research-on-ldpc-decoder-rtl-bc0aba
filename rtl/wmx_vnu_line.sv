// One 2-bit serial processing line of the 3-state processing unit: the
// pre-VNU and post-VNU of one variable node, with its 6-bit VN register.
//
// In every round of three states (S0, S1, S2 move bits [1:0], [3:2], [5:4])
// the line does two things at once:
//   * post-VNU of the previous layer: L = SAT(lambda_prev + Lambda_new), with
//     lambda_prev read from the VN register before it is overwritten and the
//     new CN message in sign-magnitude form. Two output bits leave per state.
//   * pre-VNU of the current layer: lambda = SAT(L - Lambda_old), two input
//     bits per state, written into the same VN register positions.
// Adding or subtracting a sign-magnitude CN message is done with the same
// 2-bit adder: the magnitude bits are inverted (XOR/XNOR with the sign) and
// the carry-in of S0 is set accordingly, so no two's complement conversion
// of the CN message is needed.
//
// Saturation. Pre-VNU: overflow is found at S2 from the operand and result
// signs and the whole VN register is overwritten with +31 or -32 (0.5-unit
// scale of (6,1)). Post-VNU: bits already sent cannot be recalled, so the
// overflow is predicted at S1 by the early-detect logic
//   EDP = ~VN[5] & VN[4] & ~Sgn & Carry,  EDN = VN[5] & ~VN[4] & Sgn & ~Carry
// (Carry: carry out of the S1 addition). On EDP the S1 and S2 output bits are
// forced to 11 and 01, on EDN to 00 and 10; bits [1:0] sent at S0 stay, so a
// saturated value may be up to 3 ulp off. The document prints this equation
// with its inversion bars lost; the polarities above are the ones that make
// the prediction exact for a CN magnitude of at most 15.
//
// Bypass: pre_en = 0 (or parity mode par = 1) stores the incoming APP bits
// unchanged; pst_en = 0 sends the VN register bits unchanged.
// ADQ: qchg halves (arithmetic right shift) the value stored at the end of S2.
//
// Timing: st advances S0 -> S1 -> S2 each clock; vn_full is the complete
// current-layer VN value during S2 (combinational, after saturation and
// halving), which the min finder samples at the end of S2.
module wmx_vnu_line
  import wmx_pkg::*;
(
  input  logic                clk,
  input  pu_state_e           st,
  input  logic [1:0]          app_in,    // serial APP bits from the PN
  input  logic                pre_en,
  input  logic                pst_en,
  input  logic                par,       // parity-check mode: store APP as is
  input  logic                qchg,      // ADQ halving of the stored value
  input  logic                old_sgn,   // old CN message (pre-VNU)
  input  logic [CMW-1:0]      old_mag,
  input  logic                new_sgn,   // new CN message (post-VNU)
  input  logic [CMW-1:0]      new_mag,
  output logic [1:0]          app_out,   // serial APP bits to the PN
  output logic signed [QW-1:0] vn_full   // current VN value, valid in S2
);

  logic [QW-1:0] vn;            // VN register
  logic          c_pre, c_pst;  // carries between states
  logic          edp_q, edn_q;  // early-detect flags kept for S2

  // ---------------- operands of this state ----------------
  logic [1:0] vn_bits;
  logic [1:0] oldm_bits, newm_bits;
  always_comb begin
    unique case (st)
      ST_S0:   vn_bits = vn[1:0];
      ST_S1:   vn_bits = vn[3:2];
      default: vn_bits = vn[5:4];
    endcase
    // 6-bit zero-extended magnitudes, sliced for this state
    unique case (st)
      ST_S0: begin oldm_bits = old_mag[1:0]; newm_bits = new_mag[1:0]; end
      ST_S1: begin oldm_bits = old_mag[3:2]; newm_bits = new_mag[3:2]; end
      default: begin oldm_bits = 2'b00;      newm_bits = 2'b00;        end
    endcase
  end

  // ---------------- pre-VNU: lambda = L - Lambda_old ----------------
  logic       pre_act;
  logic [1:0] pre_b;
  logic       pre_cin;
  logic [2:0] pre_sum;
  assign pre_act = pre_en && !par;
  // subtracting a positive magnitude: add its inverse, carry-in 1 at S0
  assign pre_b   = pre_act ? (oldm_bits ^ {2{~old_sgn}}) : 2'b00;
  assign pre_cin = !pre_act ? 1'b0 : (st == ST_S0) ? !old_sgn : c_pre;
  assign pre_sum = {1'b0, app_in} + {1'b0, pre_b} + {2'b00, pre_cin};

  // full value at S2 and its saturation
  logic [QW-1:0] pre_raw, pre_sat;
  logic          pre_ovf;
  always_comb begin
    pre_raw = {pre_sum[1:0], vn[3:0]};
    // operand signs: app_in[1] and pre_b[1]; result sign pre_sum[1]
    pre_ovf = (app_in[1] == pre_b[1]) && (pre_sum[1] != app_in[1]);
    if (pre_ovf) pre_sat = app_in[1] ? 6'b100000 : 6'b011111;
    else         pre_sat = pre_raw;
    vn_full = qchg ? $signed({pre_sat[5], pre_sat[5:1]}) : $signed(pre_sat);
  end

  // ---------------- post-VNU: L = lambda_prev + Lambda_new ----------------
  logic [1:0] pst_b;
  logic       pst_cin;
  logic [2:0] pst_sum;
  logic       edp, edn;
  assign pst_b   = pst_en ? (newm_bits ^ {2{new_sgn}}) : 2'b00;
  assign pst_cin = !pst_en ? 1'b0 : (st == ST_S0) ? new_sgn : c_pst;
  assign pst_sum = {1'b0, vn_bits} + {1'b0, pst_b} + {2'b00, pst_cin};
  // early detection at S1 from the VN sign bits still held in the register
  assign edp = pst_en && (st == ST_S1) && !vn[5] &&  vn[4] && !new_sgn &&  pst_sum[2];
  assign edn = pst_en && (st == ST_S1) &&  vn[5] && !vn[4] &&  new_sgn && !pst_sum[2];

  always_comb begin
    app_out = pst_sum[1:0];
    if (st == ST_S1) begin
      if (edp)      app_out = 2'b11;
      else if (edn) app_out = 2'b00;
    end else if (st == ST_S2 && pst_en) begin
      if (edp_q)      app_out = 2'b01;
      else if (edn_q) app_out = 2'b10;
    end
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    c_pre <= pre_sum[2];
    c_pst <= pst_sum[2];
    unique case (st)
      ST_S0: vn[1:0] <= pre_sum[1:0];
      ST_S1: begin
        vn[3:2] <= pre_sum[1:0];
        edp_q   <= edp;
        edn_q   <= edn;
      end
      default: vn <= vn_full;
    endcase
  end

endmodule
