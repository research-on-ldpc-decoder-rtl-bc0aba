// Shared types and constants of the WiMAX fully-parallel layered decoder.
//
// APP and variable-node (VN) messages are 6-bit two's complement, (6,1)
// quantization, carried on 2-bit serial lines in three states: S0 moves bits
// [1:0], S1 bits [3:2], S2 bits [5:4]. Check-node (CN) messages are kept in
// compressed form: for each half of the 24 lines (lower = lines 0..11, upper =
// lines 12..23) the smallest and second smallest 4-bit CN magnitude and the
// 5-bit position of the smallest, plus one sign bit per line. The field
// widths follow the CN memory organisation of the design (four 4-bit minima,
// two 5-bit positions, 24 signs); the 4-bit limit of a CN magnitude is what
// makes the early-detect saturation of post-VNU exact in its detection.
package wmx_pkg;

  localparam int unsigned QW    = 6;   // APP / VN message width
  localparam int unsigned CMW   = 4;   // CN magnitude width
  localparam int unsigned NLINE = 24;  // serial lines per PU (block columns)
  localparam int unsigned HALF  = 12;  // lines per half (two-layer mode)
  localparam int unsigned POSW  = 5;   // position field width

  // Processing state of the 3-state PU.
  typedef enum logic [1:0] {
    ST_S0 = 2'd0,
    ST_S1 = 2'd1,
    ST_S2 = 2'd2
  } pu_state_e;

  // Compressed CN message word of one PU (50 bits).
  typedef struct packed {
    logic [CMW-1:0]   min1_u;
    logic [CMW-1:0]   min2_u;
    logic [CMW-1:0]   min1_l;
    logic [CMW-1:0]   min2_l;
    logic [POSW-1:0]  pos_u;
    logic [POSW-1:0]  pos_l;
    logic [NLINE-1:0] sgn;
  } cn_word_t;

  // Offset min-sum CN magnitude from a VN magnitude: subtract one ulp,
  // floor at zero, clamp to the 4-bit CN range.
  function automatic logic [CMW-1:0] cn_mag(input logic [QW-1:0] m);
    logic [QW-1:0] t;
    t = (m == '0) ? '0 : m - 1'b1;
    return (t > 15) ? 4'd15 : t[CMW-1:0];
  endfunction

  // Halve the four minima of a CN word (quantization change of ADQ).
  function automatic cn_word_t cn_halve(input cn_word_t w);
    cn_word_t r;
    r = w;
    r.min1_u = w.min1_u >> 1;
    r.min2_u = w.min2_u >> 1;
    r.min1_l = w.min1_l >> 1;
    r.min2_l = w.min2_l >> 1;
    return r;
  endfunction

endpackage
