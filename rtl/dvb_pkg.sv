// Shared constants and types of the DVB-T2 partial-parallel layered decoder.
//
// The 64800-bit normal-frame code is handled as a QC-like matrix of 40 x 40
// blocks: the 360-column periodicity of DVB-T2 is split by EPS = 9 into
// blocks of P = 40. APP messages are 8-bit, extrinsic (CN) messages 6-bit,
// the largest row weight is 22 blocks, so the compressed CN word of one row
// (first minimum, second minimum, position of the first minimum) is 15 bits.
// A PCM-ROM entry holds, for one block of the first layer of a group of nine
// layers, the APP block address A (11 bits for 1620 blocks) and the shift S.
package dvb_pkg;

  localparam int unsigned P     = 40;     // parallelism, block size
  localparam int unsigned EPS   = 9;      // 360 / P
  localparam int unsigned QA    = 8;      // APP width
  localparam int unsigned QE    = 6;      // extrinsic width
  localparam int unsigned MW    = QE - 1; // extrinsic magnitude width
  localparam int unsigned WMAX  = 22;     // largest row weight (blocks)
  localparam int unsigned IW    = 5;      // block index within a layer
  localparam int unsigned AW    = 11;     // APP block address
  localparam int unsigned SW    = 6;      // shift value

  typedef struct packed {
    logic [AW-1:0] a;
    logic [SW-1:0] s;
  } pcm_entry_t;

  typedef struct packed {
    logic [MW-1:0] min1;
    logic [MW-1:0] min2;
    logic [IW-1:0] pos;
  } ext_word_t;

  function automatic logic signed [QA-1:0] sat_app(input logic signed [QA+1:0] x);
    if (x > 127)       return 8'sd127;
    else if (x < -128) return -8'sd128;
    else               return x[QA-1:0];
  endfunction

endpackage
