// N-way barrel shifter (rotator) over W-bit lanes: dout[i] = din[(i + sh) mod N].
//
// Used as the permutation networks of the DVB-T2 decoder: PN0 brings the APP
// messages of a block to the processor elements (rotation by P - S) and PN1
// returns the updated messages to their memory lanes (rotation by S).
// Built as log2(N) stages of 2-to-1 multiplexers, stage k rotating by 2^k
// when bit k of sh is set; sh must be below N. Combinational.
module barrel_shifter #(
  parameter int unsigned N = 40,
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]           din  [N],
  input  logic [$clog2(N)-1:0]   sh,
  output logic [W-1:0]           dout [N]
);

  localparam int unsigned K = $clog2(N);

  logic [W-1:0] stage [K+1][N];

  always_comb begin
    stage[0] = din;
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++)
        stage[k+1][i] = sh[k] ? stage[k][(i + (1 << k)) % N] : stage[k][i];
  end

  assign dout = stage[K];

endmodule
