// Trigger of the advanced dynamic quantization (ADQ), pseudo-unsatisfied
// criterion.
//
// After every layer (or pair of layers in two-layer mode) the 1-bit 'adq'
// flags of the PUs, each telling that the product of the VN signs of its
// check node is negative, are added up. The last NWIN sums are kept in
// 7-bit registers (CNT[0] newest). When the total over the window falls
// below the threshold ps_th, at least NWIN layers have passed since the
// start of the frame and no change has happened yet, the trigger fires once:
// from then on all APP and CN messages are halved (one right shift), which
// widens the range of the 6-bit messages. The flag 'changed' stays set until
// the next frame (clear).
//
// Timing: 'tick' marks the cycle in which 'flags' hold the result of one
// layer; 'trig' is a one-cycle pulse in the following cycle.
module wmx_adq #(
  parameter int unsigned NPU  = 96,
  parameter int unsigned NWIN = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           en,
  input  logic           tick,
  input  logic [NPU-1:0] flags,
  input  logic [8:0]     ps_th,
  output logic           trig,
  output logic           changed
);

  logic [6:0] cnt [NWIN];
  logic [7:0] nlayer;          // layers seen, saturating
  logic [6:0] pop;
  logic [8:0] sum;

  always_comb begin
    pop = '0;
    for (int i = 0; i < NPU; i++) pop = pop + 7'(flags[i]);
    sum = 9'(pop);
    for (int i = 0; i < NWIN - 1; i++) sum = sum + 9'(cnt[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NWIN; i++) cnt[i] <= '0;
      nlayer  <= '0;
      trig    <= 1'b0;
      changed <= 1'b0;
    end else if (clear) begin
      for (int i = 0; i < NWIN; i++) cnt[i] <= '0;
      nlayer  <= '0;
      trig    <= 1'b0;
      changed <= 1'b0;
    end else begin
      trig <= 1'b0;
      if (tick) begin
        cnt[0] <= pop;
        for (int i = 1; i < NWIN; i++) cnt[i] <= cnt[i-1];
        if (nlayer != '1) nlayer <= nlayer + 1'b1;
        // nlayer counts earlier layers; with this one, nlayer+1 > NWIN
        if (en && !changed && (sum < ps_th) && (32'(nlayer) >= NWIN)) begin
          trig    <= 1'b1;
          changed <= 1'b1;
        end
      end
    end
  end

endmodule
