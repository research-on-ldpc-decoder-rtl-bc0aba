// Permutation network (PN) instance of the WiMAX decoder: a barrel shifter
// over 2-bit lanes for one block column.
//
// Between two layers, the APP messages of one block column must move from
// the PU that served them in the previous layer to the PU that serves them
// in the next one. For a sub-block size z (1..NPU, one of the WiMAX
// expansion factors) lane i of the output takes lane (i + sh) mod z of the
// input; lanes i >= z are unused and driven with zero. Written as one
// selection per output lane, which a synthesis tool maps to stages of
// multiplexers. Combinational; 2 bits per lane per clock, so a 6-bit APP
// message crosses it in the three states S0, S1, S2.
module wmx_pn #(
  parameter int unsigned NPU = 96
) (
  input  logic [1:0]               din  [NPU],
  input  logic [$clog2(NPU+1)-1:0] z,
  input  logic [$clog2(NPU)-1:0]   sh,     // rotation, 0 <= sh < z
  output logic [1:0]               dout [NPU]
);

  localparam int unsigned ZW = $clog2(NPU + 1);

  always_comb begin
    for (int i = 0; i < NPU; i++) begin
      logic [ZW:0] idx;
      idx = (ZW+1)'(i) + (ZW+1)'(sh);
      if (idx >= (ZW+1)'(z)) idx = idx - (ZW+1)'(z);
      dout[i] = (ZW'(i) < z) ? din[idx[ZW-1:0]] : 2'b00;
    end
  end

endmodule
