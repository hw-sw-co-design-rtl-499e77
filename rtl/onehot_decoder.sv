// onehot_decoder: binary-to-one-hot decoder of the framework's general
// purpose group. Output bit idx is high while en is high; an index at or
// above N (possible when N is not a power of two) gives all zeros.
// Purely combinational. The document names the unit; the enable input and
// the handling of out-of-range indexes are this design's choices. It
// drives the per-register request lines of axi_lite_endpoint.
module onehot_decoder #(
  parameter  int unsigned N  = 4,
  localparam int unsigned IW = misc_pkg::max(1, misc_pkg::log2(N))
) (
  input  logic [IW-1:0] idx,
  input  logic          en,
  output logic [N-1:0]  onehot
);
  always_comb begin
    onehot = '0;
    for (int i = 0; i < N; i++)
      if (en && int'(idx) == i) onehot[i] = 1'b1;
  end
endmodule
