// gen_mux: generic N-input multiplexor of the framework's general purpose
// group. y = d[sel] for W-bit inputs; a select at or above N (possible when
// N is not a power of two) gives zero. Purely combinational. The document
// names the unit; its port layout (a packed array of inputs) is this
// design's choice. It selects the read data in axi_lite_endpoint.
module gen_mux #(
  parameter  int unsigned N  = 4,
  parameter  int unsigned W  = 32,
  localparam int unsigned SW = misc_pkg::max(1, misc_pkg::log2(N))
) (
  input  logic [N-1:0][W-1:0] d,
  input  logic [SW-1:0]       sel,
  output logic [W-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (int'(sel) == i) y = d[i];
  end
endmodule
