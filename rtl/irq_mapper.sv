// irq_mapper: Interrupt Mapper of the RSoC Bridge. Routes N_IN interrupt
// sources (one per controller) onto N_OUT interrupt lines towards the
// processor: line j is the OR of every source i with MAP[i] == j; a source
// with MAP[i] >= N_OUT is not connected. The outputs are registered so that
// the lines leave the bridge from flip-flops.
module irq_mapper #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4,
  parameter int unsigned MAP [N_IN] = '{default: 0}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  irq_in,
  output logic [N_OUT-1:0] irq_out
);
  logic [N_OUT-1:0] lines;

  always_comb begin
    lines = '0;
    for (int unsigned i = 0; i < N_IN; i++)
      for (int unsigned j = 0; j < N_OUT; j++)
        if (MAP[i] == j && irq_in[i]) lines[j] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) irq_out <= '0;
    else        irq_out <= lines;
  end
endmodule
