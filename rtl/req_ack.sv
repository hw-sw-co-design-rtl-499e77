// req_ack: Request-Acknowledger. Serves N level requests (each held by its
// requester until acknowledged) with a single acknowledge pulse one clock
// after a request is seen. The OR over all requests is registered, which is
// the point of the component: with many registers behind one bus the wide
// OR would otherwise sit on a long combinational path. ack is high for one
// cycle; a request still pending after that cycle is acknowledged again two
// cycles later, so a requester must drop its request in the cycle after ack.
module req_ack #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic         ack
);
  always_ff @(posedge clk) begin
    if (!rst_n) ack <= 1'b0;
    else        ack <= (|req) && !ack;
  end
endmodule
