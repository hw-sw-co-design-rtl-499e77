// change_detector: interrupt source. Watches the bit vector sig and raises
// event_o for as long as sig differs from the reset-time constant IDLE. The
// comparison is registered, so event_o follows sig with one clock of delay
// (this design's choice, to give the interrupt line a clean flop output).
module change_detector #(
  parameter int unsigned        W    = 1,
  parameter logic [W-1:0]       IDLE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] sig,
  output logic         event_o
);
  always_ff @(posedge clk) begin
    if (!rst_n) event_o <= 1'b0;
    else        event_o <= (sig != IDLE);
  end
endmodule
