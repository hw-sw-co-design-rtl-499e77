// rr_arbiter: round-robin arbiter over N requests.
// The winner is the first asserted request found when scanning from the
// position after the previous winner (an O(N) scan, as the framework's
// default arbiter). The arbiter only selects: grant/grant_idx are
// combinational from req and the priority pointer, and the pointer moves past
// the winner in the cycle in which the user pulses ack. Acknowledging the
// requester is left to the surrounding logic, as the framework prescribes.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N-1:0]                  req,
  input  logic                          ack,        // winner taken this cycle
  output logic [N-1:0]                  grant,      // one-hot winner
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx,
  output logic                          grant_valid
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] ptr;   // highest-priority position

  always_comb begin
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!grant_valid && req[i]) begin
        grant_valid = 1'b1;
        grant_idx   = IW'(i);
        grant[i]    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (ack && grant_valid)
      ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end
endmodule
