// rr_arbiter_tb: drives random request vectors into a 5-input rr_arbiter and
// compares every grant with a reference round-robin model (first request at
// or after the position following the last acknowledged winner). Also checks
// that a request held alone is granted and that no requester is starved.
module rr_arbiter_tb;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [2:0] gidx;
  logic gvalid, ack;
  int checks = 0, failures = 0, ptr = 0;
  int wins [N];

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .ack, .grant, .grant_idx(gidx), .grant_valid(gvalid));

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp;
    req = '0; ack = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) wins[i] = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = (t < 1000) ? N'($urandom) : '1;
      ack = $urandom_range(0, 1);
      #1;
      exp = -1;
      for (int k = 0; k < N; k++)
        if (exp < 0 && req[(ptr + k) % N]) exp = (ptr + k) % N;
      checks++;
      if (exp < 0) begin
        if (gvalid || grant != 0) begin failures++; $display("grant without request"); end
      end else if (!gvalid || int'(gidx) != exp || grant != (N'(1) << exp)) begin
        failures++; $display("t=%0d req=%b ptr=%0d exp=%0d got=%0d", t, req, ptr, exp, gidx);
      end
      if (ack && exp >= 0) begin
        ptr = (exp + 1) % N;
        if (t >= 1000) wins[exp]++;
      end
    end
    // all requesting: every input must have won about equally often
    for (int i = 0; i < N; i++) begin
      checks++;
      if (wins[i] < 50) begin failures++; $display("input %0d starved: %0d", i, wins[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
