// axis_fifo_tb: random frames through an 8-deep axis_fifo with random
// source gaps and sink stalls. Every output beat (data, keep, last, user)
// is compared with a reference queue. Checks that the FIFO fills (input
// stalled while full, level reaches DEPTH), that back-to-back beats flow at
// one per cycle, and the one-cycle latency from input to output.
module axis_fifo_tb;
  import axi_pkg::*;
  logic clk = 0, rst_n = 0;
  axis_t s, m;
  logic s_tready, m_tready;
  logic [4:0] level;
  int checks = 0, failures = 0, full_seen = 0, nout = 0;
  axis_t q [$];

  axis_fifo #(.DEPTH(8)) dut (.clk, .rst_n, .s_axis(s), .s_tready, .m_axis(m), .m_tready, .level);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // scoreboard at each clock edge
  bit took;   // the input beat was accepted at the last edge
  always @(posedge clk) took = s.tvalid && s_tready;

  always @(posedge clk) if (rst_n) begin
    if (s.tvalid && s_tready) q.push_back(s);
    if (m.tvalid && m_tready) begin
      axis_t e;
      checks++; nout++;
      e = q.pop_front();
      if (m.tdata != e.tdata || m.tkeep != e.tkeep || m.tlast != e.tlast || m.tuser != e.tuser) begin
        failures++; $display("mismatch got %h exp %h", m.tdata, e.tdata);
      end
    end
    if (level == 8 && !s_tready) full_seen++;
  end

  initial begin
    int lat;
    s = '0; m_tready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // latency: one beat into an empty FIFO appears one cycle later
    @(negedge clk);
    s = '{tdata: 32'hCAFE0001, tkeep: 4'hF, tlast: 1'b1, tuser: 32'd4, tvalid: 1'b1};
    @(negedge clk);
    s.tvalid = 0;
    checks++; if (!m.tvalid) begin failures++; $display("latency not 1"); end
    m_tready = 1;
    @(negedge clk);
    // random traffic
    for (int t = 0; t < 4000; t++) begin
      if (!s.tvalid || took) begin
        s.tvalid = (t < 1000) ? 1'b1 : ($urandom_range(0, 2) != 0);
        s.tdata  = $urandom; s.tkeep = 4'($urandom); s.tlast = $urandom_range(0, 3) == 0;
        s.tuser  = $urandom;
      end
      m_tready = (t < 300) ? 1'b0 : (t < 600) ? 1'b1 : ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (s.tvalid && s_tready) ; // accepted at the edge just passed
    end
    s.tvalid = 0; m_tready = 1;
    repeat (20) @(negedge clk);
    checks++; if (full_seen == 0) begin failures++; $display("FIFO never filled"); end
    checks++; if (q.size() != 0) begin failures++; $display("%0d beats lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
