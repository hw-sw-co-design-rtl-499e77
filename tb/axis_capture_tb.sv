// axis_capture_tb: random frames of 1-8 beats pass an axis_capture with
// OFFSET = 2 while the capture consumer is slow. Checks that the stream
// passes unchanged, that exactly the third beat of every frame long enough
// is captured, in order, and that the stream stalls while a capture waits.
module axis_capture_tb;
  import axi_pkg::*;
  logic clk = 0, rst_n = 0;
  axis_t s, m;
  logic s_tready, m_tready, cap_valid, cap_ready;
  logic [31:0] cap_data;
  int checks = 0, failures = 0, pos = 0, stalls = 0;
  axis_t q [$];
  logic [31:0] cq [$];

  axis_capture #(.OFFSET(2)) dut (.clk, .rst_n, .s_axis(s), .s_tready, .m_axis(m), .m_tready,
                                  .cap_data, .cap_valid, .cap_ready);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit took;   // the input beat was accepted at the last edge
  always @(posedge clk) took = s.tvalid && s_tready;

  always @(posedge clk) if (rst_n) begin
    if (s.tvalid && s_tready) begin
      q.push_back(s);
      if (pos == 2) cq.push_back(s.tdata);
      pos = s.tlast ? 0 : pos + 1;
    end
    if (s.tvalid && m_tready && !s_tready) stalls++;
    if (m.tvalid && m_tready) begin
      axis_t e;
      e = q.pop_front();
      checks++;
      if (m.tdata != e.tdata || m.tlast != e.tlast) begin failures++; $display("stream mismatch"); end
    end
    if (cap_valid && cap_ready) begin
      checks++;
      if (cq.size() == 0 || cap_data != cq.pop_front()) begin failures++; $display("capture mismatch %h", cap_data); end
    end
  end

  initial begin
    int left;
    s = '0; m_tready = 0; cap_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    left = $urandom_range(1, 8);
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (!s.tvalid || took) begin
        if (s.tvalid) left = s.tlast ? $urandom_range(1, 8) : left - 1;
        s.tvalid = $urandom_range(0, 3) != 0;
        s.tdata = $urandom; s.tkeep = 4'hF; s.tlast = (left == 1); s.tuser = '0;
      end
      m_tready  = $urandom_range(0, 4) != 0;
      cap_ready = $urandom_range(0, 5) == 0;
    end
    @(negedge clk); s.tvalid = 0; cap_ready = 1; m_tready = 1;
    repeat (10) @(negedge clk);
    checks++; if (stalls == 0) begin failures++; $display("no capture stall seen"); end
    checks++; if (cq.size() != 0 || q.size() != 0) begin failures++; $display("left over"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
