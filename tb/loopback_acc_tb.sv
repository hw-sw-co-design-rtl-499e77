// loopback_acc_tb: sends random frames (with TUSER = frame size on the
// first beat) through a loopback_acc under random output stalls, checks that
// the output is identical, then reads FRAMES and BEATS over the
// configuration port and checks them against the counts sent, and that a
// write clears them. Checks the information vector's zero last byte.
module loopback_acc_tb;
  import axi_pkg::*;
  import rsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  axis_t s, m; logic s_tready, m_tready;
  info_vec_t info;
  int checks = 0, failures = 0, nframes = 0, nbeats = 0;
  axis_t q [$];
  bit took;

  loopback_acc #(.INFO('1)) dut (.clk, .rst_n, .cfg_req(req), .cfg_resp(resp),
    .s_axis(s), .s_tready, .m_axis(m), .m_tready, .info_vec(info));
  axil_bfm bfm (.clk, .req, .resp);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    took = s.tvalid && s_tready;
    if (took) q.push_back(s);
    if (m.tvalid && m_tready) begin
      axis_t e;
      e = q.pop_front();
      checks++;
      if (m != e) begin failures++; $display("beat mismatch %h vs %h", m.tdata, e.tdata); end
    end
  end

  initial begin
    logic [31:0] d; logic [1:0] r;
    int len;
    s = '0; m_tready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    checks++; if (info[255:248] != 0 || info[247:0] != '1) begin failures++; $display("info vector"); end
    for (int f = 0; f < 30; f++) begin
      len = $urandom_range(1, 9);
      for (int b = 0; b < len; b++) begin
        @(negedge clk);
        s.tvalid = 1; s.tdata = $urandom; s.tkeep = 4'hF; s.tlast = (b == len - 1);
        s.tuser = (b == 0) ? 32'(4 * len) : '0;
        do begin
          m_tready = $urandom_range(0, 2) != 0;
          @(negedge clk);
        end while (!took);
        s.tvalid = 0;
      end
      nframes++; nbeats += len;
    end
    m_tready = 1;
    repeat (10) @(posedge clk);
    bfm.read(32'h0, d, r); checks++;
    if (d != nframes) begin failures++; $display("FRAMES %0d exp %0d", d, nframes); end
    bfm.read(32'h4, d, r); checks++;
    if (d != nbeats) begin failures++; $display("BEATS %0d exp %0d", d, nbeats); end
    bfm.write(32'h0, 0, r);
    bfm.read(32'h4, d, r); checks++;
    if (d != 0) begin failures++; $display("BEATS not cleared"); end
    checks++; if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
