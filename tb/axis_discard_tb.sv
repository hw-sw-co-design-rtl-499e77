// axis_discard_tb: random frames with random discard/transmit commands.
// Checks that transmitted frames arrive complete and in order, discarded
// frames never appear, and no beat passes before its frame's command.
module axis_discard_tb;
  import axi_pkg::*;
  logic clk = 0, rst_n = 0;
  axis_t s, m;
  logic s_tready, m_tready, cmd_valid, cmd_discard, cmd_ready;
  int checks = 0, failures = 0, frames_in = 0, dropped = 0, passed = 0;
  bit cmds [$];            // commands issued, in order
  int cur_frame_cmd = -1;  // command applied to the frame at the input
  bit frame_cmd [$];
  logic [31:0] q [$];

  axis_discard dut (.clk, .rst_n, .s_axis(s), .s_tready, .m_axis(m), .m_tready,
                    .cmd_valid, .cmd_discard, .cmd_ready);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit took;   // the input beat was accepted at the last edge
  always @(posedge clk) took = s.tvalid && s_tready;
  bit took_cmd;
  always @(posedge clk) took_cmd = cmd_valid && cmd_ready;

  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd_ready) frame_cmd.push_back(cmd_discard);
    if (s.tvalid && s_tready) begin
      checks++;
      if (frame_cmd.size() == 0) begin failures++; $display("beat passed before command"); end
      else begin
        if (!frame_cmd[0]) q.push_back(s.tdata);
        if (s.tlast) begin
          if (frame_cmd[0]) dropped++; else passed++;
          void'(frame_cmd.pop_front());
        end
      end
    end
    if (m.tvalid && m_tready) begin
      checks++;
      if (q.size() == 0 || m.tdata != q.pop_front()) begin failures++; $display("wrong beat %h", m.tdata); end
    end
  end

  initial begin
    int left;
    s = '0; m_tready = 0; cmd_valid = 0; cmd_discard = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    left = $urandom_range(1, 5);
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (!s.tvalid || took) begin
        if (s.tvalid) left = s.tlast ? $urandom_range(1, 5) : left - 1;
        s.tvalid = $urandom_range(0, 3) != 0;
        s.tdata = $urandom; s.tkeep = 4'hF; s.tlast = (left == 1);
      end
      if (!cmd_valid || took_cmd) begin
        cmd_valid = $urandom_range(0, 6) == 0;
        cmd_discard = $urandom_range(0, 1);
      end
      m_tready = $urandom_range(0, 3) != 0;
    end
    @(negedge clk); cmd_valid = 0; s.tvalid = 0; m_tready = 1;
    repeat (10) @(negedge clk);
    checks++; if (dropped < 5 || passed < 5) begin failures++; $display("dropped=%0d passed=%0d", dropped, passed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
