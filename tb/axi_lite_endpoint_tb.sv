// axi_lite_endpoint_tb: an axi_lite_endpoint serving 6 registers, with a
// testbench register file behind it whose acknowledge comes after a random
// delay. Random writes (with byte strobes) and reads through the bus model
// are checked against a reference copy; out-of-range addresses must answer
// SLVERR without a register request. Also checks the write and read
// latency when the acknowledge comes one cycle after the request.
module axi_lite_endpoint_tb;
  import axi_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  logic [5:0] wr_req, rd_req;
  logic [31:0] wr_data; logic [3:0] wr_strb;
  logic wr_ack, rd_ack;
  logic [5:0][31:0] regs, ref_regs;
  int checks = 0, failures = 0, bad_req = 0;
  bit slow = 1;

  axi_lite_endpoint #(.NREGS(6)) dut (.clk, .rst_n, .s_req(req), .s_resp(resp),
    .wr_req, .wr_data, .wr_strb, .wr_ack, .rd_req, .rd_data(regs), .rd_ack);
  axil_bfm bfm (.clk, .req, .resp);
  always #5 clk = ~clk;

  // register side: acknowledge after 1 (or 1-4 if slow) cycles
  initial begin
    wr_ack = 0; rd_ack = 0; regs = '0;
    forever begin
      @(posedge clk);
      wr_ack <= 0; rd_ack <= 0;
      if (wr_req != 0 && !wr_ack) begin
        if (!$onehot(wr_req)) bad_req++;
        if (slow) repeat ($urandom_range(0, 3)) @(posedge clk);
        for (int i = 0; i < 6; i++) if (wr_req[i]) regs[i] <= misc_pkg::apply_be(regs[i], wr_data, wr_strb);
        wr_ack <= 1;
      end
      if (rd_req != 0 && !rd_ack) begin
        if (!$onehot(rd_req)) bad_req++;
        rd_ack <= 1;
      end
    end
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1:0] r; logic [31:0] d, a, v; logic [3:0] st; int t0, lat;
    ref_regs = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      a = 32'($urandom_range(0, 7)) << 2;
      if ($urandom_range(0, 1)) begin
        v = $urandom; st = 4'($urandom_range(1, 15));
        bfm.write(a, v, r, st);
        checks++;
        if (a < 24) begin
          ref_regs[a >> 2] = misc_pkg::apply_be(ref_regs[a >> 2], v, st);
          if (r != RESP_OKAY) begin failures++; $display("write resp %0d", r); end
        end else if (r != RESP_SLVERR) begin failures++; $display("no SLVERR on write %h", a); end
      end else begin
        bfm.read(a, d, r);
        checks++;
        if (a < 24) begin
          if (r != RESP_OKAY || d != ref_regs[a >> 2]) begin failures++; $display("read %h = %h exp %h", a, d, ref_regs[a >> 2]); end
        end else if (r != RESP_SLVERR) begin failures++; $display("no SLVERR on read %h", a); end
      end
    end
    // latency with a one-cycle acknowledge: AR handshake to R valid
    slow = 0;
    @(posedge clk);
    req.ar_addr <= 32'h4; req.ar_valid <= 1; req.r_ready <= 1;
    do @(posedge clk); while (!resp.ar_ready);
    req.ar_valid <= 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!resp.r_valid);
    req.r_ready <= 0;
    checks++;
    if (lat != 3) begin failures++; $display("read latency %0d, expected 3", lat); end
    checks++; if (bad_req != 0) begin failures++; $display("request not one-hot"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
