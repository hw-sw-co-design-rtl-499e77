// sdma_engine_tb: an sdma_engine on a behavioural AXI memory with random
// stalls; its output stream is looped back into its input. Each test
// queues a memory-to-device request (source, size) and a device-to-memory
// request (destination, buffer size) and checks: the frame's TUSER is the
// size; TKEEP of the last beat; the destination holds the source bytes and
// nothing beyond them is written; the responses (status, size, id, the
// truncation bit when the buffer is smaller than the frame); no burst is
// longer than 16 beats or crosses a 4 KiB boundary (sizes up to 8 KiB and
// sources placed near boundaries).
module sdma_engine_tb;
  import axi_pkg::*;
  import rsoc_pkg::*;
  localparam logic [31:0] MB = 32'h0010_0000;
  logic clk = 0, rst_n = 0;
  dma_req_t sreq, dreq; dma_res_t sres, dres;
  logic sreq_valid, sreq_ready, sres_valid, sres_ready, dreq_valid, dreq_ready, dres_valid, dres_ready;
  axis_t lp; logic lp_ready;
  axi_req_t areq; axi_resp_t aresp;
  int merr, nrd, nwr;
  int checks = 0, failures = 0, truncs = 0, crossings = 0;
  logic [31:0] first_user; bit seen_first = 1; logic [3:0] last_keep;

  sdma_engine dut (.clk, .rst_n, .sreq, .sreq_valid, .sreq_ready, .sres, .sres_valid, .sres_ready,
    .dreq, .dreq_valid, .dreq_ready, .dres, .dres_valid, .dres_ready,
    .m_axis(lp), .m_tready(lp_ready), .s_axis(lp), .s_tready(lp_ready),
    .m_axi_req(areq), .m_axi_resp(aresp));
  axi_mem_model #(.MEM_BYTES(65536), .BASE(MB), .STALL(1)) mem (.clk, .rst_n, .req(areq), .resp(aresp),
    .errors(merr), .reads(nrd), .writes(nwr));
  always #5 clk = ~clk;

  always @(posedge clk) if (lp.tvalid && lp_ready) begin
    if (seen_first) first_user = lp.tuser;
    seen_first = lp.tlast;
    if (lp.tlast) last_keep = lp.tkeep;
  end

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask

  task automatic run(input logic [31:0] src, input logic [31:0] size, input logic [31:0] dst,
                     input logic [31:0] cap, input logic [31:0] id);
    logic [7:0] prior [64];
    logic [31:0] exp_bytes; bit exp_trunc;
    exp_trunc = ((size + 3) & ~32'd3) > cap;
    exp_bytes = exp_trunc ? cap : size;
    for (int i = 0; i < 64; i++) prior[i] = mem.mem[dst - MB + exp_bytes + i];
    if ((src & 32'hFFFF_F000) != ((src + size - 1) & 32'hFFFF_F000)) crossings++;
    fork
      begin
        @(negedge clk); sreq = '{addr: src, size: size, id: id}; sreq_valid = 1;
        do @(posedge clk); while (!sreq_ready);
        @(negedge clk); sreq_valid = 0;
        sres_ready = 1;
        do @(posedge clk); while (!sres_valid);
        chk("s status", sres.status, 0); chk("s id", sres.id, id);
        @(negedge clk); sres_ready = 0;
      end
      if (size != 0) begin
        @(negedge clk); dreq = '{addr: dst, size: cap, id: id + 1}; dreq_valid = 1;
        do @(posedge clk); while (!dreq_ready);
        @(negedge clk); dreq_valid = 0;
        dres_ready = 1;
        do @(posedge clk); while (!dres_valid);
        chk("d status", dres.status, {15'b0, exp_trunc, 16'b0});
        chk("d size", dres.size, exp_bytes);
        chk("d id", dres.id, id + 1);
        if (exp_trunc) truncs++;
        @(negedge clk); dres_ready = 0;
      end
    join
    if (size != 0) chk("tuser", first_user, size);
    if (size == 0) return;
    if (size != 0 && !exp_trunc)
      chk("last keep", 32'(last_keep), size[1:0] == 0 ? 32'hF : (32'h1 << size[1:0]) - 1);
    for (int i = 0; i < int'(exp_bytes); i++)
      if (mem.mem[dst - MB + i] !== mem.mem[src - MB + i]) begin
        failures++; $display("byte %0d differs (src %h dst %h size %0d)", i, src, dst, size); break;
      end
    checks++;
    for (int i = 0; i < 64; i++)
      if (mem.mem[dst - MB + exp_bytes + i] !== prior[i]) begin
        failures++; $display("written past end at +%0d", i); break;
      end
    checks++;
  endtask

  initial begin
    int t0, cyc;
    sreq = '0; dreq = '0; sreq_valid = 0; dreq_valid = 0; sres_ready = 0; dres_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(MB + 32'h0000, 32'd64,   MB + 32'h8000, 32'd64, 10);
    run(MB + 32'h0FF0, 32'd200,  MB + 32'h9000, 32'd256, 20);   // crosses 4 KiB
    run(MB + 32'h0104, 32'd37,   MB + 32'h8400, 32'd64, 30);    // partial last beat
    run(MB + 32'h0200, 32'd100,  MB + 32'h8800, 32'd40, 40);    // truncated
    run(MB + 32'h0300, 32'd0,    MB + 32'h8C00, 32'd16, 50);    // empty frame request
    run(MB + 32'h0400, 32'd8,    MB + 32'h8C00, 32'd16, 60);   // buffer larger than frame
    run(MB + 32'h1F00, 32'd8192, MB + 32'hA000, 32'd8192, 70); // 8 KiB, several boundaries
    for (int t = 0; t < 10; t++)
      run(MB + (32'($urandom_range(0, 16000)) << 2), 32'($urandom_range(1, 600)),
          MB + 32'hD000, 32'($urandom_range(1, 160)) << 2, 100 + t);
    chk("protocol errors in memory model", merr, 0);
    checks++; if (truncs == 0 || crossings == 0) begin failures++; $display("cases missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
