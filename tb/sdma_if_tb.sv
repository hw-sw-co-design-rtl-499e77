// sdma_if_tb: an sdma_if on a behavioural AXI memory, its accelerator
// streams looped back. Software-style sequence for several frames: write the
// d-request (buffer), write the s-request (frame), wait for the interrupt,
// read both responses (status, size, id), and compare the destination
// buffer with the source; one frame larger than its buffer must come back
// truncated (RES_DSTATUS bit 16, RES_DSIZE = buffer size).
module sdma_if_tb;
  import axi_pkg::*;
  import rsoc_pkg::*;
  localparam logic [31:0] MB = 32'h0010_0000;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  axis_t lp; logic lp_ready, irq;
  axi_req_t areq; axi_resp_t aresp;
  int merr, nrd, nwr;
  int checks = 0, failures = 0;

  sdma_if dut (.clk, .rst_n, .cfg_req(req), .cfg_resp(resp), .info_vec('0),
    .m_axis(lp), .m_tready(lp_ready), .s_axis(lp), .s_tready(lp_ready),
    .m_axi_req(areq), .m_axi_resp(aresp), .irq);
  axil_bfm bfm (.clk, .req, .resp);
  axi_mem_model #(.BASE(MB)) mem (.clk, .rst_n, .req(areq), .resp(aresp), .errors(merr), .reads(nrd), .writes(nwr));
  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d; logic [1:0] r;
    logic [31:0] src, dst, size, cap, n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 8; f++) begin
      src = MB + 32'h1000 * f + 32'(4 * $urandom_range(0, 200));
      dst = MB + 32'h8000 + 32'h1000 * f;
      size = (f == 5) ? 32'd500 : 32'($urandom_range(1, 1000));
      cap  = (f == 5) ? 32'd256 : 32'd1024;
      bfm.write(32'h38, dst, r); bfm.write(32'h3C, cap, r); bfm.write(32'h40, 32'd200 + f, r);
      bfm.write(32'h24, src, r); bfm.write(32'h28, size, r); bfm.write(32'h2C, 32'd100 + f, r);
      // wait for both responses
      do begin
        wait (irq);
        bfm.read(32'h20, d, r);
      end while ((d & 32'hA) != 32'hA);
      bfm.read(32'h30, d, r); chk("RES_SSTATUS", d, 0);
      bfm.read(32'h34, d, r); chk("RES_SID", d, 100 + f);
      bfm.read(32'h44, d, r); chk("RES_DSTATUS", d, (f == 5) ? 32'h0001_0000 : 0);
      bfm.read(32'h48, d, r); chk("RES_DSIZE", d, (f == 5) ? cap : size);
      n = d;
      bfm.read(32'h4C, d, r); chk("RES_DID", d, 200 + f);
      for (int i = 0; i < int'(n); i++)
        if (mem.mem[dst - MB + i] !== mem.mem[src - MB + i]) begin
          failures++; $display("frame %0d byte %0d differs", f, i); break;
        end
      checks++;
    end
    chk("memory protocol errors", merr, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
