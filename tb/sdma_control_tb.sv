// sdma_control_tb: the testbench plays the transfer engine. It programs
// requests through the registers (REQ_SADDR/SSIZE/SID, REQ_DADDR/DSIZE/DID)
// and checks the triples that appear on the request streams; it then pushes
// responses and checks STATUS, the interrupt, RES_* registers, the removal
// of a response when its id register is read, response ordering, the
// request queue's full flag (QDEPTH 4) and the information vector.
module sdma_control_tb;
  import axi_pkg::*;
  import rsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  info_vec_t info;
  dma_req_t sreq, dreq; dma_res_t sres, dres;
  logic sreq_valid, sreq_ready, sres_valid, sres_ready, dreq_valid, dreq_ready, dres_valid, dres_ready, irq;
  int checks = 0, failures = 0;

  sdma_control #(.QDEPTH(4)) dut (.clk, .rst_n, .cfg_req(req), .cfg_resp(resp), .info_vec(info),
    .sreq, .sreq_valid, .sreq_ready, .sres, .sres_valid, .sres_ready,
    .dreq, .dreq_valid, .dreq_ready, .dres, .dres_valid, .dres_ready, .irq);
  axil_bfm bfm (.clk, .req, .resp);
  always #5 clk = ~clk;

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask

  task automatic take_sreq(output dma_req_t r);
    @(negedge clk); sreq_ready = 1;
    do @(posedge clk); while (!sreq_valid);
    r = sreq; @(negedge clk); sreq_ready = 0;
  endtask
  task automatic take_dreq(output dma_req_t r);
    @(negedge clk); dreq_ready = 1;
    do @(posedge clk); while (!dreq_valid);
    r = dreq; @(negedge clk); dreq_ready = 0;
  endtask
  task automatic give_sres(input dma_res_t r);
    @(negedge clk); sres = r; sres_valid = 1;
    do @(posedge clk); while (!sres_ready);
    @(negedge clk); sres_valid = 0;
  endtask
  task automatic give_dres(input dma_res_t r);
    @(negedge clk); dres = r; dres_valid = 1;
    do @(posedge clk); while (!dres_ready);
    @(negedge clk); dres_valid = 0;
  endtask

  initial begin
    logic [31:0] d; logic [1:0] r; dma_req_t q;
    info = {8'h00, 248'h0123_4567_89AB_CDEF};
    sreq_ready = 0; dreq_ready = 0; sres_valid = 0; dres_valid = 0; sres = '0; dres = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    bfm.read(32'h0, d, r); chk("info word 0", d, 32'h89AB_CDEF);
    bfm.read(32'h20, d, r); chk("status idle", d, 0);
    // memory-to-device requests
    for (int i = 0; i < 3; i++) begin
      bfm.write(32'h24, 32'h0010_0000 + 32'h100 * i, r);
      bfm.write(32'h28, 32'd64 + i, r);
      bfm.write(32'h2C, 32'd1000 + i, r);
    end
    for (int i = 0; i < 3; i++) begin
      take_sreq(q);
      chk("sreq addr", q.addr, 32'h0010_0000 + 32'h100 * i);
      chk("sreq size", q.size, 32'd64 + i);
      chk("sreq id", q.id, 32'd1000 + i);
    end
    // queue full after QDEPTH requests
    for (int i = 0; i < 4; i++) bfm.write(32'h2C, 32'd2000 + i, r);
    bfm.read(32'h20, d, r); chk("s queue full", d & 32'h1, 1);
    for (int i = 0; i < 4; i++) begin take_sreq(q); chk("sreq id fifo", q.id, 32'd2000 + i); end
    // responses
    checks++; if (irq) begin failures++; $display("irq without response"); end
    give_sres('{status: 32'h2, size: 0, id: 32'd1000});
    give_sres('{status: 32'h0, size: 0, id: 32'd1001});
    repeat (3) @(posedge clk);
    checks++; if (!irq) begin failures++; $display("no irq with response"); end
    bfm.read(32'h20, d, r); chk("status s response", d & 32'h2, 2);
    bfm.read(32'h30, d, r); chk("RES_SSTATUS", d, 2);
    bfm.read(32'h34, d, r); chk("RES_SID", d, 1000);
    bfm.read(32'h30, d, r); chk("RES_SSTATUS 2", d, 0);
    bfm.read(32'h34, d, r); chk("RES_SID 2", d, 1001);
    bfm.read(32'h34, d, r); chk("RES_SID empty", d, 0);
    repeat (3) @(posedge clk);
    checks++; if (irq) begin failures++; $display("irq after responses read"); end
    // device-to-memory
    bfm.write(32'h38, 32'h0020_0000, r);
    bfm.write(32'h3C, 32'd4096, r);
    bfm.write(32'h40, 32'd77, r);
    take_dreq(q);
    chk("dreq addr", q.addr, 32'h0020_0000); chk("dreq size", q.size, 4096); chk("dreq id", q.id, 77);
    give_dres('{status: 32'h0001_0000, size: 32'd4096, id: 32'd77});
    repeat (3) @(posedge clk);
    checks++; if (!irq) begin failures++; $display("no irq with d response"); end
    bfm.read(32'h20, d, r); chk("status d response", d & 32'h8, 8);
    bfm.read(32'h44, d, r); chk("RES_DSTATUS", d, 32'h0001_0000);
    bfm.read(32'h48, d, r); chk("RES_DSIZE", d, 4096);
    bfm.read(32'h4C, d, r); chk("RES_DID", d, 77);
    bfm.read(32'h20, d, r); chk("status empty", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
