// fifo_if_tb: a fifo_if (DEPTH 16) whose output stream is looped straight
// back into its input. The test sends frames by register writes (KEEP with
// LAST, USER, DATA) and reads them back (STATUS, KEEP, USER, DATA), checking
// every field, the interrupt while data waits, the information vector in the
// first 32 bytes, an empty-queue read, and the full flag after 32 beats
// (16 held in each queue) without reads.
module fifo_if_tb;
  import axi_pkg::*;
  import rsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  axis_t lp; logic lp_ready, irq;
  info_vec_t info;
  int checks = 0, failures = 0;

  fifo_if #(.DEPTH(16)) dut (.clk, .rst_n, .cfg_req(req), .cfg_resp(resp), .info_vec(info),
    .m_axis(lp), .m_tready(lp_ready), .s_axis(lp), .s_tready(lp_ready), .irq);
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

  initial begin
    logic [31:0] d; logic [1:0] r;
    logic [31:0] data [$]; logic [3:0] keep [$]; bit last [$]; logic [31:0] user [$];
    for (int i = 0; i < 8; i++) info[32*i +: 32] = 32'h1000_0000 * i + 32'h00AB_CD00 + i;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 8; i++) begin bfm.read(32'(4*i), d, r); chk("info", d, info[32*i +: 32]); end
    bfm.read(32'h20, d, r); chk("status idle", d, 32'h2);
    bfm.read(32'h24, d, r); chk("empty read", d, 0);
    checks++; if (irq) begin failures++; $display("irq while empty"); end
    // frames of 1..5 beats
    for (int f = 0; f < 6; f++) begin
      int len = (f % 5) + 1;
      data.delete(); keep.delete(); last.delete(); user.delete();
      for (int b = 0; b < len; b++) begin
        data.push_back($urandom);
        keep.push_back(b == len - 1 ? 4'($urandom_range(1, 15)) : 4'hF);
        last.push_back(b == len - 1);
        user.push_back(b == 0 ? 32'(4 * len) : 32'(0));
        bfm.write(32'h28, 32'(last[b]) << 8 | 32'(keep[b]), r);
        bfm.write(32'h2C, user[b], r);
        bfm.write(32'h24, data[b], r); chk("write resp", 32'(r), 0);
      end
      repeat (4) @(posedge clk);
      checks++; if (!irq) begin failures++; $display("no irq with data waiting"); end
      for (int b = 0; b < len; b++) begin
        bfm.read(32'h20, d, r); chk("status rx", d & 32'hC, {28'b0, last[b], 1'b1, 2'b0});
        bfm.read(32'h28, d, r); chk("keep/last", d, 32'(last[b]) << 8 | 32'(keep[b]));
        bfm.read(32'h2C, d, r); chk("user", d, user[b]);
        bfm.read(32'h24, d, r); chk("data", d, data[b]);
      end
      repeat (3) @(posedge clk);
      checks++; if (irq) begin failures++; $display("irq after queue drained"); end
    end
    // fill both queues: 32 beats
    bfm.write(32'h28, 32'hF, r);
    for (int b = 0; b < 32; b++) bfm.write(32'h24, 32'(b), r);
    bfm.read(32'h20, d, r); chk("status full", d & 32'h5, 32'h5);
    for (int b = 0; b < 32; b++) begin bfm.read(32'h24, d, r); chk("drain", d, 32'(b)); end
    bfm.read(32'h20, d, r); chk("status empty again", d, 32'h2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
