// rsoc_workload_tb: runs the frame sizes the framework was evaluated with
// through the top, rsoc_system, at its default parameters:
//   testio  one 32-byte frame through each of Loop 0..3 (FIFO Interface on
//           slots 0 and 1, SDMA Interface on slots 2 and 3)
//   8 KB    one 8192-byte frame on each SDMA slot (HP0 and ACP)
//   1 MB    one 1 MiB frame on each SDMA slot
// Larger frames (several MB) differ only in size: the size registers are
// 32 bits wide and the engine never holds a whole frame.
// The processor is an AXI4-Lite master model; each data port has a 2 MiB +
// 4 KiB behavioural memory without random stalls, so the cycle counts it
// prints are those of the bridge itself. Every copied byte is compared with
// its source, and the loopback FRAMES/BEATS registers with the frames sent.
// The source description gives no hardware throughput (its measured rate
// is limited by the software copy), so the bytes per cycle are printed
// for information, and checked only against the one-word-per-cycle limit
// of a 32-bit stream.
module rsoc_workload_tb;
  import axi_pkg::*;
  import plat_pkg::*;
  import rsoc_pkg::*;
  localparam logic [31:0] MB  = 32'h0010_0000;
  localparam logic [31:0] BB  = 32'h4000_0000;
  localparam int          MEM = 32'h0020_1000;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  axi_req_t mreq [2]; axi_resp_t mresp [2];
  logic [3:0] irq;
  int e0, r0, w0, e1, r1, w1;
  int checks = 0, failures = 0;
  axis_t flt_s, flt_m;
  logic flt_s_tready, flt_sof, flt_cap_valid, flt_cmd_ready;
  logic [31:0] flt_cap_data;

  rsoc_system dut (.clk, .rst_n, .gp_req(req), .gp_resp(resp), .m_axi_req(mreq), .m_axi_resp(mresp), .irq,
                   .flt_s_axis(flt_s), .flt_s_tready, .flt_m_axis(flt_m), .flt_m_tready(1'b1), .flt_sof,
                   .flt_cap_data, .flt_cap_valid, .flt_cap_ready(1'b1),
                   .flt_cmd_valid(1'b0), .flt_cmd_discard(1'b0), .flt_cmd_ready);
  axil_bfm bfm (.clk, .req, .resp);
  axi_mem_model #(.MEM_BYTES(MEM), .BASE(MB), .STALL(1'b0)) hp0 (.clk, .rst_n, .req(mreq[0]), .resp(mresp[0]),
                                                              .errors(e0), .reads(r0), .writes(w0));
  axi_mem_model #(.MEM_BYTES(MEM), .BASE(MB), .STALL(1'b0)) acp (.clk, .rst_n, .req(mreq[1]), .resp(mresp[1]),
                                                              .errors(e1), .reads(r1), .writes(w1));
  always #5 clk = ~clk;

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_testio = 0, n_8k = 0, n_1m = 0;
  int exp_frames [4] = '{0, 0, 0, 0}, exp_beats [4] = '{0, 0, 0, 0};

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask
  function automatic logic [31:0] acc_base(int i);  return BB + 32'h1000 * (1 + i); endfunction
  function automatic logic [31:0] ctrl_base(int i); return BB + 32'h1000 * (5 + i); endfunction

  // one frame through FIFO Interface slot s, nbytes a multiple of 4
  task automatic fifo_frame(input int s, input int nbytes);
    logic [31:0] d; logic [1:0] r; logic [31:0] w [$];
    int nb; nb = nbytes / 4;
    for (int b = 0; b < nb; b++) w.push_back($urandom);
    bfm.write(ctrl_base(s) + 32'h2C, 32'(nbytes), r);
    bfm.write(ctrl_base(s) + 32'h28, 32'h0000_000F, r);
    for (int b = 0; b < nb; b++) begin
      if (b == 1) bfm.write(ctrl_base(s) + 32'h2C, 32'h0, r);
      if (b == nb - 1) bfm.write(ctrl_base(s) + 32'h28, 32'h0000_010F, r);
      bfm.write(ctrl_base(s) + 32'h24, w[b], r);
    end
    wait (irq[s]);
    bfm.read(ctrl_base(s) + 32'h2C, d, r); chk("fifo rx size", d, nbytes);
    for (int b = 0; b < nb; b++) begin
      bfm.read(ctrl_base(s) + 32'h28, d, r); chk("fifo rx keep/last", d, (b == nb - 1) ? 32'h10F : 32'h00F);
      bfm.read(ctrl_base(s) + 32'h24, d, r); chk("fifo rx data", d, w[b]);
    end
    exp_frames[s]++; exp_beats[s] += nb;
  endtask

  // one frame of nbytes through SDMA slot s (memory port s-2): fill the
  // source with random bytes, request both directions, wait for both
  // responses, compare, and return the cycles from request to response
  task automatic sdma_frame(input int s, input int nbytes, output longint cycles);
    logic [31:0] d; logic [1:0] r;
    logic [31:0] src, dst;
    longint t0;
    int bad;
    src = MB + 32'h40;
    dst = MB + 32'h0010_0000 + 32'h80;
    for (int b = 0; b < nbytes; b++)
      if (s == 2) hp0.mem[src - MB + b] = 8'($urandom); else acp.mem[src - MB + b] = 8'($urandom);
    bfm.write(ctrl_base(s) + 32'h38, dst, r);
    bfm.write(ctrl_base(s) + 32'h3C, 32'(nbytes), r);
    bfm.write(ctrl_base(s) + 32'h40, 32'h77, r);
    t0 = $time / 10;
    bfm.write(ctrl_base(s) + 32'h24, src, r);
    bfm.write(ctrl_base(s) + 32'h28, 32'(nbytes), r);
    bfm.write(ctrl_base(s) + 32'h2C, 32'h55, r);
    do begin
      wait (irq[s]);
      bfm.read(ctrl_base(s) + 32'h20, d, r);
    end while ((d & 32'hA) != 32'hA);
    cycles = $time / 10 - t0;
    bfm.read(ctrl_base(s) + 32'h30, d, r); chk("RES_SSTATUS", d, 0);
    bfm.read(ctrl_base(s) + 32'h34, d, r); chk("RES_SID", d, 32'h55);
    bfm.read(ctrl_base(s) + 32'h44, d, r); chk("RES_DSTATUS", d, 0);
    bfm.read(ctrl_base(s) + 32'h48, d, r); chk("RES_DSIZE", d, nbytes);
    bfm.read(ctrl_base(s) + 32'h4C, d, r); chk("RES_DID", d, 32'h77);
    bad = 0;
    for (int b = 0; b < nbytes; b++)
      if (s == 2 ? hp0.mem[dst - MB + b] !== hp0.mem[src - MB + b]
                 : acp.mem[dst - MB + b] !== acp.mem[src - MB + b]) bad++;
    chk($sformatf("slot %0d %0d-byte frame: differing bytes", s, nbytes), bad, 0);
    // a 32-bit stream moves at most 4 bytes per cycle
    checks++;
    if (cycles < longint'(nbytes / 4)) begin
      failures++; $display("slot %0d: %0d bytes in %0d cycles is faster than possible", s, nbytes, cycles);
    end
    $display("slot %0d: %0d bytes in %0d cycles (%0.2f bytes/cycle)", s, nbytes, cycles,
             real'(nbytes) / real'(cycles));
    exp_frames[s]++; exp_beats[s] += nbytes / 4;
  endtask

  initial begin
    logic [31:0] d; logic [1:0] r; longint c;
    flt_s = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // testio: 32 bytes through every loop
    fifo_frame(0, 32); n_testio++;
    fifo_frame(1, 32); n_testio++;
    sdma_frame(2, 32, c); n_testio++;
    sdma_frame(3, 32, c); n_testio++;
    // 8 KB and 1 MB frames on both memory ports
    sdma_frame(2, 8192, c); n_8k++;
    sdma_frame(3, 8192, c); n_8k++;
    sdma_frame(2, 1 << 20, c); n_1m++;
    sdma_frame(3, 1 << 20, c); n_1m++;
    for (int s = 0; s < 4; s++) begin
      bfm.read(acc_base(s), d, r);     chk($sformatf("loop %0d FRAMES", s), d, exp_frames[s]);
      bfm.read(acc_base(s) + 4, d, r); chk($sformatf("loop %0d BEATS", s), d, exp_beats[s]);
    end
    chk("HP0 protocol errors", e0, 0);
    chk("ACP protocol errors", e1, 0);
    $display("workloads: testio=%0d 8k=%0d 1m=%0d", n_testio, n_8k, n_1m);
    checks++; if (n_testio != 4 || n_8k != 2 || n_1m != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
