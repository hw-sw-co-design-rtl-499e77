// rsoc_system_tb: end-to-end test of the whole system at its default
// parameters: the four-slot bridge with a Loopback Accelerator in every
// slot, slots 0 and 1 on FIFO Interfaces, slot 2 on an SDMA Interface
// reaching memory through the non-coherent port 0 (HP-style) and slot 3
// through the coherent port 1 (ACP-style). The testbench plays the
// processor with an AXI4-Lite master and gives each data port its own
// behavioural memory. It runs what a driver does:
//   probe    NEG/VERSION check, then a walk over the RSoC Info regions
//   fifo     frames written and read back beat by beat on slots 0 and 1
//   full     the FIFO Interface's TX queue filled until STATUS reports full
//   sdma     frames copied memory -> accelerator -> memory on slots 2 and 3,
//            some crossing a 4 KiB boundary, several queued at once
//   trunc    a frame larger than its destination buffer (truncation flag)
//   irq      each of the four interrupt lines seen high
//   attrs    port 1 transactions coherent (USER=1, CACHE[1]=1), port 0 not
//   counters the loopback FRAMES/BEATS registers against the frames sent
//   filter   frames through the stream frame filter: the first word of each
//            is captured, odd ones are discarded, even ones passed; the
//            output is compared beat by beat with the passed frames, and
//            start-of-frame marks, capture stalls and hold-buffer back
//            pressure are counted
// Each mechanism is counted; one that never happened is a failure.
module rsoc_system_tb;
  import axi_pkg::*;
  import plat_pkg::*;
  import rsoc_pkg::*;
  localparam logic [31:0] MB = 32'h0010_0000;
  localparam logic [31:0] BB = 32'h4000_0000;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  axi_req_t mreq [2]; axi_resp_t mresp [2];
  logic [3:0] irq;
  int e0, r0, w0, e1, r1, w1;
  int checks = 0, failures = 0;

  axis_t flt_s, flt_m;
  logic flt_s_tready, flt_m_tready, flt_sof, flt_cap_valid, flt_cap_ready;
  logic flt_cmd_valid, flt_cmd_discard, flt_cmd_ready;
  logic [31:0] flt_cap_data;

  rsoc_system dut (.clk, .rst_n, .gp_req(req), .gp_resp(resp), .m_axi_req(mreq), .m_axi_resp(mresp), .irq,
                   .flt_s_axis(flt_s), .flt_s_tready, .flt_m_axis(flt_m), .flt_m_tready, .flt_sof,
                   .flt_cap_data, .flt_cap_valid, .flt_cap_ready,
                   .flt_cmd_valid, .flt_cmd_discard, .flt_cmd_ready);
  axil_bfm bfm (.clk, .req, .resp);
  axi_mem_model #(.BASE(MB)) hp0 (.clk, .rst_n, .req(mreq[0]), .resp(mresp[0]), .errors(e0), .reads(r0), .writes(w0));
  axi_mem_model #(.BASE(MB)) acp (.clk, .rst_n, .req(mreq[1]), .resp(mresp[1]), .errors(e1), .reads(r1), .writes(w1));
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_probe = 0, n_region = 0, n_fifo_frame = 0, n_tx_full = 0, n_sdma_frame = 0, n_4k = 0, n_queued = 0,
      n_trunc = 0, n_counters = 0;
  int n_irq [4] = '{0, 0, 0, 0};
  int n_coh = 0, n_noncoh = 0;
  bit attrs_ok = 1;
  int n_flt_sof = 0, n_flt_cap = 0, n_flt_cstall = 0, n_flt_hold = 0, n_flt_pass = 0, n_flt_drop = 0,
      n_flt_out = 0;
  always @(posedge clk) begin
    for (int l = 0; l < 4; l++) if (irq[l]) n_irq[l]++;
    if (mreq[1].ar_valid && mresp[1].ar_ready) begin
      n_coh++; if (!mreq[1].ar_user || !mreq[1].ar_cache[1]) attrs_ok = 0;
    end
    if (mreq[1].aw_valid && mresp[1].aw_ready) begin
      n_coh++; if (!mreq[1].aw_user || !mreq[1].aw_cache[1]) attrs_ok = 0;
    end
    if (mreq[0].ar_valid && mresp[0].ar_ready) begin
      n_noncoh++; if (mreq[0].ar_user) attrs_ok = 0;
    end
    if (mreq[0].aw_valid && mresp[0].aw_ready) begin
      n_noncoh++; if (mreq[0].aw_user) attrs_ok = 0;
    end
  end

  // Frame filter: NF frames, first word odd = discard. Frames 0..2 are fixed
  // (pass, drop, 24-beat pass that overfills the 16-beat hold buffer while
  // its command is pending), the rest random. Drive at negedge, decide the
  // handshake 1 time unit later, when everything has settled.
  localparam int NF = 24;
  task automatic filter_test();
    int len [NF];
    logic [31:0] w [NF][32];
    logic [31:0] expq [$];
    bit exp_last [$];
    int total_pass = 0, pass_frames = 0;
    for (int f = 0; f < NF; f++) begin
      len[f] = (f == 2) ? 24 : (f == 3) ? 1 : 1 + $urandom % 20;
      for (int b = 0; b < len[f]; b++) w[f][b] = $urandom;
      if (f == 0 || f == 2) w[f][0][0] = 1'b0;
      if (f == 1) w[f][0][0] = 1'b1;
      if (!w[f][0][0]) pass_frames++;
      if (!w[f][0][0])
        for (int b = 0; b < len[f]; b++) begin
          expq.push_back(w[f][b]); exp_last.push_back(b == len[f] - 1); total_pass++;
        end
    end
    fork
      // producer
      for (int f = 0; f < NF; f++)
        for (int b = 0; b < len[f]; b++) begin
          if ($urandom % 4 == 0) begin @(negedge clk); flt_s.tvalid = 1'b0; end
          @(negedge clk);
          flt_s.tdata = w[f][b]; flt_s.tkeep = '1; flt_s.tlast = (b == len[f] - 1);
          flt_s.tuser = '0; flt_s.tvalid = 1'b1;
          #1;
          while (!flt_s_tready) begin
            if (flt_cap_valid && !flt_cap_ready && b == 0) n_flt_cstall++;
            else n_flt_hold++;
            @(negedge clk); #1;
          end
          checks++;
          if (flt_sof !== (b == 0)) begin
            failures++; $display("filter: sof=%b on beat %0d of frame %0d", flt_sof, b, f);
          end
          if (flt_sof) n_flt_sof++;
          @(posedge clk);
          if (f == NF - 1 && b == len[f] - 1) begin @(negedge clk); flt_s.tvalid = 1'b0; end
        end
      // decision logic: take the capture, then command pass or discard
      for (int f = 0; f < NF; f++) begin
        logic [31:0] cap;
        do begin @(negedge clk); #1; end while (!flt_cap_valid);
        repeat (1 + $urandom % 30) @(negedge clk);
        flt_cap_ready = 1'b1; #1;
        cap = flt_cap_data;
        chk("filter capture", cap, w[f][0]);
        n_flt_cap++;
        @(posedge clk); @(negedge clk);
        flt_cap_ready = 1'b0;
        flt_cmd_valid = 1'b1; flt_cmd_discard = cap[0]; #1;
        while (!flt_cmd_ready) begin @(negedge clk); #1; end
        if (flt_cmd_discard) n_flt_drop++; else n_flt_pass++;
        @(posedge clk); @(negedge clk);
        flt_cmd_valid = 1'b0;
      end
      // sink with random back pressure
      while (n_flt_out < total_pass) begin
        @(negedge clk); flt_m_tready = ($urandom % 4 != 0); #1;
        if (flt_m.tvalid && flt_m_tready) begin
          chk("filter out data", flt_m.tdata, expq[n_flt_out]);
          chk("filter out last", 32'(flt_m.tlast), 32'(exp_last[n_flt_out]));
          n_flt_out++;
        end
        @(posedge clk);
      end
    join
    // nothing more may come out
    @(negedge clk); flt_m_tready = 1'b1;
    repeat (40) begin
      #1; checks++;
      if (flt_m.tvalid) begin failures++; $display("filter: extra output beat"); end
      @(negedge clk);
    end
    chk("filter frames commanded", n_flt_pass + n_flt_drop, NF);
    chk("filter frames passed", n_flt_pass, pass_frames);
  endtask

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask
  function automatic logic [31:0] acc_base(int i);  return BB + 32'h1000 * (1 + i); endfunction
  function automatic logic [31:0] ctrl_base(int i); return BB + 32'h1000 * (5 + i); endfunction

  // expected frames and beats seen by each loopback unit
  int exp_frames [4], exp_beats [4];

  // send one frame of nbytes through FIFO Interface slot s and read it back
  task automatic fifo_frame(input int s, input int nbytes);
    logic [31:0] d; logic [1:0] r; int nb; logic [31:0] w [$];
    nb = (nbytes + 3) / 4;
    for (int b = 0; b < nb; b++) w.push_back($urandom);
    for (int b = 0; b < nb; b++) begin
      int left;
      left = nbytes - 4 * b;
      if (b < 2 || b == nb - 1) begin
        bfm.write(ctrl_base(s) + 32'h2C, (b == 0) ? 32'(nbytes) : 32'h0, r);
        bfm.write(ctrl_base(s) + 32'h28,
                  {23'h0, b == nb - 1, 4'h0, (left >= 4) ? 4'hF : 4'((1 << left) - 1)}, r);
      end
      bfm.write(ctrl_base(s) + 32'h24, w[b], r);
    end
    wait (irq[s]);
    for (int b = 0; b < nb; b++) begin
      int left;
      left = nbytes - 4 * b;
      if (b == 0) begin bfm.read(ctrl_base(s) + 32'h2C, d, r); chk("fifo rx size", d, nbytes); end
      bfm.read(ctrl_base(s) + 32'h28, d, r);
      chk("fifo rx keep/last", d, {23'h0, b == nb - 1, 4'h0, (left >= 4) ? 4'hF : 4'((1 << left) - 1)});
      bfm.read(ctrl_base(s) + 32'h24, d, r); chk("fifo rx data", d, w[b]);
    end
    exp_frames[s]++; exp_beats[s] += nb;
    n_fifo_frame++;
  endtask

  function automatic logic [31:0] mem_word(int port, logic [31:0] a);
    return port == 0 ? {hp0.mem[a-MB+3], hp0.mem[a-MB+2], hp0.mem[a-MB+1], hp0.mem[a-MB]}
                     : {acp.mem[a-MB+3], acp.mem[a-MB+2], acp.mem[a-MB+1], acp.mem[a-MB]};
  endfunction
  function automatic logic [7:0] mem_byte(int port, logic [31:0] a);
    return port == 0 ? hp0.mem[a - MB] : acp.mem[a - MB];
  endfunction

  // queue nf SDMA frames on slot s (port s-2), then collect all responses
  task automatic sdma_frames(input int s, input int nf, input bit trunc_last);
    logic [31:0] d; logic [1:0] r;
    logic [31:0] src [8], dst [8], size [8], cap [8];
    int port; port = s - 2;
    for (int f = 0; f < nf; f++) begin
      src[f]  = MB + 32'h1000 * f + 32'hC00 + 32'(4 * $urandom_range(0, 100));
      dst[f]  = MB + 32'h8000 + 32'h1000 * f + 32'(4 * $urandom_range(0, 200));
      size[f] = 32'($urandom_range(16, 2000));
      cap[f]  = (trunc_last && f == nf - 1) ? ((size[f] / 2) & ~32'h3) + 32'h4 : 32'd3000;
      if ((src[f] & 32'hFFFF_F000) != ((src[f] + size[f] - 1) & 32'hFFFF_F000)) n_4k++;
      bfm.write(ctrl_base(s) + 32'h38, dst[f], r);
      bfm.write(ctrl_base(s) + 32'h3C, cap[f], r);
      bfm.write(ctrl_base(s) + 32'h40, 32'h100 * s + f, r);
    end
    for (int f = 0; f < nf; f++) begin
      bfm.write(ctrl_base(s) + 32'h24, src[f], r);
      bfm.write(ctrl_base(s) + 32'h28, size[f], r);
      bfm.write(ctrl_base(s) + 32'h2C, 32'h200 * s + f, r);
    end
    if (nf > 1) n_queued++;
    for (int f = 0; f < nf; f++) begin
      logic [31:0] got;
      bit tr;
      tr = size[f] > cap[f];
      do begin
        wait (irq[s]);
        bfm.read(ctrl_base(s) + 32'h20, d, r);
      end while ((d & 32'hA) != 32'hA);
      bfm.read(ctrl_base(s) + 32'h30, d, r); chk("RES_SSTATUS", d, 0);
      bfm.read(ctrl_base(s) + 32'h34, d, r); chk("RES_SID", d, 32'h200 * s + f);
      bfm.read(ctrl_base(s) + 32'h44, d, r); chk("RES_DSTATUS", d, tr ? 32'h0001_0000 : 0);
      bfm.read(ctrl_base(s) + 32'h48, d, r); chk("RES_DSIZE", d, tr ? cap[f] : size[f]);
      got = d;
      bfm.read(ctrl_base(s) + 32'h4C, d, r); chk("RES_DID", d, 32'h100 * s + f);
      checks++;
      for (int b = 0; b < int'(got); b++)
        if (mem_byte(port, dst[f] + b) !== mem_byte(port, src[f] + b)) begin
          failures++; $display("slot %0d frame %0d byte %0d differs", s, f, b); break;
        end
      if (tr) n_trunc++;
      exp_frames[s]++; exp_beats[s] += (int'(size[f]) + 3) / 4;
      n_sdma_frame++;
    end
  endtask

  initial begin
    logic [31:0] d; logic [1:0] r;
    flt_s = '0; flt_m_tready = 1'b0; flt_cap_ready = 1'b0;
    flt_cmd_valid = 1'b0; flt_cmd_discard = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    filter_test();
    // probe
    bfm.write(BB, 32'hCAFE_0000, r);
    bfm.read(BB, d, r);     chk("NEG", d, 32'h3501_FFFF);
    bfm.read(BB + 4, d, r); chk("VERSION", d, 32'h1);
    n_probe++;
    bfm.read(BB + 8, d, r); chk("REGIONS", d, 8);
    for (int k = 0; k < 8; k++) begin
      bfm.read(BB + 32'h10 + 16 * k, d, r);
      chk("region INFO", d, (k < 4) ? {16'h0, 8'(k), 8'h01}
                                    : {8'h0, (k - 4 < 2) ? 8'h01 : 8'h02, 8'(k - 4), 8'h02});
      bfm.read(BB + 32'h14 + 16 * k, d, r); chk("region BASE", d, BB + 32'h1000 * (1 + k));
      bfm.read(BB + 32'h18 + 16 * k, d, r); chk("region SIZE", d, 32'h1000);
      n_region++;
    end
    // information vectors of the accelerators, read through the controllers
    for (int s = 0; s < 4; s++) begin
      bfm.read(ctrl_base(s), d, r);     chk("info vector word 0", d, {"OOP", 8'(8'h30 + s)});
      bfm.read(ctrl_base(s) + 4, d, r); chk("info vector word 1", d, 32'h4C);
      bfm.read(ctrl_base(s) + 28, d, r); chk("info vector last byte", d[31:24], 0);
    end
    // FIFO Interface frames
    for (int t = 0; t < 6; t++) begin
      fifo_frame(0, $urandom_range(1, 40));
      fifo_frame(1, $urandom_range(1, 40));
    end
    fifo_frame(0, 32);
    // TX queue full: keep writing beats of one long frame on slot 1 until
    // STATUS says the queue is full, then drain all of it
    begin
      int sent, got_n; bit last;
      sent = 0;
      bfm.write(ctrl_base(1) + 32'h2C, 32'd400, r);
      bfm.write(ctrl_base(1) + 32'h28, 32'h00F, r);
      do begin
        bfm.write(ctrl_base(1) + 32'h24, 32'(sent), r);
        sent++;
        bfm.read(ctrl_base(1) + 32'h20, d, r);
      end while (!d[0] && sent < 99);
      if (d[0]) n_tx_full++;
      chk("beats accepted before full (TX 16 + loop 4 + RX 16)", sent, 36);
      // free one place along the loop before the closing beat
      bfm.read(ctrl_base(1) + 32'h24, d, r); chk("full-test data", d, 0);
      got_n = 1;
      bfm.write(ctrl_base(1) + 32'h28, 32'h10F, r);
      bfm.write(ctrl_base(1) + 32'h24, 32'(sent), r);
      sent++;
      do begin
        bfm.read(ctrl_base(1) + 32'h20, d, r);
        if (d[2]) begin
          last = d[3];
          bfm.read(ctrl_base(1) + 32'h24, d, r); chk("full-test data", d, got_n);
          got_n++;
        end
      end while (!(d[2] == 0 && last) && got_n < 200);
      chk("full-test beats", got_n, sent);
      exp_frames[1]++; exp_beats[1] += sent;
    end
    // SDMA frames
    sdma_frames(2, 1, 0);
    sdma_frames(3, 1, 0);
    sdma_frames(2, 4, 1);
    sdma_frames(3, 4, 1);
    sdma_frames(2, 2, 0);
    // loopback counters
    for (int s = 0; s < 4; s++) begin
      bfm.read(acc_base(s), d, r);     chk($sformatf("loop %0d FRAMES", s), d, exp_frames[s]);
      bfm.read(acc_base(s) + 4, d, r); chk($sformatf("loop %0d BEATS", s), d, exp_beats[s]);
      n_counters++;
    end
    bfm.write(acc_base(0), 0, r);
    bfm.read(acc_base(0), d, r); chk("counters cleared", d, 0);
    repeat (5) @(posedge clk);
    chk("HP0 protocol errors", e0, 0);
    chk("ACP protocol errors", e1, 0);
    checks++; if (!attrs_ok) begin failures++; $display("port attributes wrong"); end

    $display("mechanisms: probe=%0d regions=%0d fifo_frames=%0d tx_full=%0d sdma_frames=%0d queued=%0d",
             n_probe, n_region, n_fifo_frame, n_tx_full, n_sdma_frame, n_queued);
    $display("            4k_split=%0d truncated=%0d counters=%0d irq_cycles=%0d/%0d/%0d/%0d coherent=%0d noncoherent=%0d",
             n_4k, n_trunc, n_counters, n_irq[0], n_irq[1], n_irq[2], n_irq[3], n_coh, n_noncoh);
    $display("            filter: sof=%0d captures=%0d capture_stalls=%0d hold_stalls=%0d passed=%0d dropped=%0d",
             n_flt_sof, n_flt_cap, n_flt_cstall, n_flt_hold, n_flt_pass, n_flt_drop);
    begin
      int m [20];
      m = '{n_probe, n_region, n_fifo_frame, n_tx_full, n_sdma_frame, n_queued, n_4k, n_trunc,
            n_counters, n_irq[0], n_irq[1], n_irq[2], n_irq[3], n_coh,
            n_flt_sof, n_flt_cap, n_flt_cstall, n_flt_hold, n_flt_pass, n_flt_drop};
      for (int i = 0; i < 20; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
      checks++; if (n_noncoh == 0) begin failures++; $display("no non-coherent traffic"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
