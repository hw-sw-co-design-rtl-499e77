// rsoc_bridge_tb: a three-slot bridge in a configuration other than the
// default, so that sharing is exercised: slots 0 and 1 use SDMA Interfaces
// that share one non-coherent PS port, slot 2 uses a FIFO Interface, and
// the interrupts of slots 0 and 1 share line 0. Every accelerator is a
// plain stream loop (output stream tied to input stream). Checks: the RSoC
// Info region table (count, bases, types), accelerator configuration
// accesses reaching their slave at offset 0, information vectors read
// through the controllers, two overlapping SDMA transfers whose results are
// compared with the source bytes in memory, the shared interrupt, and a
// frame sent and received through the FIFO Interface.
module rsoc_bridge_tb;
  import axi_pkg::*;
  import plat_pkg::*;
  import rsoc_pkg::*;
  localparam logic [31:0] MB = 32'h0010_0000;
  localparam logic [31:0] BB = 32'h4000_0000;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  axi_req_t mreq [1]; axi_resp_t mresp [1];
  axil_req_t acc_cfg_req [3]; axil_resp_t acc_cfg_resp [3];
  info_vec_t acc_info [3];
  axis_t lp [3]; logic [2:0] lp_ready;
  logic [1:0] irq;
  logic [31:0] la [3]; int hits [3];
  int merr, nrd, nwr;
  int checks = 0, failures = 0;

  localparam ctrl_type_e CT [3] = '{CTRL_SDMA, CTRL_SDMA, CTRL_FIFO};
  localparam int unsigned PO [3] = '{0, 0, 1};
  localparam bit COH [1] = '{1'b0};
  localparam int unsigned IM [3] = '{0, 0, 1};
  rsoc_bridge #(.N_ACC(3), .N_MPORTS(1), .N_IRQ(2), .CTRL_TYPE(CT), .PORT_OF(PO),
                .PORT_COHERENT(COH), .IRQ_MAP(IM)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_resp(resp),
    .m_axi_req(mreq), .m_axi_resp(mresp), .irq,
    .acc_cfg_req, .acc_cfg_resp, .acc_info,
    .to_acc(lp), .to_acc_tready(lp_ready), .from_acc(lp), .from_acc_tready(lp_ready));
  axil_bfm bfm (.clk, .req, .resp);
  axi_mem_model #(.BASE(MB)) mem (.clk, .rst_n, .req(mreq[0]), .resp(mresp[0]), .errors(merr), .reads(nrd), .writes(nwr));
  for (genvar i = 0; i < 3; i++) begin : g_acc
    axil_slave_model #(.TAG(32'h5000_0000 + i)) u_cfg (.clk, .rst_n, .req(acc_cfg_req[i]), .resp(acc_cfg_resp[i]),
      .last_addr(la[i]), .hits(hits[i]));
    assign acc_info[i] = {8'h00, 216'h0, 32'hACC0_0000 + i};
  end
  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask

  // hand-computed layout: info, acc0..2, ctrl0..2, 4 KiB each
  function automatic logic [31:0] acc_base(int i);  return BB + 32'h1000 * (1 + i); endfunction
  function automatic logic [31:0] ctrl_base(int i); return BB + 32'h1000 * (4 + i); endfunction

  initial begin
    logic [31:0] d; logic [1:0] r;
    logic [31:0] src [2], dst [2], size [2];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    bfm.read(BB + 8, d, r); chk("REGIONS", d, 6);
    for (int k = 0; k < 6; k++) begin
      bfm.read(BB + 32'h14 + 16 * k, d, r); chk($sformatf("BASE %0d", k), d, BB + 32'h1000 * (1 + k));
    end
    bfm.read(BB + 32'h10 + 16 * 3, d, r); chk("INFO ctrl0", d, 32'h0002_0002);
    bfm.read(BB + 32'h10 + 16 * 5, d, r); chk("INFO ctrl2", d, 32'h0001_0202);
    for (int i = 0; i < 3; i++) begin
      bfm.write(acc_base(i) + 32'h8, 32'h77 + i, r);
      chk("acc cfg address", la[i], 32'h8);
      bfm.read(acc_base(i) + 32'h8, d, r); chk("acc cfg data", d, (32'h77 + i) ^ (32'h5000_0000 + i));
      bfm.read(ctrl_base(i), d, r); chk("info vector via controller", d, 32'hACC0_0000 + i);
    end
    // two SDMA transfers in flight together on the shared port
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 2; i++) begin
        src[i] = MB + 32'h2000 * i + 32'(4 * $urandom_range(0, 100));
        dst[i] = MB + 32'h8000 + 32'h2000 * i;
        size[i] = 32'($urandom_range(200, 2000));
        bfm.write(ctrl_base(i) + 32'h38, dst[i], r);
        bfm.write(ctrl_base(i) + 32'h3C, 32'h2000, r);
        bfm.write(ctrl_base(i) + 32'h40, 32'd10 * rep + i, r);
      end
      for (int i = 0; i < 2; i++) begin
        bfm.write(ctrl_base(i) + 32'h24, src[i], r);
        bfm.write(ctrl_base(i) + 32'h28, size[i], r);
        bfm.write(ctrl_base(i) + 32'h2C, 32'd10 * rep + i, r);
      end
      for (int i = 0; i < 2; i++) begin
        do begin
          wait (irq[0]);
          bfm.read(ctrl_base(i) + 32'h20, d, r);
        end while ((d & 32'hA) != 32'hA);
        bfm.read(ctrl_base(i) + 32'h34, d, r); chk("RES_SID", d, 10 * rep + i);
        bfm.read(ctrl_base(i) + 32'h44, d, r); chk("RES_DSTATUS", d, 0);
        bfm.read(ctrl_base(i) + 32'h48, d, r); chk("RES_DSIZE", d, size[i]);
        bfm.read(ctrl_base(i) + 32'h4C, d, r); chk("RES_DID", d, 10 * rep + i);
        checks++;
        for (int b = 0; b < int'(size[i]); b++)
          if (mem.mem[dst[i] - MB + b] !== mem.mem[src[i] - MB + b]) begin
            failures++; $display("slot %0d byte %0d differs", i, b); break;
          end
      end
      repeat (4) @(posedge clk);
      checks++; if (irq[0]) begin failures++; $display("irq 0 stuck"); end
    end
    // FIFO Interface frame of 3 beats, 10 bytes
    checks++; if (irq[1]) begin failures++; $display("irq 1 early"); end
    bfm.write(ctrl_base(2) + 32'h2C, 32'd10, r);
    bfm.write(ctrl_base(2) + 32'h28, 32'h00F, r);
    bfm.write(ctrl_base(2) + 32'h24, 32'h1111_1111, r);
    bfm.write(ctrl_base(2) + 32'h2C, 32'd0, r);
    bfm.write(ctrl_base(2) + 32'h24, 32'h2222_2222, r);
    bfm.write(ctrl_base(2) + 32'h28, 32'h103, r);
    bfm.write(ctrl_base(2) + 32'h24, 32'h0000_3333, r);
    repeat (4) @(posedge clk);
    checks++; if (!irq[1]) begin failures++; $display("irq 1 missing"); end
    bfm.read(ctrl_base(2) + 32'h2C, d, r); chk("rx user", d, 10);
    bfm.read(ctrl_base(2) + 32'h24, d, r); chk("rx beat 0", d, 32'h1111_1111);
    bfm.read(ctrl_base(2) + 32'h24, d, r); chk("rx beat 1", d, 32'h2222_2222);
    bfm.read(ctrl_base(2) + 32'h28, d, r); chk("rx keep/last", d, 32'h103);
    bfm.read(ctrl_base(2) + 32'h24, d, r); chk("rx beat 2", d, 32'h0000_3333);
    bfm.read(ctrl_base(2) + 32'h20, d, r); chk("fifo status", d, 32'h2);
    chk("memory protocol errors", merr, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
