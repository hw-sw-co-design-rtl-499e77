// sdma_control: register side of the Simple DMA Interface. Turns processor
// register accesses into request and response streams for sdma_engine, so
// that the engine (platform specific) and the software interface are
// independent of each other.
// Register map (byte offsets):
//   0x00-0x1C   information vector of the attached accelerator (read-only)
//   0x20 STATUS      [0] s-request queue full   [1] s-response available
//                    [2] d-request queue full   [3] d-response available
//   0x24 REQ_SADDR   memory-to-device request: source address
//   0x28 REQ_SSIZE   memory-to-device request: frame size in bytes
//   0x2C REQ_SID     memory-to-device request: id; writing it queues the
//                    triple (address, size, id)
//   0x30 RES_SSTATUS head s-response: [1:0] AXI RRESP of the transfer
//   0x34 RES_SID     head s-response: id; reading it removes the response
//   0x38 REQ_DADDR   device-to-memory request: buffer address
//   0x3C REQ_DSIZE   device-to-memory request: buffer size in bytes
//   0x40 REQ_DID     device-to-memory request: id; writing it queues it
//   0x44 RES_DSTATUS head d-response: [1:0] AXI BRESP, [16] frame truncated
//   0x48 RES_DSIZE   head d-response: bytes written to memory
//   0x4C RES_DID     head d-response: id; reading it removes the response
// Requests and responses are strictly ordered through sync_fifo queues of
// QDEPTH entries. A write of REQ_xID waits while its queue is full. Reading
// a response register with no response pending returns 0. irq is high while
// any response is pending (change_detector, one cycle of delay).
// Register names and their meaning follow the framework; the offsets, the
// STATUS bits and "reading the id removes the response" are this design's.
module sdma_control
  import axi_pkg::*;
  import rsoc_pkg::*;
#(
  parameter int unsigned QDEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   cfg_req,
  output axil_resp_t  cfg_resp,
  input  info_vec_t   info_vec,
  // memory-to-device (s) and device-to-memory (d) request/response streams
  output dma_req_t    sreq,
  output logic        sreq_valid,
  input  logic        sreq_ready,
  input  dma_res_t    sres,
  input  logic        sres_valid,
  output logic        sres_ready,
  output dma_req_t    dreq,
  output logic        dreq_valid,
  input  logic        dreq_ready,
  input  dma_res_t    dres,
  input  logic        dres_valid,
  output logic        dres_ready,
  output logic        irq
);
  localparam int unsigned NREGS = SDMA_NREGS;

  logic [NREGS-1:0]             wr_req, rd_req, wr_req_ok;
  logic [DATA_W-1:0]            wr_data;
  logic [STRB_W-1:0]            wr_strb;
  logic                         wr_ack, rd_ack;
  logic [NREGS-1:0][DATA_W-1:0] rd_data;

  logic [31:0] saddr, ssize, daddr, dsize;
  dma_req_t    sreq_in, dreq_in;
  logic        sq_ready, dq_ready;
  dma_res_t    sres_h, dres_h;
  logic        sres_hv, dres_hv;

  axi_lite_endpoint #(.NREGS(NREGS)) u_ep (
    .clk, .rst_n, .s_req(cfg_req), .s_resp(cfg_resp),
    .wr_req, .wr_data, .wr_strb, .wr_ack,
    .rd_req, .rd_data, .rd_ack);

  always_comb begin
    wr_req_ok = wr_req;
    wr_req_ok[SDMA_REQ_SID] = wr_req[SDMA_REQ_SID] && sq_ready;
    wr_req_ok[SDMA_REQ_DID] = wr_req[SDMA_REQ_DID] && dq_ready;
  end
  req_ack #(.N(NREGS)) u_wack (.clk, .rst_n, .req(wr_req_ok), .ack(wr_ack));
  req_ack #(.N(NREGS)) u_rack (.clk, .rst_n, .req(rd_req),    .ack(rd_ack));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      saddr <= '0; ssize <= '0; daddr <= '0; dsize <= '0;
    end else if (wr_ack) begin
      if (wr_req[SDMA_REQ_SADDR]) saddr <= misc_pkg::apply_be(saddr, wr_data, wr_strb);
      if (wr_req[SDMA_REQ_SSIZE]) ssize <= misc_pkg::apply_be(ssize, wr_data, wr_strb);
      if (wr_req[SDMA_REQ_DADDR]) daddr <= misc_pkg::apply_be(daddr, wr_data, wr_strb);
      if (wr_req[SDMA_REQ_DSIZE]) dsize <= misc_pkg::apply_be(dsize, wr_data, wr_strb);
    end
  end

  assign sreq_in = '{addr: saddr, size: ssize, id: wr_data};
  assign dreq_in = '{addr: daddr, size: dsize, id: wr_data};

  sync_fifo #(.T(dma_req_t), .DEPTH(QDEPTH)) u_sreq_q (
    .clk, .rst_n,
    .in_data(sreq_in), .in_valid(wr_req[SDMA_REQ_SID] && wr_ack), .in_ready(sq_ready),
    .out_data(sreq), .out_valid(sreq_valid), .out_ready(sreq_ready), .count());
  sync_fifo #(.T(dma_req_t), .DEPTH(QDEPTH)) u_dreq_q (
    .clk, .rst_n,
    .in_data(dreq_in), .in_valid(wr_req[SDMA_REQ_DID] && wr_ack), .in_ready(dq_ready),
    .out_data(dreq), .out_valid(dreq_valid), .out_ready(dreq_ready), .count());
  sync_fifo #(.T(dma_res_t), .DEPTH(QDEPTH)) u_sres_q (
    .clk, .rst_n,
    .in_data(sres), .in_valid(sres_valid), .in_ready(sres_ready),
    .out_data(sres_h), .out_valid(sres_hv),
    .out_ready(rd_req[SDMA_RES_SID] && rd_ack), .count());
  sync_fifo #(.T(dma_res_t), .DEPTH(QDEPTH)) u_dres_q (
    .clk, .rst_n,
    .in_data(dres), .in_valid(dres_valid), .in_ready(dres_ready),
    .out_data(dres_h), .out_valid(dres_hv),
    .out_ready(rd_req[SDMA_RES_DID] && rd_ack), .count());

  change_detector #(.W(2), .IDLE(2'b00)) u_irq (
    .clk, .rst_n, .sig({dres_hv, sres_hv}), .event_o(irq));

  always_comb begin
    rd_data = '0;
    for (int unsigned w = 0; w < INFO_WORDS; w++)
      rd_data[w] = info_vec[32*w +: 32];
    rd_data[SDMA_STATUS]      = {28'b0, dres_hv, !dq_ready, sres_hv, !sq_ready};
    rd_data[SDMA_REQ_SADDR]   = saddr;
    rd_data[SDMA_REQ_SSIZE]   = ssize;
    rd_data[SDMA_REQ_DADDR]   = daddr;
    rd_data[SDMA_REQ_DSIZE]   = dsize;
    rd_data[SDMA_RES_SSTATUS] = sres_hv ? sres_h.status : '0;
    rd_data[SDMA_RES_SID]     = sres_hv ? sres_h.id     : '0;
    rd_data[SDMA_RES_DSTATUS] = dres_hv ? dres_h.status : '0;
    rd_data[SDMA_RES_DSIZE]   = dres_hv ? dres_h.size   : '0;
    rd_data[SDMA_RES_DID]     = dres_hv ? dres_h.id     : '0;
  end
endmodule
