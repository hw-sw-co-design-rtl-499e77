// sdma_if: Simple DMA Interface controller. sdma_control (the register side
// the software driver talks to) joined to sdma_engine (the AXI master that
// moves frames between memory and the accelerator) by the request and
// response streams. See those two modules for the register map and the
// transfer rules. irq signals that a transfer response is waiting.
module sdma_if
  import axi_pkg::*;
  import rsoc_pkg::*;
#(
  parameter int unsigned     QDEPTH = 4,
  parameter int unsigned     BURST  = MAX_BURST,
  parameter logic [ID_W-1:0] AXI_ID = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   cfg_req,
  output axil_resp_t  cfg_resp,
  input  info_vec_t   info_vec,
  output axis_t       m_axis,      // towards the accelerator
  input  logic        m_tready,
  input  axis_t       s_axis,      // from the accelerator
  output logic        s_tready,
  output axi_req_t    m_axi_req,   // to a PS slave port (HP or ACP)
  input  axi_resp_t   m_axi_resp,
  output logic        irq
);
  dma_req_t sreq, dreq;
  dma_res_t sres, dres;
  logic sreq_valid, sreq_ready, sres_valid, sres_ready;
  logic dreq_valid, dreq_ready, dres_valid, dres_ready;

  sdma_control #(.QDEPTH(QDEPTH)) u_ctrl (
    .clk, .rst_n, .cfg_req, .cfg_resp, .info_vec,
    .sreq, .sreq_valid, .sreq_ready, .sres, .sres_valid, .sres_ready,
    .dreq, .dreq_valid, .dreq_ready, .dres, .dres_valid, .dres_ready,
    .irq);

  sdma_engine #(.BURST(BURST), .AXI_ID(AXI_ID)) u_eng (
    .clk, .rst_n,
    .sreq, .sreq_valid, .sreq_ready, .sres, .sres_valid, .sres_ready,
    .dreq, .dreq_valid, .dreq_ready, .dres, .dres_valid, .dres_ready,
    .m_axis, .m_tready, .s_axis, .s_tready, .m_axi_req, .m_axi_resp);
endmodule
