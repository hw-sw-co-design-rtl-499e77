// rsoc_system: the generic test system of the RSoC Framework. An
// rsoc_bridge in its default four-slot configuration with a loopback_acc
// in every slot:
//   Loop 0, Loop 1  behind FIFO Interfaces (register-driven frames)
//   Loop 2          behind a Simple DMA Interface on data port 0 (HP0)
//   Loop 3          behind a Simple DMA Interface on data port 1 (ACP,
//                   coherent requests)
// The processing system is outside this module: its general-purpose master
// port drives gp_req/gp_resp, its HP0 and ACP slave ports (and the memory
// behind them) answer m_axi_req/m_axi_resp, and irq goes to its interrupt
// controller. Each loopback unit's information vector names it ("LOOPn").
// Beside the bridge, and independent of it, the framework's stream
// components are wired into a frame filter with its own ports (flt_*):
//   axis_sof     marks the first beat of each incoming frame (flt_sof)
//   axis_capture hands the word at FILTER_OFFSET of every frame to
//                external logic (flt_cap_*)
//   axis_fifo    holds the frame (FILTER_DEPTH beats, which must exceed
//                FILTER_OFFSET) while that logic decides
//   axis_discard forwards or drops the frame on a command (flt_cmd_*)
// The four parts are the framework's; combining them this way is this
// design's example of how capture and discard work together. Only the FIFO
// adds register stages; flt_sof, the capture stall and the discard gate are
// combinational on the stream handshake.
module rsoc_system
  import axi_pkg::*;
  import plat_pkg::*;
  import rsoc_pkg::*;
#(
  parameter addr_t       BRIDGE_BASE   = 32'h4000_0000,
  parameter int unsigned FILTER_OFFSET = 0,
  parameter int unsigned FILTER_DEPTH  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   gp_req,
  output axil_resp_t  gp_resp,
  output axi_req_t    m_axi_req  [2],
  input  axi_resp_t   m_axi_resp [2],
  output logic [3:0]  irq,
  // frame filter
  input  axis_t       flt_s_axis,
  output logic        flt_s_tready,
  output axis_t       flt_m_axis,
  input  logic        flt_m_tready,
  output logic        flt_sof,
  output logic [DATA_W-1:0] flt_cap_data,
  output logic        flt_cap_valid,
  input  logic        flt_cap_ready,
  input  logic        flt_cmd_valid,
  input  logic        flt_cmd_discard,
  output logic        flt_cmd_ready
);
  localparam int unsigned N = 4;

  axil_req_t  cfg_req  [N];
  axil_resp_t cfg_resp [N];
  info_vec_t  info     [N];
  axis_t      to_acc   [N];
  axis_t      from_acc [N];
  logic [N-1:0] to_acc_tready, from_acc_tready;

  rsoc_bridge #(.BRIDGE_BASE(BRIDGE_BASE)) u_bridge (
    .clk, .rst_n,
    .s_axil_req(gp_req), .s_axil_resp(gp_resp),
    .m_axi_req, .m_axi_resp, .irq,
    .acc_cfg_req(cfg_req), .acc_cfg_resp(cfg_resp), .acc_info(info),
    .to_acc, .to_acc_tready, .from_acc, .from_acc_tready);

  for (genvar i = 0; i < N; i++) begin : g_loop
    loopback_acc #(.INFO(info_vec_t'({"LOOP", 8'(8'h30 + i)}))) u_loop (
      .clk, .rst_n,
      .cfg_req(cfg_req[i]), .cfg_resp(cfg_resp[i]),
      .s_axis(to_acc[i]), .s_tready(to_acc_tready[i]),
      .m_axis(from_acc[i]), .m_tready(from_acc_tready[i]),
      .info_vec(info[i]));
  end

  // ---- frame filter built from the stream components
  axis_t c2f, f2d;
  logic  c2f_ready, f2d_ready;

  axis_sof u_sof (
    .clk, .rst_n, .tvalid(flt_s_axis.tvalid), .tready(flt_s_tready),
    .tlast(flt_s_axis.tlast), .sof(flt_sof));

  axis_capture #(.OFFSET(FILTER_OFFSET)) u_cap (
    .clk, .rst_n, .s_axis(flt_s_axis), .s_tready(flt_s_tready),
    .m_axis(c2f), .m_tready(c2f_ready),
    .cap_data(flt_cap_data), .cap_valid(flt_cap_valid), .cap_ready(flt_cap_ready));

  axis_fifo #(.DEPTH(FILTER_DEPTH)) u_hold (
    .clk, .rst_n, .s_axis(c2f), .s_tready(c2f_ready),
    .m_axis(f2d), .m_tready(f2d_ready), .level());

  axis_discard u_disc (
    .clk, .rst_n, .s_axis(f2d), .s_tready(f2d_ready),
    .m_axis(flt_m_axis), .m_tready(flt_m_tready),
    .cmd_valid(flt_cmd_valid), .cmd_discard(flt_cmd_discard), .cmd_ready(flt_cmd_ready));

  initial assert (FILTER_DEPTH > FILTER_OFFSET)
    else $error("FILTER_DEPTH must exceed FILTER_OFFSET");
endmodule
