// rsoc_bridge: RSoC Bridge Generic, the infrastructure that connects N_ACC
// RSoC Accelerators to the processing system.
//   Slave bus:   one AXI4-Lite port from the PS reaches RSoC Info, every
//                accelerator's configuration space and every controller
//                (slave_bus, layout computed at elaboration).
//   Controllers: slot i gets the controller CTRL_TYPE[i]: a FIFO Interface
//                (fifo_if, register-driven streams) or a Simple DMA
//                Interface (sdma_if, an AXI master). These form the "FIFO IF
//                array" and the "SDMA IF array" of the bridge.
//   Master bus:  the AXI masters of the DMA controllers are joined onto
//                N_MPORTS PS slave ports (master_bus); slot i uses port
//                PORT_OF[i], and PORT_COHERENT marks ACP-style ports.
//   Interrupts:  each controller's interrupt goes through irq_mapper to
//                line IRQ_MAP[i] of N_IRQ lines.
// Towards every accelerator the bridge offers the RSoC Accelerator
// interface: an AXI4-Lite configuration bus (addresses start at 0), an input
// stream, an output stream and the accelerator's 32-byte information vector
// (read back through the controller's first 32 bytes). Frames on the
// streams carry their size in bytes in TUSER of the first beat.
// Defaults: the four-slot test configuration (slots 0 and 1 on FIFO
// Interfaces, slot 2 on an SDMA Interface via HP0, slot 3 via the ACP).
module rsoc_bridge
  import axi_pkg::*;
  import plat_pkg::*;
  import rsoc_pkg::*;
#(
  parameter int unsigned N_ACC    = 4,
  parameter int unsigned N_MPORTS = 2,
  parameter int unsigned N_IRQ    = 4,
  parameter addr_t       BRIDGE_BASE = 32'h4000_0000,
  parameter ctrl_type_e  CTRL_TYPE [N_ACC] = '{CTRL_FIFO, CTRL_FIFO, CTRL_SDMA, CTRL_SDMA},
  parameter int unsigned PORT_OF   [N_ACC] = '{2, 2, 0, 1},
  parameter bit          PORT_COHERENT [N_MPORTS] = '{1'b0, 1'b1},
  parameter int unsigned IRQ_MAP   [N_ACC] = '{0, 1, 2, 3},
  parameter addr_t       ACC_SIZE  [N_ACC] = '{default: 32'h1000},
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned SDMA_QDEPTH = 4,
  parameter int unsigned SDMA_BURST  = MAX_BURST
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration port from the PS (general-purpose master port)
  input  axil_req_t   s_axil_req,
  output axil_resp_t  s_axil_resp,
  // data ports to the PS (HP / ACP slave ports)
  output axi_req_t    m_axi_req  [N_MPORTS],
  input  axi_resp_t   m_axi_resp [N_MPORTS],
  output logic [N_IRQ-1:0] irq,
  // RSoC Accelerator interfaces
  output axil_req_t   acc_cfg_req  [N_ACC],
  input  axil_resp_t  acc_cfg_resp [N_ACC],
  input  info_vec_t   acc_info     [N_ACC],
  output axis_t       to_acc       [N_ACC],
  input  logic [N_ACC-1:0] to_acc_tready,
  input  axis_t       from_acc     [N_ACC],
  output logic [N_ACC-1:0] from_acc_tready
);
  axil_req_t  ctrl_req  [N_ACC];
  axil_resp_t ctrl_resp [N_ACC];
  axi_req_t   dma_req   [N_ACC];
  axi_resp_t  dma_resp  [N_ACC];
  logic [N_ACC-1:0] ctrl_irq;

  slave_bus #(.N_ACC(N_ACC), .BRIDGE_BASE(BRIDGE_BASE), .ACC_SIZE(ACC_SIZE),
              .CTRL_TYPE(CTRL_TYPE)) u_sbus (
    .clk, .rst_n, .s_req(s_axil_req), .s_resp(s_axil_resp),
    .acc_req(acc_cfg_req), .acc_resp(acc_cfg_resp),
    .ctrl_req, .ctrl_resp);

  for (genvar i = 0; i < N_ACC; i++) begin : g_slot
    if (CTRL_TYPE[i] == CTRL_SDMA) begin : g_sdma
      sdma_if #(.QDEPTH(SDMA_QDEPTH), .BURST(SDMA_BURST), .AXI_ID(ID_W'(i))) u_ctrl (
        .clk, .rst_n, .cfg_req(ctrl_req[i]), .cfg_resp(ctrl_resp[i]),
        .info_vec(acc_info[i]),
        .m_axis(to_acc[i]), .m_tready(to_acc_tready[i]),
        .s_axis(from_acc[i]), .s_tready(from_acc_tready[i]),
        .m_axi_req(dma_req[i]), .m_axi_resp(dma_resp[i]),
        .irq(ctrl_irq[i]));
    end else begin : g_fifo
      fifo_if #(.DEPTH(FIFO_DEPTH)) u_ctrl (
        .clk, .rst_n, .cfg_req(ctrl_req[i]), .cfg_resp(ctrl_resp[i]),
        .info_vec(acc_info[i]),
        .m_axis(to_acc[i]), .m_tready(to_acc_tready[i]),
        .s_axis(from_acc[i]), .s_tready(from_acc_tready[i]),
        .irq(ctrl_irq[i]));
      assign dma_req[i] = '0;   // a FIFO Interface has no data port
    end
  end

  master_bus #(.N_CTRL(N_ACC), .N_PORTS(N_MPORTS), .PORT_OF(PORT_OF),
               .PORT_COHERENT(PORT_COHERENT)) u_mbus (
    .clk, .rst_n, .c_req(dma_req), .c_resp(dma_resp),
    .p_req(m_axi_req), .p_resp(m_axi_resp));

  irq_mapper #(.N_IN(N_ACC), .N_OUT(N_IRQ), .MAP(IRQ_MAP)) u_irq (
    .clk, .rst_n, .irq_in(ctrl_irq), .irq_out(irq));
endmodule
