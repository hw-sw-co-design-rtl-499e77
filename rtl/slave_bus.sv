// slave_bus: configuration bus of the RSoC Bridge. One AXI4-Lite master
// (a PS general-purpose master port) reaches, through one axi_1ton router:
//   slave 0          the bridge's RSoC Info unit (at BRIDGE_BASE)
//   slaves 1..N      the configuration spaces of the N accelerators
//   slaves N+1..2N   the address spaces of their N controllers
// The layout is computed at elaboration with plat_pkg::compute_next_base,
// region after region in that order, from the sizes given as parameters; the
// same numbers are published by RSoC Info (BASE, SIZE and INFO of every
// accelerator and controller region). Each slave sees addresses relative to
// its own base: an addr_rebase per slave subtracts it. The bus adds no
// latency of its own beyond the router's (none) and the slaves'.
module slave_bus
  import axi_pkg::*;
  import plat_pkg::*;
  import rsoc_pkg::*;
#(
  parameter int unsigned N_ACC       = 4,
  parameter addr_t       BRIDGE_BASE = 32'h4000_0000,
  parameter addr_t       INFO_SIZE   = 32'h1000,
  parameter addr_t       ACC_SIZE  [N_ACC] = '{default: 32'h1000},
  parameter addr_t       CTRL_SIZE [N_ACC] = '{default: 32'h1000},
  parameter ctrl_type_e  CTRL_TYPE [N_ACC] = '{default: CTRL_FIFO}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_req,
  output axil_resp_t  s_resp,
  output axil_req_t   acc_req   [N_ACC],
  input  axil_resp_t  acc_resp  [N_ACC],
  output axil_req_t   ctrl_req  [N_ACC],
  input  axil_resp_t  ctrl_resp [N_ACC]
);
  localparam int unsigned NS = 1 + 2 * N_ACC;   // router slaves
  localparam int unsigned NR = 2 * N_ACC;       // published regions
  typedef addr_t       arr_t  [NS];
  typedef addr_t       rarr_t [NR];
  typedef logic [31:0] iarr_t [NR];

  function automatic arr_t sizes();
    arr_t s;
    s[0] = region_size(INFO_SIZE);
    for (int unsigned i = 0; i < N_ACC; i++) begin
      s[1 + i]         = region_size(ACC_SIZE[i]);
      s[1 + N_ACC + i] = region_size(CTRL_SIZE[i]);
    end
    return s;
  endfunction
  localparam arr_t SIZES = sizes();

  function automatic arr_t layout();
    arr_t b;
    b[0] = BRIDGE_BASE;
    for (int unsigned k = 1; k < NS; k++)
      b[k] = compute_next_base(b[k-1], SIZES[k-1], SIZES[k]);
    return b;
  endfunction
  localparam arr_t BASES = layout();

  function automatic rarr_t region_base();
    rarr_t r;
    for (int unsigned k = 0; k < NR; k++) r[k] = BASES[k + 1];
    return r;
  endfunction
  function automatic rarr_t region_sz();
    rarr_t r;
    for (int unsigned k = 0; k < NR; k++) r[k] = SIZES[k + 1];
    return r;
  endfunction
  function automatic iarr_t region_info();
    iarr_t r;
    for (int unsigned i = 0; i < N_ACC; i++) begin
      r[i]         = {16'h0, 8'(i), REGION_ACCEL};
      r[N_ACC + i] = {8'h0, 8'(CTRL_TYPE[i]), 8'(i), REGION_CTRL};
    end
    return r;
  endfunction

  axil_req_t  m_req  [NS];
  axil_resp_t m_resp [NS];
  axil_req_t  rb_req [NS];   // after rebasing

  axi_1ton #(.N(NS), .BASE(BASES), .SIZE(SIZES)) u_router (
    .clk, .rst_n, .s_req, .s_resp, .m_req, .m_resp);

  for (genvar k = 0; k < NS; k++) begin : g_rebase
    addr_t aw_a, ar_a;
    addr_rebase #(.OLD_BASE(BASES[k]), .NEW_BASE('0)) u_aw (.addr_i(m_req[k].aw_addr), .addr_o(aw_a));
    addr_rebase #(.OLD_BASE(BASES[k]), .NEW_BASE('0)) u_ar (.addr_i(m_req[k].ar_addr), .addr_o(ar_a));
    always_comb begin
      rb_req[k]         = m_req[k];
      rb_req[k].aw_addr = aw_a;
      rb_req[k].ar_addr = ar_a;
    end
  end

  rsoc_info #(.NREG(NR), .BASE(region_base()), .SIZE(region_sz()), .INFO(region_info())) u_info (
    .clk, .rst_n, .s_req(rb_req[0]), .s_resp(m_resp[0]));

  for (genvar i = 0; i < N_ACC; i++) begin : g_slots
    assign acc_req[i]            = rb_req[1 + i];
    assign m_resp[1 + i]         = acc_resp[i];
    assign ctrl_req[i]           = rb_req[1 + N_ACC + i];
    assign m_resp[1 + N_ACC + i] = ctrl_resp[i];
  end
endmodule
