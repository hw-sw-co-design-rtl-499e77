// master_bus: data bus of the RSoC Bridge. Joins the AXI4 masters of the
// DMA controllers onto N_PORTS PS slave ports (for the Zynq: HP and ACP
// ports). Controller i is connected to port PORT_OF[i]; a value of N_PORTS
// or more leaves it unconnected (a FIFO Interface needs no data port). Every
// port with controllers gets an axi_nto1 over exactly those controllers, so
// several controllers may share one port when the chip offers fewer ports
// than there are accelerators. For a port marked PORT_COHERENT the bus
// drives AxUSER[0] = 1 and AxCACHE[1] = 1, the ACP's coherent request
// encoding; other ports get AxUSER[0] = 0 and AxCACHE = 0 (non-coherent).
// A port without controllers is driven idle.
module master_bus
  import axi_pkg::*;
#(
  parameter int unsigned N_CTRL  = 4,
  parameter int unsigned N_PORTS = 2,
  parameter int unsigned PORT_OF       [N_CTRL]  = '{default: 0},
  parameter bit          PORT_COHERENT [N_PORTS] = '{default: 1'b0}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axi_req_t   c_req  [N_CTRL],
  output axi_resp_t  c_resp [N_CTRL],
  output axi_req_t   p_req  [N_PORTS],
  input  axi_resp_t  p_resp [N_PORTS]
);
  function automatic int unsigned count_on(int unsigned p);
    int unsigned c = 0;
    for (int unsigned i = 0; i < N_CTRL; i++) if (PORT_OF[i] == p) c++;
    return c;
  endfunction
  // index of the k-th controller on port p
  function automatic int unsigned member(int unsigned p, int unsigned k);
    int unsigned c = 0;
    for (int unsigned i = 0; i < N_CTRL; i++)
      if (PORT_OF[i] == p) begin
        if (c == k) return i;
        c++;
      end
    return 0;
  endfunction

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    localparam int unsigned CNT = count_on(p);
    if (CNT > 0) begin : g_used
      axi_req_t  sq [CNT];
      axi_resp_t sr [CNT];
      axi_req_t  mq;
      for (genvar k = 0; k < CNT; k++) begin : g_in
        assign sq[k] = c_req[member(p, k)];
        assign c_resp[member(p, k)] = sr[k];
      end
      axi_nto1 #(.N(CNT)) u_join (
        .clk, .rst_n, .s_req(sq), .s_resp(sr), .m_req(mq), .m_resp(p_resp[p]));
      always_comb begin
        p_req[p]          = mq;
        p_req[p].ar_user  = PORT_COHERENT[p];
        p_req[p].aw_user  = PORT_COHERENT[p];
        p_req[p].ar_cache = PORT_COHERENT[p] ? mq.ar_cache | 4'b0010 : 4'b0000;
        p_req[p].aw_cache = PORT_COHERENT[p] ? mq.aw_cache | 4'b0010 : 4'b0000;
      end
    end else begin : g_idle
      assign p_req[p] = '0;
    end
  end

  for (genvar i = 0; i < N_CTRL; i++) begin : g_unconnected
    if (PORT_OF[i] >= N_PORTS) begin : g_nc
      assign c_resp[i] = '0;
    end
  end
endmodule
