// axi_nto1: AXI N-to-1 for AXI4 (bursts). Lets N masters share one slave
// port. Reads and writes are arbitrated independently, each by a
// round-robin rr_arbiter over the masters' AR (AW) valids.
//   Read:  the winner is latched (one cycle), its AR is forwarded, and all R
//          beats are routed back to it until RLAST; then the next read is
//          arbitrated.
//   Write: the winner's AW is forwarded, then its W beats until WLAST, then
//          the B response is routed back to it.
// One read and one write burst are in flight at a time, so response routing
// needs no ID bits; IDs pass through unchanged. Latching the winner before
// forwarding keeps AxADDR stable while AxVALID is high, as AXI requires.
module axi_nto1
  import axi_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axi_req_t   s_req  [N],
  output axi_resp_t  s_resp [N],
  output axi_req_t   m_req,
  input  axi_resp_t  m_resp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [1:0] {R_ARB, R_ADDR, R_DATA} rst_e;
  typedef enum logic [1:0] {W_ARB, W_ADDR, W_DATA, W_RESP} wst_e;
  rst_e rst;
  wst_e wst;
  logic [IW-1:0] rsel, wsel;

  logic [N-1:0]  ar_req, aw_req, r_grant, w_grant;
  logic [IW-1:0] r_gidx, w_gidx;
  logic          r_gvalid, w_gvalid;

  always_comb
    for (int unsigned k = 0; k < N; k++) begin
      ar_req[k] = s_req[k].ar_valid;
      aw_req[k] = s_req[k].aw_valid;
    end

  rr_arbiter #(.N(N)) u_rarb (
    .clk, .rst_n, .req(ar_req), .ack(rst == R_ARB),
    .grant(r_grant), .grant_idx(r_gidx), .grant_valid(r_gvalid));
  rr_arbiter #(.N(N)) u_warb (
    .clk, .rst_n, .req(aw_req), .ack(wst == W_ARB),
    .grant(w_grant), .grant_idx(w_gidx), .grant_valid(w_gvalid));

  always_comb begin
    axi_req_t r_src, w_src;
    r_src = s_req[rsel];
    w_src = s_req[wsel];
    m_req = '0;
    // read address and data
    m_req.ar_id    = r_src.ar_id;
    m_req.ar_addr  = r_src.ar_addr;
    m_req.ar_len   = r_src.ar_len;
    m_req.ar_size  = r_src.ar_size;
    m_req.ar_burst = r_src.ar_burst;
    m_req.ar_cache = r_src.ar_cache;
    m_req.ar_prot  = r_src.ar_prot;
    m_req.ar_user  = r_src.ar_user;
    m_req.ar_valid = (rst == R_ADDR) && r_src.ar_valid;
    m_req.r_ready  = (rst == R_DATA) && r_src.r_ready;
    // write address, data and response
    m_req.aw_id    = w_src.aw_id;
    m_req.aw_addr  = w_src.aw_addr;
    m_req.aw_len   = w_src.aw_len;
    m_req.aw_size  = w_src.aw_size;
    m_req.aw_burst = w_src.aw_burst;
    m_req.aw_cache = w_src.aw_cache;
    m_req.aw_prot  = w_src.aw_prot;
    m_req.aw_user  = w_src.aw_user;
    m_req.aw_valid = (wst == W_ADDR) && w_src.aw_valid;
    m_req.w_data   = w_src.w_data;
    m_req.w_strb   = w_src.w_strb;
    m_req.w_last   = w_src.w_last;
    m_req.w_valid  = (wst == W_DATA) && w_src.w_valid;
    m_req.b_ready  = (wst == W_RESP) && w_src.b_ready;

    for (int unsigned k = 0; k < N; k++) begin
      s_resp[k]        = m_resp;
      s_resp[k].ar_ready = (rst == R_ADDR) && (rsel == IW'(k)) && m_resp.ar_ready;
      s_resp[k].r_valid  = (rst == R_DATA) && (rsel == IW'(k)) && m_resp.r_valid;
      s_resp[k].aw_ready = (wst == W_ADDR) && (wsel == IW'(k)) && m_resp.aw_ready;
      s_resp[k].w_ready  = (wst == W_DATA) && (wsel == IW'(k)) && m_resp.w_ready;
      s_resp[k].b_valid  = (wst == W_RESP) && (wsel == IW'(k)) && m_resp.b_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rst  <= R_ARB;
      wst  <= W_ARB;
      rsel <= '0;
      wsel <= '0;
    end else begin
      unique case (rst)
        R_ARB:  if (r_gvalid) begin rsel <= r_gidx; rst <= R_ADDR; end
        R_ADDR: if (m_req.ar_valid && m_resp.ar_ready) rst <= R_DATA;
        R_DATA: if (m_resp.r_valid && m_req.r_ready && m_resp.r_last) rst <= R_ARB;
        default: rst <= R_ARB;
      endcase
      unique case (wst)
        W_ARB:  if (w_gvalid) begin wsel <= w_gidx; wst <= W_ADDR; end
        W_ADDR: if (m_req.aw_valid && m_resp.aw_ready) wst <= W_DATA;
        W_DATA: if (m_req.w_valid && m_resp.w_ready && m_req.w_last) wst <= W_RESP;
        W_RESP: if (m_resp.b_valid && m_req.b_ready) wst <= W_ARB;
        default: wst <= W_ARB;
      endcase
    end
  end

  // A master that raised AxVALID keeps it until the handshake, so a latched
  // winner always still requests.
  a_ar_held: assert property (@(posedge clk) disable iff (!rst_n)
                              rst == R_ADDR |-> s_req[rsel].ar_valid);
  a_aw_held: assert property (@(posedge clk) disable iff (!rst_n)
                              wst == W_ADDR |-> s_req[wsel].aw_valid);
endmodule
