// axi_1ton: AXI 1-to-N router for AXI4-Lite. Divides the address space of
// one master among N slaves. Slave k owns the addresses a with
// (a & ~(SIZE[k]-1)) == BASE[k]; the layout is fixed at elaboration (the
// slave bus computes it with plat_pkg::compute_next_base). An address no
// slave owns is answered by the router itself with DECERR.
// Each direction carries one transaction at a time: the AW (AR) of the
// master is routed by its address straight to the chosen slave; after that
// handshake the router locks onto that slave for the W beat and the B
// response (for the R response). Valid/ready pass combinationally, so the
// router adds no cycles of latency.
module axi_1ton
  import axi_pkg::*;
  import plat_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter addr_t       BASE [N] = '{default: '0},
  parameter addr_t       SIZE [N] = '{default: 32'h1000}
) (
  input  logic            clk,
  input  logic            rst_n,
  input  axil_req_t       s_req,
  output axil_resp_t      s_resp,
  output axil_req_t       m_req  [N],
  input  axil_resp_t      m_resp [N]
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  // decode: hit flag and slave index for an address
  function automatic logic [IW:0] decode(addr_t a);
    for (int unsigned k = 0; k < N; k++)
      if ((a & ~(SIZE[k] - 1)) == BASE[k]) return {1'b1, IW'(k)};
    return '0;
  endfunction

  typedef enum logic [1:0] {WA, WD, WB} wst_e;
  typedef enum logic {RA, RD} rst_e;
  wst_e          wst;
  rst_e          rst;
  logic [IW-1:0] wsel, rsel;
  logic          werr, rerr;

  logic [IW:0] aw_dec, ar_dec;
  assign aw_dec = decode(s_req.aw_addr);
  assign ar_dec = decode(s_req.ar_addr);

  always_comb begin
    s_resp = '0;
    for (int unsigned k = 0; k < N; k++) begin
      m_req[k]          = s_req;
      m_req[k].aw_valid = 1'b0;
      m_req[k].w_valid  = 1'b0;
      m_req[k].b_ready  = 1'b0;
      m_req[k].ar_valid = 1'b0;
      m_req[k].r_ready  = 1'b0;
    end
    // write
    unique case (wst)
      WA: if (aw_dec[IW]) begin
            m_req[aw_dec[IW-1:0]].aw_valid = s_req.aw_valid;
            s_resp.aw_ready = m_resp[aw_dec[IW-1:0]].aw_ready;
          end else s_resp.aw_ready = 1'b1;
      WD: if (!werr) begin
            m_req[wsel].w_valid = s_req.w_valid;
            s_resp.w_ready = m_resp[wsel].w_ready;
          end else s_resp.w_ready = 1'b1;
      WB: if (!werr) begin
            m_req[wsel].b_ready = s_req.b_ready;
            s_resp.b_valid = m_resp[wsel].b_valid;
            s_resp.b_resp  = m_resp[wsel].b_resp;
          end else begin
            s_resp.b_valid = 1'b1;
            s_resp.b_resp  = RESP_DECERR;
          end
      default: ;
    endcase
    // read
    unique case (rst)
      RA: if (ar_dec[IW]) begin
            m_req[ar_dec[IW-1:0]].ar_valid = s_req.ar_valid;
            s_resp.ar_ready = m_resp[ar_dec[IW-1:0]].ar_ready;
          end else s_resp.ar_ready = 1'b1;
      RD: if (!rerr) begin
            m_req[rsel].r_ready = s_req.r_ready;
            s_resp.r_valid = m_resp[rsel].r_valid;
            s_resp.r_data  = m_resp[rsel].r_data;
            s_resp.r_resp  = m_resp[rsel].r_resp;
          end else begin
            s_resp.r_valid = 1'b1;
            s_resp.r_resp  = RESP_DECERR;
          end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst  <= WA;
      rst  <= RA;
      wsel <= '0;
      rsel <= '0;
      werr <= 1'b0;
      rerr <= 1'b0;
    end else begin
      unique case (wst)
        WA: if (s_req.aw_valid && s_resp.aw_ready) begin
              wsel <= aw_dec[IW-1:0];
              werr <= !aw_dec[IW];
              wst  <= WD;
            end
        WD: if (s_req.w_valid && s_resp.w_ready) wst <= WB;
        WB: if (s_resp.b_valid && s_req.b_ready) wst <= WA;
        default: wst <= WA;
      endcase
      unique case (rst)
        RA: if (s_req.ar_valid && s_resp.ar_ready) begin
              rsel <= ar_dec[IW-1:0];
              rerr <= !ar_dec[IW];
              rst  <= RD;
            end
        RD: if (s_resp.r_valid && s_req.r_ready) rst <= RA;
        default: rst <= RA;
      endcase
    end
  end
endmodule
