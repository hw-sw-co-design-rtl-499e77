// axi_lite_endpoint: turns an AXI4-Lite slave port into two simple register
// channels for NREGS 32-bit registers, so that a component only has to serve
// "write register k" and "read register k".
//   Write: AW and W are accepted in either order; then wr_req[k] (k = word
//   index of the address) is held high, with wr_data/wr_strb, until the
//   register side pulses wr_ack; the B response follows in the next cycle.
//   Read: after AR, rd_req[k] is held until rd_ack; rd_data[k] is sampled in
//   the rd_ack cycle and returned on R in the next cycle.
// Only address bits [IW+1:2] are decoded (the router in front has already
// removed the region base). A word index at or above NREGS is answered at
// once with SLVERR and raises no request. One write and one read may be in
// progress at the same time; each channel handles one transaction at a time.
// The acknowledges normally come from a req_ack, which adds one cycle.
// The request lines come from two onehot_decoders and the read data from a
// gen_mux, the general purpose units of the framework.
module axi_lite_endpoint
  import axi_pkg::*;
#(
  parameter int unsigned NREGS = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  axil_req_t              s_req,
  output axil_resp_t             s_resp,
  output logic [NREGS-1:0]       wr_req,
  output logic [DATA_W-1:0]      wr_data,
  output logic [STRB_W-1:0]      wr_strb,
  input  logic                   wr_ack,
  output logic [NREGS-1:0]       rd_req,
  input  logic [NREGS-1:0][DATA_W-1:0] rd_data,
  input  logic                   rd_ack
);
  localparam int unsigned IW = (NREGS > 1) ? $clog2(NREGS) : 1;

  typedef enum logic [1:0] {W_ADDR, W_REQ, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_ADDR, R_REQ, R_RESP} rstate_e;
  wstate_e wstate;
  rstate_e rstate;

  logic          aw_got, w_got, w_err, r_err;
  logic [IW-1:0] w_idx, r_idx;
  logic [DATA_W-1:0] r_data_q;

  function automatic logic [IW-1:0] word_idx(plat_pkg::addr_t a);
    return a[IW+1:2];
  endfunction
  function automatic logic in_range(plat_pkg::addr_t a);
    // every bit above the register index must be zero as well
    return (int'(a[IW+1:2]) < NREGS) && (a[31:IW+2] == '0);
  endfunction

  // ---------------- write channel ----------------
  assign s_resp.aw_ready = (wstate == W_ADDR) && !aw_got;
  assign s_resp.w_ready  = (wstate == W_ADDR) && !w_got;
  assign s_resp.b_valid  = (wstate == W_RESP);
  assign s_resp.b_resp   = w_err ? RESP_SLVERR : RESP_OKAY;

  onehot_decoder #(.N(NREGS)) u_wr_dec (.idx(w_idx), .en(wstate == W_REQ), .onehot(wr_req));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstate  <= W_ADDR;
      aw_got  <= 1'b0;
      w_got   <= 1'b0;
      w_err   <= 1'b0;
      w_idx   <= '0;
      wr_data <= '0;
      wr_strb <= '0;
    end else begin
      unique case (wstate)
        W_ADDR: begin
          if (s_req.aw_valid && s_resp.aw_ready) begin
            aw_got <= 1'b1;
            w_idx  <= word_idx(s_req.aw_addr);
            w_err  <= !in_range(s_req.aw_addr);
          end
          if (s_req.w_valid && s_resp.w_ready) begin
            w_got   <= 1'b1;
            wr_data <= s_req.w_data;
            wr_strb <= s_req.w_strb;
          end
          if ((aw_got || s_req.aw_valid) && (w_got || s_req.w_valid)) begin
            aw_got <= 1'b0;
            w_got  <= 1'b0;
            wstate <= (aw_got ? w_err : !in_range(s_req.aw_addr)) ? W_RESP : W_REQ;
          end
        end
        W_REQ:  if (wr_ack) wstate <= W_RESP;
        W_RESP: if (s_req.b_ready) wstate <= W_ADDR;
        default: wstate <= W_ADDR;
      endcase
    end
  end

  // ---------------- read channel ----------------
  assign s_resp.ar_ready = (rstate == R_ADDR);
  assign s_resp.r_valid  = (rstate == R_RESP);
  assign s_resp.r_data   = r_data_q;
  assign s_resp.r_resp   = r_err ? RESP_SLVERR : RESP_OKAY;

  onehot_decoder #(.N(NREGS)) u_rd_dec (.idx(r_idx), .en(rstate == R_REQ), .onehot(rd_req));
  logic [DATA_W-1:0] rd_sel;
  gen_mux #(.N(NREGS), .W(DATA_W)) u_rd_mux (.d(rd_data), .sel(r_idx), .y(rd_sel));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rstate   <= R_ADDR;
      r_err    <= 1'b0;
      r_idx    <= '0;
      r_data_q <= '0;
    end else begin
      unique case (rstate)
        R_ADDR: if (s_req.ar_valid) begin
          r_idx    <= word_idx(s_req.ar_addr);
          r_err    <= !in_range(s_req.ar_addr);
          r_data_q <= '0;
          rstate   <= in_range(s_req.ar_addr) ? R_REQ : R_RESP;
        end
        R_REQ: if (rd_ack) begin
          r_data_q <= rd_sel;
          rstate   <= R_RESP;
        end
        R_RESP: if (s_req.r_ready) rstate <= R_ADDR;
        default: rstate <= R_ADDR;
      endcase
    end
  end

  // AXI rule: a response, once valid, stays valid until it is taken.
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               s_resp.b_valid && !s_req.b_ready |=> s_resp.b_valid);
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               s_resp.r_valid && !s_req.r_ready |=> s_resp.r_valid && $stable(s_resp.r_data));
endmodule
