// sdma_engine: transfer engine of the Simple DMA Interface, an AXI4 bus
// master with two independent halves sharing one AXI port (reads and writes
// use separate AXI channels).
//   Memory-to-device (MM2S): for each request (address, size, id) it reads
//   ceil(size/4) words with INCR bursts of at most MAX_BURST beats that never
//   cross a 4 KiB boundary, and forwards them as one frame: TUSER of the
//   first beat carries the frame size in bytes, TKEEP of the last beat masks
//   the bytes beyond size, TLAST marks the last beat. When the frame is done
//   it returns (status = worst RRESP, id). A size of 0 sends no frame.
//   Device-to-memory (S2MM): for each request (buffer address, buffer size,
//   id) it takes one frame from the input stream, collects up to MAX_BURST
//   beats (fewer at a 4 KiB boundary, at the end of the buffer or at TLAST)
//   in a local buffer, writes them with one INCR burst (WSTRB = TKEEP), waits
//   for BRESP, and repeats until TLAST. Beats that no longer fit into the
//   buffer are consumed and dropped and the transfer is marked truncated. It
//   returns (status: [1:0] worst BRESP, [16] truncated; bytes written; id).
// Addresses are assumed word aligned, buffer sizes a multiple of 4 bytes
// and TKEEP contiguous from byte 0. The framework builds this engine from a
// vendor data-mover core; this is an independent implementation of the same
// job with the request/response interface of sdma_control.
module sdma_engine
  import axi_pkg::*;
  import rsoc_pkg::*;
#(
  parameter int unsigned         BURST = MAX_BURST,
  parameter logic [ID_W-1:0]     AXI_ID = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dma_req_t    sreq,
  input  logic        sreq_valid,
  output logic        sreq_ready,
  output dma_res_t    sres,
  output logic        sres_valid,
  input  logic        sres_ready,
  input  dma_req_t    dreq,
  input  logic        dreq_valid,
  output logic        dreq_ready,
  output dma_res_t    dres,
  output logic        dres_valid,
  input  logic        dres_ready,
  output axis_t       m_axis,      // frames to the accelerator
  input  logic        m_tready,
  input  axis_t       s_axis,      // frames from the accelerator
  output logic        s_tready,
  output axi_req_t    m_axi_req,
  input  axi_resp_t   m_axi_resp
);
  localparam int unsigned BW = $clog2(BURST + 1);
  localparam int unsigned XW = (BURST > 1) ? $clog2(BURST) : 1;

  // beats left before the next 4 KiB boundary (1..1024)
  function automatic logic [10:0] beats_to_4k(logic [31:0] a);
    return 11'((13'h1000 - {1'b0, a[11:0]}) >> 2);
  endfunction
  function automatic logic [BW-1:0] burst_len(logic [31:0] rem, logic [31:0] a);
    logic [31:0] l;
    l = (rem < 32'(BURST)) ? rem : 32'(BURST);
    if (32'(beats_to_4k(a)) < l) l = 32'(beats_to_4k(a));
    return BW'(l);
  endfunction

  // ======================= memory to device =======================
  typedef enum logic [1:0] {M_IDLE, M_AR, M_DATA, M_RESP} mst_e;
  mst_e        mst;
  logic [31:0] m_addr, m_size, m_id, m_req_rem, m_del_rem;
  logic        m_first;
  logic [1:0]  m_resp;
  logic [STRB_W-1:0] m_last_keep;
  logic [BW-1:0]     m_len;

  assign m_len      = burst_len(m_req_rem, m_addr);
  assign sreq_ready = (mst == M_IDLE);
  assign sres_valid = (mst == M_RESP);
  assign sres       = '{status: {30'b0, m_resp}, size: m_size, id: m_id};

  always_comb begin
    m_axis        = '0;
    m_axis.tvalid = (mst == M_DATA) && m_axi_resp.r_valid;
    m_axis.tdata  = m_axi_resp.r_data;
    m_axis.tlast  = (m_del_rem == 1);
    m_axis.tkeep  = (m_del_rem == 1) ? m_last_keep : '1;
    m_axis.tuser  = m_first ? m_size : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mst <= M_IDLE;
      m_addr <= '0; m_size <= '0; m_id <= '0; m_req_rem <= '0; m_del_rem <= '0;
      m_first <= 1'b0; m_resp <= RESP_OKAY; m_last_keep <= '1;
    end else begin
      unique case (mst)
        M_IDLE: if (sreq_valid) begin
          m_addr      <= sreq.addr;
          m_size      <= sreq.size;
          m_id        <= sreq.id;
          m_req_rem   <= (sreq.size + 3) >> 2;
          m_del_rem   <= (sreq.size + 3) >> 2;
          m_first     <= 1'b1;
          m_resp      <= RESP_OKAY;
          unique case (sreq.size[1:0])
            2'd1:    m_last_keep <= 4'b0001;
            2'd2:    m_last_keep <= 4'b0011;
            2'd3:    m_last_keep <= 4'b0111;
            default: m_last_keep <= 4'b1111;
          endcase
          mst <= (sreq.size == 0) ? M_RESP : M_AR;
        end
        M_AR: if (m_axi_resp.ar_ready) begin
          m_addr    <= m_addr + (32'(m_len) << 2);
          m_req_rem <= m_req_rem - 32'(m_len);
          mst       <= M_DATA;
        end
        M_DATA: if (m_axi_resp.r_valid && m_tready) begin
          m_del_rem <= m_del_rem - 1;
          m_first   <= 1'b0;
          m_resp    <= worse_resp(m_resp, m_axi_resp.r_resp);
          if (m_axi_resp.r_last) mst <= (m_del_rem == 1) ? M_RESP : M_AR;
        end
        M_RESP: if (sres_ready) mst <= M_IDLE;
        default: mst <= M_IDLE;
      endcase
    end
  end

  // ======================= device to memory =======================
  typedef enum logic [2:0] {D_IDLE, D_FILL, D_AW, D_W, D_B, D_DRAIN, D_RESP} dst_e;
  dst_e        dst;
  logic [31:0] d_addr, d_cap, d_id, d_bytes;
  logic        d_trunc, d_seen_last;
  logic [1:0]  d_resp;
  logic [BW-1:0] d_cnt, d_widx, d_limit;
  logic [DATA_W-1:0] buf_data [BURST];
  logic [STRB_W-1:0] buf_keep [BURST];

  assign d_limit    = burst_len(d_cap, d_addr);
  assign dreq_ready = (dst == D_IDLE);
  assign dres_valid = (dst == D_RESP);
  assign dres       = '{status: {15'b0, d_trunc, 14'b0, d_resp}, size: d_bytes, id: d_id};
  assign s_tready   = ((dst == D_FILL) && (d_cnt < d_limit)) || (dst == D_DRAIN);

  always_ff @(posedge clk) begin
    if ((dst == D_FILL) && s_axis.tvalid && s_tready) begin
      buf_data[d_cnt[XW-1:0]] <= s_axis.tdata;
      buf_keep[d_cnt[XW-1:0]] <= s_axis.tkeep;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dst <= D_IDLE;
      d_addr <= '0; d_cap <= '0; d_id <= '0; d_bytes <= '0;
      d_trunc <= 1'b0; d_seen_last <= 1'b0; d_resp <= RESP_OKAY;
      d_cnt <= '0; d_widx <= '0;
    end else begin
      unique case (dst)
        D_IDLE: if (dreq_valid) begin
          d_addr      <= dreq.addr;
          d_cap       <= dreq.size >> 2;
          d_id        <= dreq.id;
          d_bytes     <= '0;
          d_trunc     <= 1'b0;
          d_seen_last <= 1'b0;
          d_resp      <= RESP_OKAY;
          d_cnt       <= '0;
          dst         <= ((dreq.size >> 2) == 0) ? D_DRAIN : D_FILL;
        end
        D_FILL: if (s_axis.tvalid && s_tready) begin
          d_cnt   <= d_cnt + 1'b1;
          d_bytes <= d_bytes + 32'(misc_pkg::count_keep(s_axis.tkeep));
          if (s_axis.tlast) d_seen_last <= 1'b1;
          if (s_axis.tlast || (d_cnt + 1'b1 == d_limit)) dst <= D_AW;
        end
        D_AW: if (m_axi_resp.aw_ready) begin
          d_widx <= '0;
          dst    <= D_W;
        end
        D_W: if (m_axi_resp.w_ready) begin
          d_widx <= d_widx + 1'b1;
          if (d_widx + 1'b1 == d_cnt) dst <= D_B;
        end
        D_B: if (m_axi_resp.b_valid) begin
          d_resp <= worse_resp(d_resp, m_axi_resp.b_resp);
          d_addr <= d_addr + (32'(d_cnt) << 2);
          d_cap  <= d_cap - 32'(d_cnt);
          d_cnt  <= '0;
          if (d_seen_last)                  dst <= D_RESP;
          else if (d_cap == 32'(d_cnt))     dst <= D_DRAIN;
          else                              dst <= D_FILL;
        end
        D_DRAIN: if (s_axis.tvalid) begin
          d_trunc <= 1'b1;
          if (s_axis.tlast) dst <= D_RESP;
        end
        D_RESP: if (dres_ready) dst <= D_IDLE;
        default: dst <= D_IDLE;
      endcase
    end
  end

  // ======================= AXI master port =======================
  always_comb begin
    m_axi_req          = '0;
    m_axi_req.ar_id    = AXI_ID;
    m_axi_req.ar_addr  = m_addr;
    m_axi_req.ar_len   = 8'(m_len - 1'b1);
    m_axi_req.ar_size  = 3'd2;            // 4 bytes per beat
    m_axi_req.ar_burst = BURST_INCR;
    m_axi_req.ar_cache = 4'b0011;
    m_axi_req.ar_valid = (mst == M_AR);
    m_axi_req.r_ready  = (mst == M_DATA) && m_tready;
    m_axi_req.aw_id    = AXI_ID;
    m_axi_req.aw_addr  = d_addr;
    m_axi_req.aw_len   = 8'(d_cnt - 1'b1);
    m_axi_req.aw_size  = 3'd2;
    m_axi_req.aw_burst = BURST_INCR;
    m_axi_req.aw_cache = 4'b0011;
    m_axi_req.aw_valid = (dst == D_AW);
    m_axi_req.w_data   = buf_data[d_widx[XW-1:0]];
    m_axi_req.w_strb   = buf_keep[d_widx[XW-1:0]];
    m_axi_req.w_last   = (d_widx + 1'b1 == d_cnt);
    m_axi_req.w_valid  = (dst == D_W);
    m_axi_req.b_ready  = (dst == D_B);
  end

  // the read data of a burst ends exactly where the engine expects it
  a_rlast: assert property (@(posedge clk) disable iff (!rst_n)
    (mst == M_DATA) && m_axi_resp.r_valid && m_tready && (m_del_rem == 1) |-> m_axi_resp.r_last);
endmodule
