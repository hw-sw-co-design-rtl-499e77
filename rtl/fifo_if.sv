// fifo_if: FIFO Interface controller. The smallest way to move frames
// between software and an RSoC Accelerator: every stream beat is one or more
// register accesses from the processor, which is slow but costs little logic
// and gives low latency. Two axis_fifo queues of DEPTH beats buffer the two
// directions.
// Register map (byte offsets):
//   0x00-0x1C  information vector of the attached accelerator (read-only)
//   0x20 STATUS  read: [0] TX queue full, [1] TX queue empty,
//                      [2] RX beat available, [3] TLAST of the RX head beat
//   0x24 DATA    write: push a beat {DATA, KEEP, LAST, USER} to the
//                       accelerator (the write waits while the TX queue is
//                       full); read: TDATA of the RX head beat, and pops it
//                       (reads 0 and pops nothing when the queue is empty)
//   0x28 KEEP    write: [3:0] TKEEP and [8] TLAST used by the next DATA
//                       writes; read: [3:0] TKEEP and [8] TLAST of RX head
//   0x2C USER    write: TUSER for the next DATA writes (the frame size for a
//                       frame's first beat); read: TUSER of the RX head
// So software sends a beat by writing KEEP and USER when they change and
// then DATA, and receives a beat by reading KEEP (and USER), then DATA.
// irq is high while the RX queue holds data (change_detector on "RX beat
// available", so it follows with one cycle of delay).
// The four register names come from the framework; their bit layout and the
// interrupt condition are this design's choice.
module fifo_if
  import axi_pkg::*;
  import rsoc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   cfg_req,
  output axil_resp_t  cfg_resp,
  input  info_vec_t   info_vec,
  output axis_t       m_axis,     // towards the accelerator
  input  logic        m_tready,
  input  axis_t       s_axis,     // from the accelerator
  output logic        s_tready,
  output logic        irq
);
  localparam int unsigned NREGS = FIFO_NREGS;

  logic [NREGS-1:0]             wr_req, rd_req, wr_req_ok;
  logic [DATA_W-1:0]            wr_data;
  logic [STRB_W-1:0]            wr_strb;
  logic                         wr_ack, rd_ack;
  logic [NREGS-1:0][DATA_W-1:0] rd_data;

  logic [STRB_W-1:0] tx_keep;
  logic              tx_last;
  logic [USER_W-1:0] tx_user;

  axis_t tx_beat, rx_head;
  logic  tx_ready, rx_pop;

  axi_lite_endpoint #(.NREGS(NREGS)) u_ep (
    .clk, .rst_n, .s_req(cfg_req), .s_resp(cfg_resp),
    .wr_req, .wr_data, .wr_strb, .wr_ack,
    .rd_req, .rd_data, .rd_ack);

  // A DATA write is not acknowledged while the TX queue is full.
  always_comb begin
    wr_req_ok = wr_req;
    wr_req_ok[FIFO_DATA] = wr_req[FIFO_DATA] && tx_ready;
  end
  req_ack #(.N(NREGS)) u_wack (.clk, .rst_n, .req(wr_req_ok), .ack(wr_ack));
  req_ack #(.N(NREGS)) u_rack (.clk, .rst_n, .req(rd_req),    .ack(rd_ack));

  // ---------------- towards the accelerator ----------------
  always_comb begin
    tx_beat.tdata  = wr_data;
    tx_beat.tkeep  = tx_keep;
    tx_beat.tlast  = tx_last;
    tx_beat.tuser  = tx_user;
    tx_beat.tvalid = wr_req[FIFO_DATA] && wr_ack;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_keep <= '1;
      tx_last <= 1'b0;
      tx_user <= '0;
    end else if (wr_ack) begin
      if (wr_req[FIFO_KEEP]) begin
        if (wr_strb[0]) tx_keep <= wr_data[STRB_W-1:0];
        if (wr_strb[1]) tx_last <= wr_data[FIFO_KEEP_LAST_BIT];
      end
      if (wr_req[FIFO_USER]) tx_user <= misc_pkg::apply_be(tx_user, wr_data, wr_strb);
    end
  end

  axis_fifo #(.DEPTH(DEPTH)) u_tx (
    .clk, .rst_n, .s_axis(tx_beat), .s_tready(tx_ready),
    .m_axis, .m_tready, .level());

  // ---------------- from the accelerator ----------------
  assign rx_pop = rd_req[FIFO_DATA] && rd_ack;

  axis_fifo #(.DEPTH(DEPTH)) u_rx (
    .clk, .rst_n, .s_axis, .s_tready,
    .m_axis(rx_head), .m_tready(rx_pop), .level());

  change_detector #(.W(1), .IDLE(1'b0)) u_irq (
    .clk, .rst_n, .sig(rx_head.tvalid), .event_o(irq));

  // ---------------- register read data ----------------
  always_comb begin
    rd_data = '0;
    for (int unsigned w = 0; w < INFO_WORDS; w++)
      rd_data[w] = info_vec[32*w +: 32];
    rd_data[FIFO_STATUS] = {28'b0, rx_head.tvalid && rx_head.tlast, rx_head.tvalid,
                            !m_axis.tvalid, !tx_ready};
    rd_data[FIFO_DATA]   = rx_head.tvalid ? rx_head.tdata : '0;
    rd_data[FIFO_KEEP]   = rx_head.tvalid ?
                           (32'(rx_head.tlast) << FIFO_KEEP_LAST_BIT) | 32'(rx_head.tkeep) : '0;
    rd_data[FIFO_USER]   = rx_head.tvalid ? rx_head.tuser : '0;
  end
endmodule
