// loopback_acc: Loopback Accelerator, a test unit that stands in for a real
// RSoC Accelerator. Every beat of the input stream (TDATA, TKEEP, TLAST and
// TUSER, so the frame size of the first beat too) is copied to the output
// stream through a FIFO of DEPTH beats. Two read-only registers on the
// AXI4-Lite configuration port count what the unit has seen at its input:
//   0x00 FRAMES  frames (beats with TLAST)
//   0x04 BEATS   data beats
// A write to either register clears both counters (this design's choice).
// info_vec is the unit's 32-byte information vector (parameter INFO; its
// last byte is forced to zero as the framework requires).
module loopback_acc
  import axi_pkg::*;
  import rsoc_pkg::*;
#(
  parameter info_vec_t   INFO  = info_vec_t'("LOOPBACK"),
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   cfg_req,
  output axil_resp_t  cfg_resp,
  input  axis_t       s_axis,
  output logic        s_tready,
  output axis_t       m_axis,
  input  logic        m_tready,
  output info_vec_t   info_vec
);
  localparam int unsigned NREGS = 2;

  logic [NREGS-1:0]             wr_req, rd_req;
  logic [DATA_W-1:0]            wr_data;
  logic [STRB_W-1:0]            wr_strb;
  logic                         wr_ack, rd_ack;
  logic [NREGS-1:0][DATA_W-1:0] rd_data;
  logic [31:0]                  frames, beats;

  assign info_vec = {8'h00, INFO[INFO_BYTES*8-9:0]};

  axis_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .s_axis, .s_tready, .m_axis, .m_tready, .level());

  axi_lite_endpoint #(.NREGS(NREGS)) u_ep (
    .clk, .rst_n, .s_req(cfg_req), .s_resp(cfg_resp),
    .wr_req, .wr_data, .wr_strb, .wr_ack,
    .rd_req, .rd_data, .rd_ack);
  req_ack #(.N(NREGS)) u_wack (.clk, .rst_n, .req(wr_req), .ack(wr_ack));
  req_ack #(.N(NREGS)) u_rack (.clk, .rst_n, .req(rd_req), .ack(rd_ack));

  always_ff @(posedge clk) begin
    if (!rst_n || (|wr_req && wr_ack)) begin
      frames <= '0;
      beats  <= '0;
    end else if (s_axis.tvalid && s_tready) begin
      beats <= beats + 1;
      if (s_axis.tlast) frames <= frames + 1;
    end
  end

  always_comb begin
    rd_data              = '0;
    rd_data[LOOP_FRAMES] = frames;
    rd_data[LOOP_BEATS]  = beats;
  end
endmodule
