// axis_fifo: AXI4-Stream FIFO. Buffers up to DEPTH beats (TDATA, TKEEP,
// TLAST, TUSER) between a stream slave port and a stream master port of the
// same clock. A beat enters when s_axis.tvalid and s_tready are both high
// and is offered at the output from the next cycle (one cycle of latency,
// one beat per cycle of throughput). The queue itself is sync_fifo.
module axis_fifo
  import axi_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  axis_t  s_axis,
  output logic   s_tready,
  output axis_t  m_axis,
  input  logic   m_tready,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  axis_t head;
  logic  head_valid;

  sync_fifo #(.T(axis_t), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .in_data(s_axis), .in_valid(s_axis.tvalid), .in_ready(s_tready),
    .out_data(head), .out_valid(head_valid), .out_ready(m_tready),
    .count(level)
  );

  always_comb begin
    m_axis        = head;
    m_axis.tvalid = head_valid;
  end
endmodule
