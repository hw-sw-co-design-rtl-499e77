// axis_capture: AXI-Stream Capture. Passes a stream through unchanged and
// copies the TDATA of the beat at beat offset OFFSET (0 = first beat) of every
// frame into a one-entry output stream (cap_data/cap_valid/cap_ready) for
// external logic. Frames shorter than OFFSET+1 beats yield nothing. If the
// previous capture has not been taken yet when the next capture beat arrives,
// the through-stream is stalled at that beat until it is, so no capture is
// lost. Beat position is counted with an axis_sof-style first flag.
module axis_capture
  import axi_pkg::*;
#(
  parameter int unsigned OFFSET = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axis_t             s_axis,
  output logic              s_tready,
  output axis_t             m_axis,
  input  logic              m_tready,
  output logic [DATA_W-1:0] cap_data,
  output logic              cap_valid,
  input  logic              cap_ready
);
  logic [31:0] beat;        // position of the current beat in its frame
  logic        at_offset;
  logic        stall;

  assign at_offset = (beat == OFFSET);
  assign stall     = at_offset && cap_valid && !cap_ready;

  always_comb begin
    m_axis        = s_axis;
    m_axis.tvalid = s_axis.tvalid && !stall;
  end
  assign s_tready = m_tready && !stall;

  wire xfer = s_axis.tvalid && s_tready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat      <= '0;
      cap_valid <= 1'b0;
      cap_data  <= '0;
    end else begin
      if (cap_valid && cap_ready) cap_valid <= 1'b0;
      if (xfer) begin
        beat <= s_axis.tlast ? '0 : beat + 1;
        if (at_offset) begin
          cap_data  <= s_axis.tdata;
          cap_valid <= 1'b1;
        end
      end
    end
  end
endmodule
