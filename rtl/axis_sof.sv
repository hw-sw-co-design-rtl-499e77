// axis_sof: AXI-Stream Start of Frame detector. The stream protocol marks
// only the end of a frame (TLAST). This monitor remembers whether the last
// transfer it saw carried TLAST (true after reset) and asserts sof while the
// current beat on the stream is therefore the first beat of a frame. sof is
// combinational from the stream's tvalid; the monitor never stalls the
// stream.
module axis_sof (
  input  logic clk,
  input  logic rst_n,
  input  logic tvalid,
  input  logic tready,
  input  logic tlast,
  output logic sof
);
  logic first;   // next transfer starts a frame

  always_ff @(posedge clk) begin
    if (!rst_n)                first <= 1'b1;
    else if (tvalid && tready) first <= tlast;
  end

  assign sof = tvalid && first;
endmodule
