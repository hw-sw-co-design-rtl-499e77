// axis_discard: AXI-Stream Discard. Every frame is held at the input until
// external logic issues a command on cmd_valid/cmd_ready: cmd_discard = 0
// passes the frame to the output, cmd_discard = 1 consumes it (TREADY high)
// without forwarding anything. The command is taken in the idle state, even
// before the frame's first beat arrives; the state returns to idle after the
// frame's TLAST beat. Beats pass combinationally (no added latency).
module axis_discard
  import axi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  axis_t  s_axis,
  output logic   s_tready,
  output axis_t  m_axis,
  input  logic   m_tready,
  input  logic   cmd_valid,
  input  logic   cmd_discard,
  output logic   cmd_ready
);
  typedef enum logic [1:0] {WAIT_CMD, PASS, DROP} state_e;
  state_e state;

  assign cmd_ready = (state == WAIT_CMD);

  always_comb begin
    m_axis        = s_axis;
    m_axis.tvalid = (state == PASS) && s_axis.tvalid;
    unique case (state)
      PASS:    s_tready = m_tready;
      DROP:    s_tready = 1'b1;
      default: s_tready = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= WAIT_CMD;
    else begin
      unique case (state)
        WAIT_CMD: if (cmd_valid) state <= cmd_discard ? DROP : PASS;
        PASS, DROP: if (s_axis.tvalid && s_tready && s_axis.tlast) state <= WAIT_CMD;
        default: state <= WAIT_CMD;
      endcase
    end
  end
endmodule
