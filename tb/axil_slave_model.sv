// axil_slave_model: behavioural AXI4-Lite slave for testbenches: 16 words
// of storage indexed by address bits [5:2], READY/VALID after random
// delays. Reads return the stored word XOR TAG so that a testbench can tell
// which slave answered; last_addr keeps the last address it saw. No
// request is taken while rst_n is low.
module axil_slave_model
  import axi_pkg::*;
#(
  parameter logic [31:0] TAG = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   req,
  output axil_resp_t  resp,
  output logic [31:0] last_addr,
  output int          hits
);
  logic [31:0] mem [16];
  initial begin
    resp = '0; hits = 0; last_addr = '0;
    for (int i = 0; i < 16; i++) mem[i] = '0;
  end

  initial forever begin
    logic [31:0] a;
    @(posedge clk);
    if (rst_n && req.aw_valid) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      resp.aw_ready <= 1; @(posedge clk); resp.aw_ready <= 0;
      a = req.aw_addr; last_addr = a; hits++;
      resp.w_ready <= 1;
      do @(posedge clk); while (!req.w_valid);
      resp.w_ready <= 0;
      mem[a[5:2]] = misc_pkg::apply_be(mem[a[5:2]], req.w_data, req.w_strb);
      resp.b_valid <= 1; resp.b_resp <= RESP_OKAY;
      do @(posedge clk); while (!req.b_ready);
      resp.b_valid <= 0;
    end
  end

  initial forever begin
    logic [31:0] a;
    @(posedge clk);
    if (rst_n && req.ar_valid) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      resp.ar_ready <= 1; @(posedge clk); resp.ar_ready <= 0;
      a = req.ar_addr; last_addr = a; hits++;
      repeat ($urandom_range(0, 2)) @(posedge clk);
      resp.r_valid <= 1; resp.r_data <= mem[a[5:2]] ^ TAG; resp.r_resp <= RESP_OKAY;
      do @(posedge clk); while (!req.r_ready);
      resp.r_valid <= 0;
    end
  end
endmodule
