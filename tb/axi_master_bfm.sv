// axi_master_bfm: behavioural AXI4 burst master for testbenches. Signals
// change on the falling clock edge and are sampled on the rising edge.
// write_burst() sends an INCR burst of len+1 words whose data is
// pattern(addr) and returns BRESP and BID; read_burst() reads a burst and
// counts the words that differ from pattern(addr), also checking RLAST and
// RID. ID, CACHE and USER come from the ID/CACHE/USER parameters so that
// an interconnect's routing and attribute rewriting can be observed.
module axi_master_bfm
  import axi_pkg::*;
#(
  parameter logic [ID_W-1:0] ID    = '0,
  parameter logic [3:0]      CACHE = 4'b0000,
  parameter logic [31:0]     TAG   = 32'h0
) (
  input  logic       clk,
  output axi_req_t   req,
  input  axi_resp_t  resp
);
  initial req = '0;

  function automatic logic [31:0] pattern(logic [31:0] a);
    return (a * 32'h9E37_79B9) ^ TAG;
  endfunction

  task automatic write_burst(input logic [31:0] addr, input int len,
                             output logic [1:0] bresp, output logic [ID_W-1:0] bid);
    @(negedge clk);
    req.aw_valid = 1; req.aw_addr = addr; req.aw_len = 8'(len); req.aw_size = 3'd2;
    req.aw_burst = BURST_INCR; req.aw_id = ID; req.aw_cache = CACHE; req.aw_user = 1'b0;
    do @(posedge clk); while (!resp.aw_ready);
    @(negedge clk); req.aw_valid = 0;
    for (int i = 0; i <= len; i++) begin
      req.w_valid = 1; req.w_data = pattern(addr + 32'(4 * i)); req.w_strb = 4'hF;
      req.w_last = (i == len);
      do @(posedge clk); while (!resp.w_ready);
      @(negedge clk);
    end
    req.w_valid = 0; req.w_last = 0; req.b_ready = 1;
    do @(posedge clk); while (!resp.b_valid);
    bresp = resp.b_resp; bid = resp.b_id;
    @(negedge clk); req.b_ready = 0;
  endtask

  task automatic read_burst(input logic [31:0] addr, input int len, output int bad);
    bad = 0;
    @(negedge clk);
    req.ar_valid = 1; req.ar_addr = addr; req.ar_len = 8'(len); req.ar_size = 3'd2;
    req.ar_burst = BURST_INCR; req.ar_id = ID; req.ar_cache = CACHE; req.ar_user = 1'b0;
    do @(posedge clk); while (!resp.ar_ready);
    @(negedge clk); req.ar_valid = 0; req.r_ready = 1;
    for (int i = 0; i <= len; i++) begin
      do @(posedge clk); while (!resp.r_valid);
      if (resp.r_data != pattern(addr + 32'(4 * i))) bad++;
      if (resp.r_last != (i == len)) bad++;
      if (resp.r_id != ID) bad++;
      if (resp.r_resp != RESP_OKAY) bad++;
    end
    @(negedge clk); req.r_ready = 0;
  endtask
endmodule
