// axil_bfm: AXI4-Lite master bus-functional model for testbenches (stands
// in for a processor's general-purpose master port). The tasks write() and
// read() run one transaction each and return the response code; they are
// called hierarchically (bfm.write(...)). AW and W are presented together;
// B and R are accepted after a random delay of 0-2 cycles.
module axil_bfm
  import axi_pkg::*;
(
  input  logic        clk,
  output axil_req_t   req,
  input  axil_resp_t  resp
);
  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       output logic [1:0] bresp, input logic [3:0] strb = 4'hF);
    bit aw_done = 0, w_done = 0;
    @(posedge clk);
    req.aw_addr  <= addr;
    req.aw_valid <= 1'b1;
    req.w_data   <= data;
    req.w_strb   <= strb;
    req.w_valid  <= 1'b1;
    do begin
      @(posedge clk);
      if (req.aw_valid && resp.aw_ready) begin aw_done = 1; req.aw_valid <= 1'b0; end
      if (req.w_valid  && resp.w_ready)  begin w_done  = 1; req.w_valid  <= 1'b0; end
    end while (!(aw_done && w_done));
    repeat ($urandom_range(0, 2)) @(posedge clk);
    req.b_ready <= 1'b1;
    do @(posedge clk); while (!resp.b_valid);
    bresp = resp.b_resp;
    req.b_ready <= 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output logic [1:0] rresp);
    @(posedge clk);
    req.ar_addr  <= addr;
    req.ar_valid <= 1'b1;
    do @(posedge clk); while (!resp.ar_ready);
    req.ar_valid <= 1'b0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    req.r_ready <= 1'b1;
    do @(posedge clk); while (!resp.r_valid);
    data  = resp.r_data;
    rresp = resp.r_resp;
    req.r_ready <= 1'b0;
  endtask
endmodule
