// axi_mem_model: behavioural AXI4 slave memory for testbenches (stands in
// for a processor's HP/ACP port and the DDR behind it). MEM_BYTES of byte
// storage at BASE; INCR bursts, one read and one write burst at a time,
// READY and VALID raised after random delays when STALL is set. Addresses
// outside the window answer SLVERR. It counts protocol violations the
// design must never make (a burst longer than 16 beats, a burst crossing a
// 4 KiB boundary, a WLAST in the wrong place) in errors, and remembers the
// AxCACHE/AxUSER of the last requests. No request is taken while rst_n is
// low, so values on the bus before reset are ignored.
module axi_mem_model
  import axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 65536,
  parameter logic [31:0] BASE      = 32'h0010_0000,
  parameter bit          STALL     = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axi_req_t    req,
  output axi_resp_t   resp,
  output int          errors,
  output int          reads,
  output int          writes
);
  logic [7:0] mem [MEM_BYTES];
  logic [3:0] last_ar_cache, last_aw_cache;
  logic       last_ar_user, last_aw_user;

  initial begin
    resp = '0; errors = 0; reads = 0; writes = 0;
    for (int i = 0; i < MEM_BYTES; i++) mem[i] = 8'(i * 7 + 3);
  end

  function automatic bit in_win(logic [31:0] a);
    return (a >= BASE) && (a < BASE + MEM_BYTES);
  endfunction
  function automatic void check_burst(logic [31:0] a, logic [7:0] len);
    if (len > 15) errors++;
    if ((a & 32'hFFFF_F000) != ((a + (32'(len) << 2)) & 32'hFFFF_F000)) errors++;
  endfunction

  // read channel
  initial begin : rd_chan
    logic [31:0] ra; logic [7:0] rlen; logic [ID_W-1:0] rid;
    forever begin
      @(posedge clk);
      if (rst_n && req.ar_valid) begin
        if (STALL) repeat ($urandom_range(0, 3)) @(posedge clk);
        resp.ar_ready <= 1'b1;
        @(posedge clk);
        resp.ar_ready <= 1'b0;
        ra = req.ar_addr; rlen = req.ar_len; rid = req.ar_id;
        last_ar_cache = req.ar_cache; last_ar_user = req.ar_user;
        check_burst(ra, rlen);
        reads++;
        for (int rb = 0; rb <= int'(rlen); rb++) begin
          int gap;
          gap = STALL ? $urandom_range(0, 2) : 0;
          if (gap > 0) begin
            resp.r_valid <= 1'b0;
            repeat (gap) @(posedge clk);
          end
          resp.r_valid <= 1'b1;
          resp.r_id    <= rid;
          resp.r_last  <= (rb == int'(rlen));
          resp.r_resp  <= in_win(ra) ? RESP_OKAY : RESP_SLVERR;
          for (int k = 0; k < 4; k++)
            resp.r_data[8*k +: 8] <= in_win(ra) ? mem[ra - BASE + k] : 8'h00;
          do @(posedge clk); while (!req.r_ready);
          ra += 4;
        end
        resp.r_valid <= 1'b0;
        resp.r_last  <= 1'b0;
      end
    end
  end

  // write channel
  initial begin : wr_chan
    logic [31:0] wa; logic [7:0] wlen; logic [ID_W-1:0] wid; bit werr;
    forever begin
      @(posedge clk);
      if (rst_n && req.aw_valid) begin
        if (STALL) repeat ($urandom_range(0, 3)) @(posedge clk);
        resp.aw_ready <= 1'b1;
        @(posedge clk);
        resp.aw_ready <= 1'b0;
        wa = req.aw_addr; wlen = req.aw_len; wid = req.aw_id; werr = 0;
        last_aw_cache = req.aw_cache; last_aw_user = req.aw_user;
        check_burst(wa, wlen);
        writes++;
        for (int wb = 0; wb <= int'(wlen); wb++) begin
          int gap;
          gap = STALL ? $urandom_range(0, 2) : 0;
          if (gap > 0) begin
            resp.w_ready <= 1'b0;
            repeat (gap) @(posedge clk);
          end
          resp.w_ready <= 1'b1;
          do @(posedge clk); while (!req.w_valid);
          if (req.w_last != (wb == int'(wlen))) errors++;
          if (!in_win(wa)) werr = 1;
          else for (int k = 0; k < 4; k++)
            if (req.w_strb[k]) mem[wa - BASE + k] = req.w_data[8*k +: 8];
          wa += 4;
        end
        resp.w_ready <= 1'b0;
        resp.b_valid <= 1'b1;
        resp.b_id    <= wid;
        resp.b_resp  <= werr ? RESP_SLVERR : RESP_OKAY;
        do @(posedge clk); while (!req.b_ready);
        resp.b_valid <= 1'b0;
      end
    end
  end
endmodule
