// axi_1ton_tb: an axi_1ton with three slaves (4 KiB at 0x4000_0000, 8 KiB
// at 0x4000_2000, 4 KiB at 0x4000_4000), each a behavioural register
// slave. Random writes and reads across the whole window and beyond it:
// each access must reach exactly the owning slave (reads come back with
// that slave's tag), data must round-trip, and unowned addresses must be
// answered with DECERR without reaching any slave.
module axi_1ton_tb;
  import axi_pkg::*;
  localparam logic [31:0] BASE [3] = '{32'h4000_0000, 32'h4000_2000, 32'h4000_4000};
  localparam logic [31:0] SIZE [3] = '{32'h1000, 32'h2000, 32'h1000};
  localparam logic [31:0] TAG  [3] = '{32'h1111_0000, 32'h2222_0000, 32'h3333_0000};
  logic clk = 0, rst_n = 0;
  axil_req_t req, mreq [3]; axil_resp_t resp, mresp [3];
  logic [31:0] last [3]; int hits [3];
  int checks = 0, failures = 0, decerrs = 0;
  logic [31:0] refm [3][16];

  axi_1ton #(.N(3), .BASE(BASE), .SIZE(SIZE)) dut (.clk, .rst_n, .s_req(req), .s_resp(resp),
                                                  .m_req(mreq), .m_resp(mresp));
  axil_bfm bfm (.clk, .req, .resp);
  for (genvar k = 0; k < 3; k++) begin : g_s
    axil_slave_model #(.TAG(TAG[k])) u_s (.clk, .rst_n, .req(mreq[k]), .resp(mresp[k]), .last_addr(last[k]), .hits(hits[k]));
  end
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int owner(logic [31:0] a);
    for (int k = 0; k < 3; k++) if ((a & ~(SIZE[k] - 1)) == BASE[k]) return k;
    return -1;
  endfunction

  initial begin
    logic [1:0] r; logic [31:0] a, d, v; int o, h0 [3];
    for (int k = 0; k < 3; k++) for (int i = 0; i < 16; i++) refm[k][i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      a = 32'h4000_0000 + (32'($urandom_range(0, 24)) << 10) + (32'($urandom_range(0, 15)) << 2);
      o = owner(a);
      for (int k = 0; k < 3; k++) h0[k] = hits[k];
      if ($urandom_range(0, 1)) begin
        v = $urandom;
        bfm.write(a, v, r);
        if (o >= 0) refm[o][a[5:2]] = v;
      end else begin
        bfm.read(a, d, r);
        if (o >= 0) begin
          checks++;
          if (d != (refm[o][a[5:2]] ^ TAG[o])) begin failures++; $display("read %h = %h", a, d); end
        end
      end
      checks++;
      if (o < 0) begin
        decerrs++;
        if (r != RESP_DECERR || hits[0] != h0[0] || hits[1] != h0[1] || hits[2] != h0[2]) begin
          failures++; $display("unowned %h: resp %0d", a, r);
        end
      end else begin
        for (int k = 0; k < 3; k++)
          if ((hits[k] != h0[k]) != (k == o)) begin failures++; $display("%h routed wrongly", a); end
        if (r != RESP_OKAY || last[o] != a) begin failures++; $display("%h: resp %0d addr %h", a, r, last[o]); end
      end
    end
    checks++; if (decerrs == 0) begin failures++; $display("no decode error exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
