// axi_nto1_tb: three AXI4 burst masters share one memory through axi_nto1.
// Each master writes and reads back random bursts (1..16 beats) in its own
// address range at the same time as the others, so the round-robin read and
// write arbiters are exercised under contention. Checks: every read word
// matches what its master wrote, BID/RID return to the right master, the
// memory sees no burst protocol error, each master is served, and the
// bursts reaching the memory equal the bursts issued.
module axi_nto1_tb;
  import axi_pkg::*;
  localparam int N = 3;
  localparam logic [31:0] MB = 32'h0010_0000;
  logic clk = 0, rst_n = 0;
  axi_req_t s_req [N]; axi_resp_t s_resp [N];
  axi_req_t m_req; axi_resp_t m_resp;
  int merr, nrd, nwr;
  int checks = 0, failures = 0;
  int done_cnt = 0;
  int wr_issued = 0, rd_issued = 0;

  axi_nto1 #(.N(N)) dut (.clk, .rst_n, .s_req, .s_resp, .m_req, .m_resp);
  axi_mem_model #(.BASE(MB)) mem (.clk, .rst_n, .req(m_req), .resp(m_resp), .errors(merr), .reads(nrd), .writes(nwr));
  axi_master_bfm #(.ID(4'd1), .TAG(32'h1111_0000)) m0 (.clk, .req(s_req[0]), .resp(s_resp[0]));
  axi_master_bfm #(.ID(4'd2), .TAG(32'h2222_0000)) m1 (.clk, .req(s_req[1]), .resp(s_resp[1]));
  axi_master_bfm #(.ID(4'd3), .TAG(32'h3333_0000)) m2 (.clk, .req(s_req[2]), .resp(s_resp[2]));
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic note(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one traffic thread per master; g selects the hierarchical BFM
  task automatic traffic(input int g);
    logic [1:0] br; logic [ID_W-1:0] bid; int bad, len;
    logic [31:0] a;
    for (int t = 0; t < 30; t++) begin
      len = $urandom_range(0, 15);
      a = MB + 32'(g) * 32'h4000 + 32'(t) * 32'h100 + 32'(4 * $urandom_range(0, 48));
      wr_issued++;
      case (g)
        0: m0.write_burst(a, len, br, bid);
        1: m1.write_burst(a, len, br, bid);
        default: m2.write_burst(a, len, br, bid);
      endcase
      note(br == RESP_OKAY, "bresp");
      note(bid == 4'(g + 1), $sformatf("bid master %0d got %0d", g, bid));
      rd_issued++;
      case (g)
        0: m0.read_burst(a, len, bad);
        1: m1.read_burst(a, len, bad);
        default: m2.read_burst(a, len, bad);
      endcase
      note(bad == 0, $sformatf("read back master %0d burst %0d: %0d bad", g, t, bad));
    end
    done_cnt++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      traffic(0);
      traffic(1);
      traffic(2);
    join
    repeat (5) @(posedge clk);
    note(merr == 0, "memory protocol errors");
    note(nwr == wr_issued, $sformatf("writes %0d vs %0d", nwr, wr_issued));
    note(nrd == rd_issued, $sformatf("reads %0d vs %0d", nrd, rd_issued));
    note(done_cnt == N, "all masters finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
