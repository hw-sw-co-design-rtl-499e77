// master_bus_tb: four controller masters, three PS ports. Controller 0 is
// routed to port 0 (non-coherent, like an HP port), controllers 1 and 2
// share port 1 (coherent, like the ACP), port 2 has no controller and
// controller 3 is unconnected. Checks: each burst reaches the memory of its
// port (counted per port and checked byte by byte in the port's memory),
// reads return the written data, the coherent port carries USER=1 and
// CACHE bit 1 set while the non-coherent port carries USER=0 and CACHE=0,
// and the idle port and unconnected controller stay quiet.
module master_bus_tb;
  import axi_pkg::*;
  localparam logic [31:0] MB = 32'h0010_0000;
  logic clk = 0, rst_n = 0;
  axi_req_t c_req [4]; axi_resp_t c_resp [4];
  axi_req_t p_req [3]; axi_resp_t p_resp [3];
  int e0, r0, w0, e1, r1, w1;
  int checks = 0, failures = 0;

  localparam int unsigned PORT_OF [4] = '{0, 1, 1, 3};
  localparam bit COHERENT [3] = '{1'b0, 1'b1, 1'b0};
  master_bus #(.N_CTRL(4), .N_PORTS(3), .PORT_OF(PORT_OF), .PORT_COHERENT(COHERENT))
    dut (.clk, .rst_n, .c_req, .c_resp, .p_req, .p_resp);
  axi_mem_model #(.BASE(MB)) mem0 (.clk, .rst_n, .req(p_req[0]), .resp(p_resp[0]), .errors(e0), .reads(r0), .writes(w0));
  axi_mem_model #(.BASE(MB)) mem1 (.clk, .rst_n, .req(p_req[1]), .resp(p_resp[1]), .errors(e1), .reads(r1), .writes(w1));
  assign p_resp[2] = '0;
  axi_master_bfm #(.ID(4'd0), .CACHE(4'b0011), .TAG(32'hA0)) m0 (.clk, .req(c_req[0]), .resp(c_resp[0]));
  axi_master_bfm #(.ID(4'd1), .CACHE(4'b0011), .TAG(32'hA1)) m1 (.clk, .req(c_req[1]), .resp(c_resp[1]));
  axi_master_bfm #(.ID(4'd2), .CACHE(4'b0001), .TAG(32'hA2)) m2 (.clk, .req(c_req[2]), .resp(c_resp[2]));
  initial c_req[3] = '0;
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic note(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // words expected in a port memory after a master's write
  function automatic logic [31:0] pat(logic [31:0] tag, logic [31:0] a);
    return (a * 32'h9E37_79B9) ^ tag;
  endfunction
  function automatic logic [31:0] word_of0(logic [31:0] a);
    return {mem0.mem[a-MB+3], mem0.mem[a-MB+2], mem0.mem[a-MB+1], mem0.mem[a-MB]};
  endfunction
  function automatic logic [31:0] word_of1(logic [31:0] a);
    return {mem1.mem[a-MB+3], mem1.mem[a-MB+2], mem1.mem[a-MB+1], mem1.mem[a-MB]};
  endfunction

  int n0 = 0, n1 = 0, n2 = 0;
  bit quiet = 1;
  always @(posedge clk) begin
    if (p_req[2] != '0) quiet = 0;
    if (c_resp[3] != '0) quiet = 0;
    if (p_req[0].ar_valid && (p_req[0].ar_user != 0 || p_req[0].ar_cache != 0)) quiet = 0;
    if (p_req[0].aw_valid && (p_req[0].aw_user != 0 || p_req[0].aw_cache != 0)) quiet = 0;
    if (p_req[1].ar_valid && (p_req[1].ar_user != 1 || !p_req[1].ar_cache[1])) quiet = 0;
    if (p_req[1].aw_valid && (p_req[1].aw_user != 1 || !p_req[1].aw_cache[1])) quiet = 0;
  end

  initial begin
    logic [1:0] br; logic [ID_W-1:0] bid; int bad;
    logic [31:0] a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int t = 0; t < 12; t++) begin
        a = MB + 32'h0000 + 32'h100 * t;
        m0.write_burst(a, 7, br, bid); n0++;
        note(word_of0(a + 12) == pat(32'hA0, a + 12), "ctrl0 data in port 0 memory");
        m0.read_burst(a, 7, bad); note(bad == 0, "ctrl0 read back");
      end
      for (int t = 0; t < 12; t++) begin : t1
        logic [31:0] a1;
        a1 = MB + 32'h4000 + 32'h100 * t;
        m1.write_burst(a1, 15, br, bid); n1++;
        note(word_of1(a1 + 60) == pat(32'hA1, a1 + 60), "ctrl1 data in port 1 memory");
        m1.read_burst(a1, 15, bad); note(bad == 0, "ctrl1 read back");
      end
      for (int t = 0; t < 12; t++) begin : t2
        logic [31:0] a2;
        a2 = MB + 32'h8000 + 32'h100 * t;
        m2.write_burst(a2, 3, br, bid); n2++;
        note(word_of1(a2) == pat(32'hA2, a2), "ctrl2 data in port 1 memory");
        m2.read_burst(a2, 3, bad); note(bad == 0, "ctrl2 read back");
      end
    join
    repeat (5) @(posedge clk);
    note(w0 == n0 && r0 == n0, $sformatf("port 0 bursts w%0d r%0d vs %0d", w0, r0, n0));
    note(w1 == n1 + n2 && r1 == n1 + n2, $sformatf("port 1 bursts w%0d r%0d vs %0d", w1, r1, n1 + n2));
    note(mem1.last_ar_user == 1 && mem1.last_aw_cache[1], "coherent attributes");
    note(mem0.last_ar_user == 0 && mem0.last_aw_cache == 0, "non-coherent attributes");
    note(quiet, "port attributes / idle port / unconnected controller");
    note(e0 == 0 && e1 == 0, "memory protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
