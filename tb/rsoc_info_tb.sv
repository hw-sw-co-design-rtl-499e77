// rsoc_info_tb: an rsoc_info describing four regions. Reads the header
// (VERSION = 1, REGIONS = 4, REGION_OFF = 0x10) and every descriptor
// (INFO, BASE, SIZE, zero padding) and checks them against the parameters;
// writes random values to NEG and checks the negated read-back, including a
// byte-strobed write; an address past the last descriptor answers SLVERR.
module rsoc_info_tb;
  import axi_pkg::*;
  localparam logic [31:0] B [4] = '{32'h4000_1000, 32'h4000_2000, 32'h4000_3000, 32'h4000_4000};
  localparam logic [31:0] S [4] = '{32'h1000, 32'h1000, 32'h2000, 32'h1000};
  localparam logic [31:0] I [4] = '{32'h0001, 32'h0101, 32'h0102_0002, 32'h0201_0102};
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  int checks = 0, failures = 0;

  rsoc_info #(.NREG(4), .BASE(B), .SIZE(S), .INFO(I)) dut (.clk, .rst_n, .s_req(req), .s_resp(resp));
  axil_bfm bfm (.clk, .req, .resp);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_rd(input logic [31:0] a, input logic [31:0] e);
    logic [31:0] d; logic [1:0] r;
    bfm.read(a, d, r);
    checks++;
    if (d !== e || r != RESP_OKAY) begin failures++; $display("read %h = %h, expected %h", a, d, e); end
  endtask

  initial begin
    logic [31:0] v, d; logic [1:0] r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    expect_rd(32'h00, 32'hFFFF_FFFF);
    expect_rd(32'h04, 32'h0000_0001);
    expect_rd(32'h08, 32'd4);
    expect_rd(32'h0C, 32'h10);
    for (int i = 0; i < 4; i++) begin
      expect_rd(32'h10 + 16*i + 0, I[i]);
      expect_rd(32'h10 + 16*i + 4, B[i]);
      expect_rd(32'h10 + 16*i + 8, S[i]);
      expect_rd(32'h10 + 16*i + 12, 32'h0);
    end
    for (int t = 0; t < 20; t++) begin
      v = $urandom;
      bfm.write(32'h00, v, r);
      expect_rd(32'h00, ~v);
    end
    bfm.write(32'h00, 32'hA5A5_A5A5, r, 4'b0010);
    expect_rd(32'h00, ~{v[31:16], 8'hA5, v[7:0]});
    bfm.read(32'h50, d, r);
    checks++; if (r != RESP_SLVERR) begin failures++; $display("no SLVERR past the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
