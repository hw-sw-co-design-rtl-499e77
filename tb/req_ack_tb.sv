// req_ack_tb: a requester holds one of 8 request lines until it sees ack,
// then drops it. Checks that ack comes exactly one cycle after the request
// rises, lasts one cycle, and never comes without a request.
module req_ack_tb;
  logic clk = 0, rst_n = 0;
  logic [7:0] req;
  logic ack;
  int checks = 0, failures = 0;

  req_ack #(.N(8)) dut (.clk, .rst_n, .req, .ack);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      int lat;
      // idle gap: no ack allowed
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk);
        checks++; if (ack) begin failures++; $display("spurious ack"); end
      end
      req <= 8'(1) << $urandom_range(0, 7);
      lat = 0;
      do begin @(posedge clk); lat++; end while (!ack && lat < 10);
      checks++;
      if (lat != 2) begin failures++; $display("ack latency %0d", lat); end
      req <= '0;
      @(posedge clk);
      checks++; if (ack) begin failures++; $display("ack longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
