// axis_sof_tb: random frames (1-6 beats) with random valid/ready stalls.
// The reference marks the first beat after reset or after a TLAST transfer;
// sof must match it on every cycle with tvalid high and be low otherwise.
module axis_sof_tb;
  logic clk = 0, rst_n = 0;
  logic tvalid, tready, tlast, sof;
  int checks = 0, failures = 0, sofs = 0;
  bit first = 1;
  int left;

  axis_sof dut (.clk, .rst_n, .tvalid, .tready, .tlast, .sof);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tvalid = 0; tready = 0; tlast = 0;
    left = $urandom_range(1, 6);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      tvalid = $urandom_range(0, 3) != 0;
      tready = $urandom_range(0, 3) != 0;
      tlast  = (left == 1);
      #1;
      checks++;
      if (sof != (tvalid && first)) begin failures++; $display("t=%0d sof=%b exp=%b", t, sof, tvalid && first); end
      if (sof && tready) sofs++;
      @(posedge clk);
      if (tvalid && tready) begin
        first = tlast;
        left = tlast ? $urandom_range(1, 6) : left - 1;
      end
    end
    checks++; if (sofs < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
