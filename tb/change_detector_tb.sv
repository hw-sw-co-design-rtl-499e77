// change_detector_tb: drives random 4-bit vectors into a change_detector
// with IDLE = 4'b0101 and checks that event_o is high exactly when the
// vector of the previous cycle differed from IDLE.
module change_detector_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] sig, prev;
  logic ev;
  int checks = 0, failures = 0;

  change_detector #(.W(4), .IDLE(4'b0101)) dut (.clk, .rst_n, .sig, .event_o(ev));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sig = 4'b0101;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      prev = sig;
      sig = ($urandom_range(0, 1) == 0) ? 4'b0101 : 4'($urandom);
      @(negedge clk);
      checks++;
      if (ev != (sig != 4'b0101)) begin failures++; $display("t=%0d sig=%b ev=%b", t, sig, ev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
