// gen_mux_tb: tests gen_mux at its default size (4 x 32 bits) and at 5 x 16
// bits, where selects 5..7 are out of range and must give zero. Random input
// words, every select value, 20 rounds; the expected output is taken from
// the testbench's own copy of the inputs.
module gen_mux_tb;
  int checks = 0, failures = 0;
  logic [3:0][31:0] d4; logic [1:0] s4; logic [31:0] y4;
  logic [4:0][15:0] d5; logic [2:0] s5; logic [15:0] y5;
  logic [31:0] w4 [4];
  logic [15:0] w5 [5];

  gen_mux                  dut4 (.d(d4), .sel(s4), .y(y4));
  gen_mux #(.N(5), .W(16)) dut5 (.d(d5), .sel(s5), .y(y5));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 4; i++) begin w4[i] = $urandom; d4[i] = w4[i]; end
      for (int i = 0; i < 5; i++) begin w5[i] = 16'($urandom); d5[i] = w5[i]; end
      for (int s = 0; s < 8; s++) begin
        s4 = 2'(s); s5 = 3'(s);
        #1;
        if (s < 4) begin
          checks++;
          if (y4 !== w4[s]) begin failures++; $display("4x32 sel=%0d: %h, expected %h", s, y4, w4[s]); end
        end
        checks++;
        if (y5 !== ((s < 5) ? w5[s] : 16'h0)) begin failures++; $display("5x16 sel=%0d: %h", s, y5); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
