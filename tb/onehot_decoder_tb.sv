// onehot_decoder_tb: exhaustive test of onehot_decoder at its default size
// (N = 4) and at N = 5, where indexes 5..7 are out of range. Every index is
// applied with the enable low and high; the expected output is a shifted 1
// when enabled and in range, zero otherwise.
module onehot_decoder_tb;
  int checks = 0, failures = 0;
  logic [1:0] idx4; logic [2:0] idx5;
  logic en;
  logic [3:0] oh4; logic [4:0] oh5;

  onehot_decoder           dut4 (.idx(idx4), .en, .onehot(oh4));
  onehot_decoder #(.N(5))  dut5 (.idx(idx5), .en, .onehot(oh5));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 8; i++) begin
        en = 1'(e); idx4 = 2'(i); idx5 = 3'(i);
        #1;
        if (i < 4) begin
          checks++;
          if (oh4 !== (e ? 4'(1 << i) : 4'h0)) begin
            failures++; $display("N=4 idx=%0d en=%0d: %b", i, e, oh4);
          end
        end
        checks++;
        if (oh5 !== ((e && i < 5) ? 5'(1 << i) : 5'h0)) begin
          failures++; $display("N=5 idx=%0d en=%0d: %b", i, e, oh5);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
