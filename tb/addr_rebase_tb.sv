// addr_rebase_tb: checks addr_o = addr_i - OLD_BASE + NEW_BASE for random
// addresses with two base pairs (moving down to 0 and moving up).
module addr_rebase_tb;
  logic [31:0] a, y0, y1;
  int checks = 0, failures = 0;

  addr_rebase #(.OLD_BASE(32'h4000_3000), .NEW_BASE(32'h0)) dut0 (.addr_i(a), .addr_o(y0));
  addr_rebase #(.OLD_BASE(32'h0000_1000), .NEW_BASE(32'h8000_0000)) dut1 (.addr_i(a), .addr_o(y1));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      a = (t < 500) ? 32'h4000_3000 + 32'($urandom_range(0, 4095)) : $urandom;
      #1;
      checks += 2;
      if (y0 != a - 32'h4000_3000) begin failures++; $display("rebase0 %h -> %h", a, y0); end
      if (y1 != a - 32'h0000_1000 + 32'h8000_0000) begin failures++; $display("rebase1 %h -> %h", a, y1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
