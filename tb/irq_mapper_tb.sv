// irq_mapper_tb: six sources mapped onto three lines (two sources share
// line 0, one source is not connected). Random source patterns; every line
// must equal the OR of its sources one cycle later.
module irq_mapper_tb;
  localparam int unsigned MAP [6] = '{0, 2, 0, 1, 7, 2};
  logic clk = 0, rst_n = 0;
  logic [5:0] in;
  logic [2:0] out, exp;
  int checks = 0, failures = 0;

  irq_mapper #(.N_IN(6), .N_OUT(3), .MAP(MAP)) dut (.clk, .rst_n, .irq_in(in), .irq_out(out));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in = 6'($urandom);
      exp = {in[1] | in[5], in[3], in[0] | in[2]};
      @(negedge clk);
      checks++;
      if (out != exp) begin failures++; $display("in=%b out=%b exp=%b", in, out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
