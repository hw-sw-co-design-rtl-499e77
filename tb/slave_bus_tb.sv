// slave_bus_tb: a two-slot slave bus (accelerator sizes 4 KiB and 12 KiB,
// controllers FIFO and SDMA) with behavioural AXI4-Lite slaves behind it.
// The expected address map is worked out by hand in this file: info block
// at the bridge base, then accelerator 0, accelerator 1 (12 KiB rounded up
// to 16 KiB and aligned to it), controller 0 and controller 1. Checks: the
// RSoC Info registers (negation, version, region count, offset and each
// descriptor), that accesses reach the right slave with the address
// rebased to zero, writes land, and an address outside every region gets
// DECERR.
module slave_bus_tb;
  import axi_pkg::*;
  import plat_pkg::*;
  import rsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req; axil_resp_t resp;
  axil_req_t acc_req [2], ctrl_req [2];
  axil_resp_t acc_resp [2], ctrl_resp [2];
  logic [31:0] la [4]; int hits [4];
  int checks = 0, failures = 0;

  localparam addr_t ASZ [2] = '{32'h1000, 32'h3000};
  localparam addr_t CSZ [2] = '{32'h1000, 32'h1000};
  localparam ctrl_type_e CT [2] = '{CTRL_FIFO, CTRL_SDMA};
  slave_bus #(.N_ACC(2), .BRIDGE_BASE(32'h4000_0000), .ACC_SIZE(ASZ), .CTRL_SIZE(CSZ), .CTRL_TYPE(CT))
    dut (.clk, .rst_n, .s_req(req), .s_resp(resp), .acc_req, .acc_resp, .ctrl_req, .ctrl_resp);
  axil_bfm bfm (.clk, .req, .resp);
  axil_slave_model #(.TAG(32'hA000_0000)) sa0 (.clk, .rst_n, .req(acc_req[0]),  .resp(acc_resp[0]),  .last_addr(la[0]), .hits(hits[0]));
  axil_slave_model #(.TAG(32'hA100_0000)) sa1 (.clk, .rst_n, .req(acc_req[1]),  .resp(acc_resp[1]),  .last_addr(la[1]), .hits(hits[1]));
  axil_slave_model #(.TAG(32'hC000_0000)) sc0 (.clk, .rst_n, .req(ctrl_req[0]), .resp(ctrl_resp[0]), .last_addr(la[2]), .hits(hits[2]));
  axil_slave_model #(.TAG(32'hC100_0000)) sc1 (.clk, .rst_n, .req(ctrl_req[1]), .resp(ctrl_resp[1]), .last_addr(la[3]), .hits(hits[3]));
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask

  // hand-computed map: region k = acc0, acc1, ctrl0, ctrl1
  localparam logic [31:0] EBASE [4] = '{32'h4000_1000, 32'h4000_4000, 32'h4000_8000, 32'h4000_9000};
  localparam logic [31:0] ESIZE [4] = '{32'h1000, 32'h4000, 32'h1000, 32'h1000};
  localparam logic [31:0] EINFO [4] = '{32'h0000_0001, 32'h0000_0101, 32'h0001_0002, 32'h0002_0102};
  localparam logic [31:0] ETAG  [4] = '{32'hA000_0000, 32'hA100_0000, 32'hC000_0000, 32'hC100_0000};

  initial begin
    logic [31:0] d; logic [1:0] r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    bfm.write(32'h4000_0000, 32'h1234_5678, r); chk("NEG write resp", r, RESP_OKAY);
    bfm.read(32'h4000_0000, d, r); chk("NEG", d, 32'hEDCB_A987);
    bfm.read(32'h4000_0004, d, r); chk("VERSION", d, 32'h1);
    bfm.read(32'h4000_0008, d, r); chk("REGIONS", d, 4);
    bfm.read(32'h4000_000C, d, r); chk("REGION_OFF", d, 32'h10);
    for (int k = 0; k < 4; k++) begin
      bfm.read(32'h4000_0010 + 16 * k, d, r);     chk($sformatf("INFO %0d", k), d, EINFO[k]);
      bfm.read(32'h4000_0014 + 16 * k, d, r);     chk($sformatf("BASE %0d", k), d, EBASE[k]);
      bfm.read(32'h4000_0018 + 16 * k, d, r);     chk($sformatf("SIZE %0d", k), d, ESIZE[k]);
    end
    for (int k = 0; k < 4; k++) begin
      logic [31:0] off;
      for (int t = 0; t < 4; t++) begin
        off = 32'(4 * $urandom_range(0, 15)) + ((k == 1) ? 32'h1000 * $urandom_range(0, 3) : 0);
        bfm.write(EBASE[k] + off, 32'h100 * k + t, r); chk("write resp", r, RESP_OKAY);
        chk($sformatf("rebased write address slave %0d", k), la[k], off);
        bfm.read(EBASE[k] + off, d, r);
        chk($sformatf("read slave %0d", k), d, (32'h100 * k + t) ^ ETAG[k]);
        chk($sformatf("rebased read address slave %0d", k), la[k], off);
      end
    end
    for (int k = 0; k < 4; k++) chk($sformatf("hits slave %0d", k), hits[k], 8);
    bfm.read(32'h4000_2000, d, r); chk("gap DECERR", r, RESP_DECERR);
    bfm.read(32'h4000_A000, d, r); chk("past end DECERR", r, RESP_DECERR);
    bfm.write(32'h3FFF_FFFC, 1, r); chk("below base DECERR", r, RESP_DECERR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
