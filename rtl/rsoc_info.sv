// rsoc_info: RSoC Info, the discovery block the software driver reads when
// it probes the bridge. AXI4-Lite slave (through axi_lite_endpoint and
// req_ack, so each access takes two cycles more than the bus handshakes).
// Address map (byte offsets):
//   0x00 NEG        read/write; reads return the bitwise negation of the last
//                   value written (a liveness check for the driver)
//   0x04 VERSION    0x00000001 (framework version 0.1)
//   0x08 REGIONS    number of region descriptors (2 per accelerator slot)
//   0x0C REGION_OFF 0x10, offset of the first descriptor
//   0x10 + 16*i     descriptor i: INFO(i), BASE(i), SIZE(i), padding (0)
// Descriptors 0..N-1 describe the accelerators' configuration spaces,
// descriptors N..2N-1 the controllers; accelerator i belongs to controller
// i+N. The order inside a descriptor follows the address-space figure of
// the framework (INFO first). All descriptor contents are parameters.
module rsoc_info
  import axi_pkg::*;
  import plat_pkg::*;
  import rsoc_pkg::*;
#(
  parameter int unsigned NREG   = 2,             // number of regions
  parameter addr_t       BASE [NREG] = '{default: '0},
  parameter addr_t       SIZE [NREG] = '{default: 32'h1000},
  parameter logic [31:0] INFO [NREG] = '{default: '0}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_req,
  output axil_resp_t  s_resp
);
  localparam int unsigned NREGS = 4 + 4 * NREG;
  localparam int unsigned REGION_OFF = 32'h10;

  logic [NREGS-1:0]             wr_req, rd_req;
  logic [DATA_W-1:0]            wr_data;
  logic [STRB_W-1:0]            wr_strb;
  logic                         wr_ack, rd_ack;
  logic [NREGS-1:0][DATA_W-1:0] rd_data;
  logic [31:0]                  neg_q;

  axi_lite_endpoint #(.NREGS(NREGS)) u_ep (
    .clk, .rst_n, .s_req, .s_resp,
    .wr_req, .wr_data, .wr_strb, .wr_ack,
    .rd_req, .rd_data, .rd_ack);

  req_ack #(.N(NREGS)) u_wack (.clk, .rst_n, .req(wr_req), .ack(wr_ack));
  req_ack #(.N(NREGS)) u_rack (.clk, .rst_n, .req(rd_req), .ack(rd_ack));

  always_ff @(posedge clk) begin
    if (!rst_n) neg_q <= '0;
    else if (wr_req[0] && wr_ack) neg_q <= misc_pkg::apply_be(neg_q, wr_data, wr_strb);
  end

  always_comb begin
    rd_data    = '0;
    rd_data[0] = ~neg_q;
    rd_data[1] = RSOC_VERSION;
    rd_data[2] = NREG;
    rd_data[3] = REGION_OFF;
    for (int unsigned i = 0; i < NREG; i++) begin
      rd_data[4 + 4*i + 0] = INFO[i];
      rd_data[4 + 4*i + 1] = BASE[i];
      rd_data[4 + 4*i + 2] = SIZE[i];
      rd_data[4 + 4*i + 3] = '0;
    end
  end
endmodule
