// addr_rebase: moves an address from one base to another by inserting an
// adder into the address path: addr_o = addr_i - OLD_BASE + NEW_BASE. Both
// bases are fixed at elaboration and folded into one constant offset, so the
// block is a single combinational adder with no latency.
module addr_rebase
  import plat_pkg::*;
#(
  parameter addr_t OLD_BASE = 32'h4000_0000,
  parameter addr_t NEW_BASE = 32'h0000_0000
) (
  input  addr_t addr_i,
  output addr_t addr_o
);
  localparam addr_t OFFSET = NEW_BASE - OLD_BASE;
  assign addr_o = addr_i + OFFSET;
endmodule
