// sync_fifo: single-clock first-in first-out queue of DEPTH entries of type T
// with valid/ready handshakes on both sides. The head entry is presented
// from the storage array (first-word fall-through); a push and a pop may
// happen in the same cycle. count reports the fill level so that users can
// look ahead, as the Zynq HP port FIFOs allow.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  T      in_data,
  input  logic  in_valid,
  output logic  in_ready,
  output T      out_data,
  output logic  out_valid,
  input  logic  out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);
  T              mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (int'(count) < DEPTH);
  assign out_valid = (count != 0);
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= nxt(wr_ptr);
      if (pop)  rd_ptr <= nxt(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end
endmodule
