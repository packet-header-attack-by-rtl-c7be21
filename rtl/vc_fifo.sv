// vc_fifo: the flit storage of one virtual channel, a DEPTH-entry FIFO.
// Writes and reads may happen in the same cycle. Besides push and pop, the
// entry at the front can be rewritten in place (rewrite_en), which is the
// hook the header-tampering Trojan uses while a head flit waits in the VC.
// The upstream router never sends more flits than there are free entries
// (credit flow control), so an overflow is a protocol error and is asserted.
module vc_fifo
  import noc_pkg::*;
#(
  parameter int DEPTH = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  input  logic  rewrite_en,
  input  logic [FLIT_W-1:0] rewrite_data,
  output flit_t front,
  output logic  empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);
  flit_t mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign front = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (rewrite_en && !empty) mem[rd_ptr].data <= rewrite_data;
      if (push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop && !empty) rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop && !empty);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (int'(count) < DEPTH || pop))
    else $error("vc_fifo overflow");
endmodule
