// rr_arbiter: round-robin arbiter over N requesters. The grant is one-hot and
// combinational; the search starts at the requester after the last one that
// was granted with update asserted, so every persistent requester is served
// within N grants. Used by the VC and switch allocators.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] gnt
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;       // highest priority requester
  logic [IW-1:0] win;

  // Offsets are scanned from the farthest to the nearest, so the requester
  // closest to ptr is the last one written and wins.
  always_comb begin
    gnt = '0;
    win = '0;
    for (int k = N - 1; k >= 0; k--)
      for (int j = 0; j < N; j++)
        if (req[j] && j == (int'(ptr) + k) % N) begin
          gnt    = '0;
          gnt[j] = 1'b1;
          win    = IW'(j);
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (update && gnt != '0) ptr <= (win == IW'(N-1)) ? '0 : win + 1'b1;
  end
endmodule
