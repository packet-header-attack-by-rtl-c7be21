// switch_allocator: separable input-first switch allocation.
// An input VC is eligible when it holds a flit, owns a downstream VC and that
// downstream VC has a credit. Stage 1 picks one eligible VC per input port,
// stage 2 picks one input port per output port among the stage-1 winners that
// target it. At both stages only the requests carrying the highest packet
// priority (the PR field of the packet's head, 0..3) compete, and round robin
// breaks ties among them. A winner is popped from its VC and crosses the
// crossbar in the same cycle. Arbiter pointers advance only for final grants.
// Combinational grants.
// Ranking packets by PR on port conflicts follows the described header; the
// separable structure and round-robin tie breaking are this design's choice.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int NIN    = 5,
  parameter int NOUT   = 5,
  parameter int NUM_VC = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_VC-1:0]     elig     [NIN],
  input  port_e                 op       [NIN][NUM_VC],
  input  logic [1:0]            pr       [NIN][NUM_VC],   // packet priority
  output logic [NUM_VC-1:0]     pop      [NIN],       // one-hot per input port
  output logic [NOUT-1:0]       out_valid,
  output logic [$clog2(NIN)-1:0] out_sel [NOUT]       // input port driving output
);
  logic [NUM_VC-1:0] s1_req [NIN];
  logic [NUM_VC-1:0] s1_gnt [NIN];
  logic [1:0]        s1_pr  [NIN];
  logic [NIN-1:0]    s1_any;
  port_e             s1_op  [NIN];
  logic [NIN-1:0]    s2_req [NOUT];
  logic [NIN-1:0]    s2_gnt [NOUT];
  logic [NIN-1:0]    in_won;

  for (genvar i = 0; i < NIN; i++) begin : g_in
    always_comb begin
      logic [1:0] top;
      top = '0;
      for (int v = 0; v < NUM_VC; v++) if (elig[i][v] && pr[i][v] > top) top = pr[i][v];
      for (int v = 0; v < NUM_VC; v++) s1_req[i][v] = elig[i][v] && pr[i][v] == top;
    end
    rr_arbiter #(.N(NUM_VC)) u_a1 (.clk, .rst_n, .req(s1_req[i]), .update(in_won[i]), .gnt(s1_gnt[i]));
    always_comb begin
      s1_any[i] = (s1_gnt[i] != '0);
      s1_op[i]  = P_LOCAL;
      s1_pr[i]  = '0;
      for (int v = 0; v < NUM_VC; v++) if (s1_gnt[i][v]) begin s1_op[i] = op[i][v]; s1_pr[i] = pr[i][v]; end
    end
  end

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    always_comb begin
      logic [1:0] top;
      top = '0;
      for (int i = 0; i < NIN; i++)
        if (s1_any[i] && int'(s1_op[i]) == o && s1_pr[i] > top) top = s1_pr[i];
      for (int i = 0; i < NIN; i++)
        s2_req[o][i] = s1_any[i] && (int'(s1_op[i]) == o) && s1_pr[i] == top;
    end
    rr_arbiter #(.N(NIN)) u_a2 (.clk, .rst_n, .req(s2_req[o]), .update(1'b1), .gnt(s2_gnt[o]));
    always_comb begin
      out_valid[o] = (s2_gnt[o] != '0);
      out_sel[o]   = '0;
      for (int i = 0; i < NIN; i++) if (s2_gnt[o][i]) out_sel[o] = $clog2(NIN)'(i);
    end
  end

  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      in_won[i] = 1'b0;
      for (int o = 0; o < NOUT; o++) if (s2_gnt[o][i]) in_won[i] = 1'b1;
      pop[i] = in_won[i] ? s1_gnt[i] : '0;
    end
  end
endmodule
