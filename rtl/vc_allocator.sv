// vc_allocator: gives each waiting head flit a VC in the downstream router.
// An input VC requests when its front flit is a head with a computed output
// port and no downstream VC yet. For every output port a round-robin arbiter
// picks one requester per cycle and grants it the lowest-numbered downstream
// VC that is free. A downstream VC is free (ovc_free) when no packet holds it
// and all of its credits are back, i.e. the VC is empty in the downstream
// router; the router derives that from credit exchange. One grant per output
// port per cycle; an input VC asks for only one port, so grants never clash.
// Combinational grant, registered arbiter priority.
// Allocating on availability follows the description; the round-robin order,
// lowest-free-VC choice and whole-VC reuse rule are this design's choice.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int NIN    = 5,
  parameter int NOUT   = 5,
  parameter int NUM_VC = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NIN*NUM_VC-1:0]   req,
  input  port_e                   req_port [NIN*NUM_VC],
  input  logic [NUM_VC-1:0]       ovc_free [NOUT],
  output logic [NIN*NUM_VC-1:0]   grant,
  output logic [VCID_W-1:0]       grant_vc [NIN*NUM_VC],
  output logic [NUM_VC-1:0]       alloc    [NOUT]     // VCs taken this cycle
);
  localparam int NR = NIN * NUM_VC;
  logic [NR-1:0] oreq [NOUT];
  logic [NR-1:0] ogrant [NOUT];
  logic [VCID_W-1:0] ofree_vc [NOUT];
  logic [NOUT-1:0] ofree_any;

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    always_comb begin
      ofree_any[o] = 1'b0;
      ofree_vc[o]  = '0;
      for (int v = NUM_VC - 1; v >= 0; v--)
        if (ovc_free[o][v]) begin
          ofree_any[o] = 1'b1;
          ofree_vc[o]  = VCID_W'(v);
        end
      for (int r = 0; r < NR; r++)
        oreq[o][r] = req[r] && (int'(req_port[r]) == o) && ofree_any[o];
    end
    rr_arbiter #(.N(NR)) u_arb (.clk, .rst_n, .req(oreq[o]), .update(1'b1), .gnt(ogrant[o]));
    always_comb begin
      alloc[o] = '0;
      if (ogrant[o] != '0) alloc[o][ofree_vc[o]] = 1'b1;
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      grant[r]    = 1'b0;
      grant_vc[r] = '0;
      for (int o = 0; o < NOUT; o++)
        if (ogrant[o][r]) begin
          grant[r]    = 1'b1;
          grant_vc[r] = ofree_vc[o];
        end
    end
  end
endmodule
