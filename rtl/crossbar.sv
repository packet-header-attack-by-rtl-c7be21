// crossbar: NIN x NOUT flit crossbar. Each output takes the flit of the input
// port its select names, when its valid is set; otherwise it carries an idle
// flit. The VCID of the outgoing flit is replaced by the downstream VC the
// packet was allocated. Purely combinational; the router registers the
// outputs onto the links.
module crossbar
  import noc_pkg::*;
#(
  parameter int NIN  = 5,
  parameter int NOUT = 5
) (
  input  flit_t                   in_flit  [NIN],
  input  logic  [VCID_W-1:0]      in_ovc   [NIN],
  input  logic  [NOUT-1:0]        out_valid,
  input  logic  [$clog2(NIN)-1:0] out_sel  [NOUT],
  output flit_t                   out_flit [NOUT]
);
  always_comb
    for (int o = 0; o < NOUT; o++) begin
      out_flit[o] = '0;
      if (out_valid[o]) begin
        out_flit[o]       = in_flit[out_sel[o]];
        out_flit[o].valid = 1'b1;
        out_flit[o].vcid  = in_ovc[out_sel[o]];
      end
    end
endmodule
