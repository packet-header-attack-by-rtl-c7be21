// noc_router: five-port virtual-channel wormhole router for a 2D mesh.
// Ports are East, West, North, South and the local tile (PE), each with an
// input_port of NUM_VC VCs holding DEPTH flits. Pipeline of a head flit:
//   cycle t   : flit written into its VC, XY route computed into OP;
//   cycle t+1 : VC allocation of a downstream VC (VCID);
//   cycle t+2+: switch allocation and crossbar traversal, flit registered on
//               the output link, so it reaches the next router at t+3.
// Body and tail flits inherit OP and VCID and need only switch allocation.
// Output side: per output port and downstream VC the router keeps a busy bit
// (held from VC allocation until the last flit of the packet is sent) and a
// credit counter (DEPTH at reset, minus one per sent flit, plus one per
// returned credit). A downstream VC is reallocated only when it is not busy
// and holds all its credits. Credits are returned upstream one cycle after a
// flit leaves an input VC.
// With HT_EN set, a ht_trojan is mounted on the input buffers and can rewrite
// the DID of L1 miss request head flits after route computation and VC
// allocation; the flit then leaves toward the port chosen for the old DID.
// Without HT_EN no Trojan is built and ht_armed and ht_tamper_count stay 0.
// Switch allocation ranks competing packets by the PR field of their head.
// The component list, three VCs of three flits, XY routing, credit-based
// VC availability and PR ranking follow the described router; stage timing,
// round-robin tie breaking and the VC reuse rule are this design's.
module noc_router
  import noc_pkg::*;
#(
  parameter int K         = 4,
  parameter int MY_ID     = 0,
  parameter int NUM_VC    = 3,
  parameter int DEPTH     = 3,
  parameter bit HT_EN     = 1'b0,
  parameter int HT_WINDOW = 100,
  parameter int HT_ACTIVE = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   in_flit    [NPORTS],
  output credit_t credit_out [NPORTS],
  output flit_t   out_flit   [NPORTS],
  input  credit_t credit_in  [NPORTS],
  input  logic    ht_enable,
  output logic    ht_armed,
  output logic [31:0] ht_tamper_count
);
  localparam int CRW = $clog2(DEPTH + 1);
  localparam int SW  = $clog2(NPORTS);

  flit_t              vc_front     [NPORTS][NUM_VC];
  logic [NUM_VC-1:0]  vc_nonempty  [NPORTS];
  logic [NUM_VC-1:0]  vc_busy      [NPORTS];
  logic [PL_W-1:0]    vc_pl        [NPORTS][NUM_VC];
  logic [1:0]         vc_pr        [NPORTS][NUM_VC];
  logic [NUM_VC-1:0]  vc_op_valid  [NPORTS];
  port_e              vc_op        [NPORTS][NUM_VC];
  logic [NUM_VC-1:0]  vc_ovc_valid [NPORTS];
  logic [VCID_W-1:0]  vc_ovc       [NPORTS][NUM_VC];
  logic [NUM_VC-1:0]  va_grant     [NPORTS];
  logic [VCID_W-1:0]  va_vc        [NPORTS][NUM_VC];
  logic [NUM_VC-1:0]  sa_pop       [NPORTS];
  logic [NUM_VC-1:0]  tamper_en    [NPORTS];
  logic [FLIT_W-1:0]  tamper_data  [NPORTS][NUM_VC];

  // ---------------- input ports ----------------
  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    input_port #(.K(K), .NUM_VC(NUM_VC), .DEPTH(DEPTH), .MY_ID(MY_ID)) u_ip (
      .clk, .rst_n,
      .in_flit(in_flit[i]), .credit_out(credit_out[i]),
      .vc_front(vc_front[i]), .vc_nonempty(vc_nonempty[i]), .vc_busy(vc_busy[i]),
      .vc_pl(vc_pl[i]), .vc_op_valid(vc_op_valid[i]), .vc_op(vc_op[i]), .vc_pr(vc_pr[i]),
      .vc_ovc_valid(vc_ovc_valid[i]), .vc_ovc(vc_ovc[i]),
      .va_grant(va_grant[i]), .va_vc(va_vc[i]), .sa_pop(sa_pop[i]),
      .tamper_en(tamper_en[i]), .tamper_data(tamper_data[i])
    );
  end

  // ---------------- output VC state ----------------
  logic              ovc_busy [NPORTS][NUM_VC];
  logic [CRW-1:0]    ovc_cred [NPORTS][NUM_VC];
  logic [NUM_VC-1:0] ovc_free [NPORTS];
  logic [NUM_VC-1:0] ovc_alloc[NPORTS];

  always_comb
    for (int o = 0; o < NPORTS; o++)
      for (int v = 0; v < NUM_VC; v++)
        ovc_free[o][v] = !ovc_busy[o][v] && (ovc_cred[o][v] == CRW'(DEPTH));

  // ---------------- VC allocation ----------------
  logic [NPORTS*NUM_VC-1:0] va_req, va_gnt_flat;
  port_e                    va_port [NPORTS*NUM_VC];
  logic [VCID_W-1:0]        va_vc_flat [NPORTS*NUM_VC];

  always_comb
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < NUM_VC; v++) begin
        va_req[i*NUM_VC+v]  = vc_nonempty[i][v] && vc_front[i][v].ft == FT_HEAD
                              && vc_op_valid[i][v] && !vc_ovc_valid[i][v];
        va_port[i*NUM_VC+v] = vc_op[i][v];
        va_grant[i][v]      = va_gnt_flat[i*NUM_VC+v];
        va_vc[i][v]         = va_vc_flat[i*NUM_VC+v];
      end

  vc_allocator #(.NIN(NPORTS), .NOUT(NPORTS), .NUM_VC(NUM_VC)) u_va (
    .clk, .rst_n, .req(va_req), .req_port(va_port), .ovc_free,
    .grant(va_gnt_flat), .grant_vc(va_vc_flat), .alloc(ovc_alloc)
  );

  // ---------------- switch allocation ----------------
  logic [NUM_VC-1:0] sa_elig [NPORTS];
  logic [NPORTS-1:0] sa_out_valid;
  logic [SW-1:0]     sa_out_sel [NPORTS];

  always_comb
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < NUM_VC; v++)
        sa_elig[i][v] = vc_nonempty[i][v] && vc_ovc_valid[i][v]
                        && ovc_cred[vc_op[i][v]][vc_ovc[i][v]] != '0;

  switch_allocator #(.NIN(NPORTS), .NOUT(NPORTS), .NUM_VC(NUM_VC)) u_sa (
    .clk, .rst_n, .elig(sa_elig), .op(vc_op), .pr(vc_pr), .pop(sa_pop),
    .out_valid(sa_out_valid), .out_sel(sa_out_sel)
  );

  // ---------------- crossbar ----------------
  flit_t             xb_in  [NPORTS];
  logic [VCID_W-1:0] xb_ovc [NPORTS];
  flit_t             xb_out [NPORTS];

  always_comb
    for (int i = 0; i < NPORTS; i++) begin
      xb_in[i]  = '0;
      xb_ovc[i] = '0;
      for (int v = 0; v < NUM_VC; v++)
        if (sa_pop[i][v]) begin
          xb_in[i]  = vc_front[i][v];
          xb_ovc[i] = vc_ovc[i][v];
        end
    end

  crossbar #(.NIN(NPORTS), .NOUT(NPORTS)) u_xb (
    .in_flit(xb_in), .in_ovc(xb_ovc), .out_valid(sa_out_valid), .out_sel(sa_out_sel),
    .out_flit(xb_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) begin
        out_flit[o] <= '0;
        for (int v = 0; v < NUM_VC; v++) begin
          ovc_busy[o][v] <= 1'b0;
          ovc_cred[o][v] <= CRW'(DEPTH);
        end
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        out_flit[o] <= xb_out[o];
        for (int v = 0; v < NUM_VC; v++) begin
          logic sent, back;
          sent = xb_out[o].valid && (xb_out[o].vcid == VCID_W'(v));
          back = credit_in[o].valid && (credit_in[o].vc == VCID_W'(v));
          ovc_cred[o][v] <= ovc_cred[o][v] - CRW'(sent) + CRW'(back);
          if (ovc_alloc[o][v])                 ovc_busy[o][v] <= 1'b1;
          else if (sent && is_last(xb_out[o])) ovc_busy[o][v] <= 1'b0;
        end
      end
    end
  end

  // ---------------- optional Trojan ----------------
  if (HT_EN) begin : g_ht
    ht_trojan #(.K(K), .MY_ID(MY_ID), .NIN(NPORTS), .NUM_VC(NUM_VC),
                .WINDOW(HT_WINDOW), .ACTIVE(HT_ACTIVE)) u_ht (
      .clk, .rst_n, .enable(ht_enable), .vc_front, .vc_op, .va_grant,
      .armed(ht_armed), .tamper_en, .tamper_data, .tamper_count(ht_tamper_count)
    );
  end else begin : g_no_ht
    always_comb
      for (int i = 0; i < NPORTS; i++) begin
        tamper_en[i] = '0;
        for (int v = 0; v < NUM_VC; v++) tamper_data[i][v] = '0;
      end
    assign ht_armed        = 1'b0;
    assign ht_tamper_count = '0;
  end
endmodule
