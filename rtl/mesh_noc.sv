// mesh_noc: K x K mesh of noc_router instances. Router n sits at column
// n % K and row n / K (row 0 is the south edge), and its East, West, North
// and South ports connect to its neighbours with a flit link in each
// direction and a credit link running against it. Ports on the mesh edge
// are tied off: nothing enters them and XY routing never sends anything out
// of them. The local ports are brought out for the tiles' network adapters.
// When HT_EN is set, router HT_NODE carries the header-tampering Trojan
// (router 5, a central router, by default); all other routers are clean.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int K         = 4,
  parameter int NUM_VC    = 3,
  parameter int DEPTH     = 3,
  parameter bit HT_EN     = 1'b1,
  parameter int HT_NODE   = 5,
  parameter int HT_WINDOW = 100,
  parameter int HT_ACTIVE = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   inj_flit   [K*K],
  output credit_t inj_credit [K*K],
  output flit_t   ej_flit    [K*K],
  input  credit_t ej_credit  [K*K],
  input  logic    ht_enable,
  output logic    ht_armed,
  output logic [31:0] ht_tamper_count
);
  localparam int N = K * K;

  flit_t   r_in   [N][NPORTS];
  flit_t   r_out  [N][NPORTS];
  credit_t r_cin  [N][NPORTS];
  credit_t r_cout [N][NPORTS];
  logic        armed [N];
  logic [31:0] tcnt  [N];

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int X = n % K;
    localparam int Y = n / K;

    // East input comes from the router to the east (its West output), etc.
    if (X < K - 1) begin : g_e
      assign r_in[n][P_EAST] = r_out[n+1][P_WEST];
      assign r_cin[n][P_EAST] = r_cout[n+1][P_WEST];
    end else begin : g_e0
      assign r_in[n][P_EAST] = '0;
      assign r_cin[n][P_EAST] = '0;
    end
    if (X > 0) begin : g_w
      assign r_in[n][P_WEST] = r_out[n-1][P_EAST];
      assign r_cin[n][P_WEST] = r_cout[n-1][P_EAST];
    end else begin : g_w0
      assign r_in[n][P_WEST] = '0;
      assign r_cin[n][P_WEST] = '0;
    end
    if (Y < K - 1) begin : g_n
      assign r_in[n][P_NORTH] = r_out[n+K][P_SOUTH];
      assign r_cin[n][P_NORTH] = r_cout[n+K][P_SOUTH];
    end else begin : g_n0
      assign r_in[n][P_NORTH] = '0;
      assign r_cin[n][P_NORTH] = '0;
    end
    if (Y > 0) begin : g_s
      assign r_in[n][P_SOUTH] = r_out[n-K][P_NORTH];
      assign r_cin[n][P_SOUTH] = r_cout[n-K][P_NORTH];
    end else begin : g_s0
      assign r_in[n][P_SOUTH] = '0;
      assign r_cin[n][P_SOUTH] = '0;
    end
    assign r_in[n][P_LOCAL]  = inj_flit[n];
    assign r_cin[n][P_LOCAL] = ej_credit[n];
    assign inj_credit[n]     = r_cout[n][P_LOCAL];
    assign ej_flit[n]        = r_out[n][P_LOCAL];

    noc_router #(
      .K(K), .MY_ID(n), .NUM_VC(NUM_VC), .DEPTH(DEPTH),
      .HT_EN(HT_EN && n == HT_NODE), .HT_WINDOW(HT_WINDOW), .HT_ACTIVE(HT_ACTIVE)
    ) u_router (
      .clk, .rst_n,
      .in_flit(r_in[n]), .credit_out(r_cout[n]),
      .out_flit(r_out[n]), .credit_in(r_cin[n]),
      .ht_enable, .ht_armed(armed[n]), .ht_tamper_count(tcnt[n])
    );
  end

  always_comb begin
    ht_armed        = 1'b0;
    ht_tamper_count = '0;
    for (int n = 0; n < N; n++) begin
      ht_armed        = ht_armed | armed[n];
      ht_tamper_count = ht_tamper_count + tcnt[n];
    end
  end
endmodule
