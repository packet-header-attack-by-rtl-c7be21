// tcmp_top: a 16-tile tiled chip multiprocessor interconnect with a
// header-tampering hardware Trojan in router 5.
// Each tile n has a tile controller (with the L1 MSHR and its optional ARQ
// re-transmission) and a network adapter attached to router n of a 4 x 4
// mesh. The processor, L1 caches with their controller, and the L2 slice
// with its controller are outside this RTL: their interfaces are the
// per-tile l1_* and l2_* ports. An L1 miss enters on l1_miss_*; it is served
// by the L2 slice of its home tile, which the tile controllers reach either
// locally or across the mesh, and the data comes back on l1_fill_*.
// Run-time controls: ht_enable switches the Trojan on (its window counter
// runs from reset), arq_en and arq_timeout switch MSHR re-transmission on.
// Statistics: ht_tamper_count counts head flits the Trojan rewrote,
// drop_count[n] the misdelivered requests dropped at tile n, retx_count[n]
// the re-sent requests, dup_count[n] ignored late replies.
module tcmp_top
  import noc_pkg::*;
#(
  parameter int K            = 4,
  parameter int NUM_VC       = 3,
  parameter int DEPTH        = 3,
  parameter bit HT_EN        = 1'b1,
  parameter int HT_NODE      = 5,
  parameter int HT_WINDOW    = 100,
  parameter int HT_ACTIVE    = 10,
  parameter int MSHR_ENTRIES = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ht_enable,
  input  logic                    arq_en,
  input  logic [15:0]             arq_timeout,
  // L1 cache controllers
  input  logic [K*K-1:0]          l1_miss_valid,
  input  logic [ADDR_W-1:0]       l1_miss_addr  [K*K],
  output logic [K*K-1:0]          l1_miss_ready,
  output logic [K*K-1:0]          l1_fill_valid,
  output logic [ADDR_W-1:0]       l1_fill_addr  [K*K],
  output logic [REPLY_PL-1:0][FLIT_W-1:0] l1_fill_data [K*K],
  // L2 cache controllers
  output logic [K*K-1:0]          l2_req_valid,
  output logic [ADDR_W-1:0]       l2_req_addr   [K*K],
  output logic [NODE_W-1:0]       l2_req_src    [K*K],
  output logic [PID_W-1:0]        l2_req_pid    [K*K],
  input  logic [K*K-1:0]          l2_req_ready,
  input  logic [K*K-1:0]          l2_resp_valid,
  input  logic [ADDR_W-1:0]       l2_resp_addr  [K*K],
  input  logic [NODE_W-1:0]       l2_resp_dst   [K*K],
  input  logic [PID_W-1:0]        l2_resp_pid   [K*K],
  input  logic [REPLY_PL-1:0][FLIT_W-1:0] l2_resp_data [K*K],
  output logic [K*K-1:0]          l2_resp_ready,
  // statistics
  output logic                    ht_armed,
  output logic [31:0]             ht_tamper_count,
  output logic [31:0]             drop_count    [K*K],
  output logic [31:0]             retx_count    [K*K],
  output logic [31:0]             dup_count     [K*K],
  output logic [$clog2(MSHR_ENTRIES+1)-1:0] outstanding [K*K]
);
  localparam int N = K * K;

  flit_t   inj_flit   [N];
  credit_t inj_credit [N];
  flit_t   ej_flit    [N];
  credit_t ej_credit  [N];

  mesh_noc #(
    .K(K), .NUM_VC(NUM_VC), .DEPTH(DEPTH), .HT_EN(HT_EN), .HT_NODE(HT_NODE),
    .HT_WINDOW(HT_WINDOW), .HT_ACTIVE(HT_ACTIVE)
  ) u_noc (
    .clk, .rst_n, .inj_flit, .inj_credit, .ej_flit, .ej_credit,
    .ht_enable, .ht_armed, .ht_tamper_count
  );

  for (genvar n = 0; n < N; n++) begin : g_tile
    logic tx_valid, tx_ready, rx_valid, rx_ready;
    msg_t tx_msg, rx_msg;

    tile_controller #(.MY_ID(n), .ENTRIES(MSHR_ENTRIES)) u_tc (
      .clk, .rst_n, .arq_en, .arq_timeout,
      .l1_miss_valid(l1_miss_valid[n]), .l1_miss_addr(l1_miss_addr[n]), .l1_miss_ready(l1_miss_ready[n]),
      .l1_fill_valid(l1_fill_valid[n]), .l1_fill_addr(l1_fill_addr[n]), .l1_fill_data(l1_fill_data[n]),
      .l2_req_valid(l2_req_valid[n]), .l2_req_addr(l2_req_addr[n]), .l2_req_src(l2_req_src[n]),
      .l2_req_pid(l2_req_pid[n]), .l2_req_ready(l2_req_ready[n]),
      .l2_resp_valid(l2_resp_valid[n]), .l2_resp_addr(l2_resp_addr[n]), .l2_resp_dst(l2_resp_dst[n]),
      .l2_resp_pid(l2_resp_pid[n]), .l2_resp_data(l2_resp_data[n]), .l2_resp_ready(l2_resp_ready[n]),
      .tx_valid, .tx_msg, .tx_ready, .rx_valid, .rx_msg, .rx_ready,
      .outstanding(outstanding[n]), .retx_count(retx_count[n]), .dup_count(dup_count[n])
    );

    network_adapter #(.NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_na (
      .clk, .rst_n,
      .tx_valid, .tx_msg, .tx_ready, .rx_valid, .rx_msg, .rx_ready,
      .inj_flit(inj_flit[n]), .inj_credit(inj_credit[n]),
      .ej_flit(ej_flit[n]), .ej_credit(ej_credit[n]),
      .drop_count(drop_count[n])
    );
  end
endmodule
