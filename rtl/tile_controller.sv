// tile_controller: the intermediary between the cache controllers and the
// network adapter of one tile.
//  * L1 miss from the L1 cache controller: an MSHR entry is allocated, the
//    L2 home tile is computed from the index bits of the address, and the
//    miss is sent to the local L2 controller when the home is this tile, or
//    as a single-flit L1 miss request packet (PID = MSHR entry) to the home
//    tile otherwise.
//  * L1 miss request arriving from the network: handed to the local L2
//    controller together with the requester's tile id and PID.
//  * L2 response: returned to the local L1 when the requester is this tile,
//    otherwise sent as a 5-flit reply packet to the requester.
//  * Reply arriving from the network: completes the MSHR entry and fills L1.
//  * ARQ: an MSHR entry that times out re-sends its request (mshr_arq).
// Network adapter priority: replies, then re-transmissions, then new
// requests. L2 request priority: remote requests, then local misses. Fills
// toward L1 are one-cycle pulses; L1 is assumed always able to take them.
// Home-tile computation and the local/remote decision follow the
// description; the priorities and handshakes are this design's.
module tile_controller
  import noc_pkg::*;
#(
  parameter int MY_ID   = 0,
  parameter int ENTRIES = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    arq_en,
  input  logic [15:0]             arq_timeout,
  // L1 cache controller
  input  logic                    l1_miss_valid,
  input  logic [ADDR_W-1:0]       l1_miss_addr,
  output logic                    l1_miss_ready,
  output logic                    l1_fill_valid,
  output logic [ADDR_W-1:0]       l1_fill_addr,
  output logic [REPLY_PL-1:0][FLIT_W-1:0] l1_fill_data,
  // L2 cache controller
  output logic                    l2_req_valid,
  output logic [ADDR_W-1:0]       l2_req_addr,
  output logic [NODE_W-1:0]       l2_req_src,
  output logic [PID_W-1:0]        l2_req_pid,
  input  logic                    l2_req_ready,
  input  logic                    l2_resp_valid,
  input  logic [ADDR_W-1:0]       l2_resp_addr,
  input  logic [NODE_W-1:0]       l2_resp_dst,
  input  logic [PID_W-1:0]        l2_resp_pid,
  input  logic [REPLY_PL-1:0][FLIT_W-1:0] l2_resp_data,
  output logic                    l2_resp_ready,
  // network adapter
  output logic                    tx_valid,
  output msg_t                    tx_msg,
  input  logic                    tx_ready,
  input  logic                    rx_valid,
  input  msg_t                    rx_msg,
  output logic                    rx_ready,
  // statistics
  output logic [$clog2(ENTRIES+1)-1:0] outstanding,
  output logic [31:0]             retx_count,
  output logic [31:0]             dup_count
);
  localparam int IW = $clog2(ENTRIES);

  logic           alloc_ready;
  logic [IW-1:0]  alloc_id;
  logic           alloc_valid;
  logic           cmpl_valid, cmpl_hit;
  logic [IW-1:0]  cmpl_id;
  logic [ADDR_W-1:0] cmpl_addr;
  logic           retx_valid, retx_ready;
  logic [IW-1:0]  retx_id;
  logic [ADDR_W-1:0] retx_addr;

  logic miss_local;
  assign miss_local = home_tile(l1_miss_addr) == NODE_W'(MY_ID);

  logic rx_is_req, rx_is_reply;
  assign rx_is_req   = rx_valid && rx_msg.hdr.ptype == PT_L1_MISS_REQ;
  assign rx_is_reply = rx_valid && rx_msg.hdr.ptype == PT_L1_MISS_REPLY;

  logic resp_local, resp_remote;
  assign resp_local  = l2_resp_valid && l2_resp_dst == NODE_W'(MY_ID);
  assign resp_remote = l2_resp_valid && l2_resp_dst != NODE_W'(MY_ID);

  function automatic head_t mk_head(input pkt_type_e t, input logic [NODE_W-1:0] did,
                                    input logic [PID_W-1:0] pid, input logic [ADDR_W-1:0] a,
                                    input logic [PL_W-1:0] pl);
    head_t h;
    h       = '0;
    h.pid   = pid;
    h.sid   = NODE_W'(MY_ID);
    h.did   = did;
    h.pl    = pl;
    h.ptype = t;
    h.addr  = a;
    return h;
  endfunction

  always_comb begin
    // defaults
    tx_valid      = 1'b0;
    tx_msg        = '0;
    l2_req_valid  = 1'b0;
    l2_req_addr   = '0;
    l2_req_src    = NODE_W'(MY_ID);
    l2_req_pid    = '0;
    l1_miss_ready = 1'b0;
    alloc_valid   = 1'b0;
    retx_ready    = 1'b0;
    rx_ready      = 1'b0;
    l2_resp_ready = 1'b0;
    cmpl_valid    = 1'b0;
    cmpl_id       = '0;
    cmpl_addr     = '0;

    // Network injection: reply > re-transmission > new remote miss.
    if (resp_remote) begin
      tx_valid      = 1'b1;
      tx_msg.hdr    = mk_head(PT_L1_MISS_REPLY, l2_resp_dst, l2_resp_pid, l2_resp_addr, PL_W'(REPLY_PL));
      tx_msg.data   = l2_resp_data;
      l2_resp_ready = tx_ready;
    end else if (retx_valid) begin
      tx_valid   = 1'b1;
      tx_msg.hdr = mk_head(PT_L1_MISS_REQ, home_tile(retx_addr), PID_W'(retx_id), retx_addr, '0);
      retx_ready = tx_ready;
    end else if (l1_miss_valid && !miss_local && alloc_ready) begin
      tx_valid      = 1'b1;
      tx_msg.hdr    = mk_head(PT_L1_MISS_REQ, home_tile(l1_miss_addr), PID_W'(alloc_id), l1_miss_addr, '0);
      l1_miss_ready = tx_ready;
      alloc_valid   = tx_ready;
    end

    // Local L2 requests: remote request > local miss.
    if (rx_is_req) begin
      l2_req_valid = 1'b1;
      l2_req_addr  = rx_msg.hdr.addr;
      l2_req_src   = rx_msg.hdr.sid;
      l2_req_pid   = rx_msg.hdr.pid;
      rx_ready     = l2_req_ready;
    end else if (l1_miss_valid && miss_local && alloc_ready) begin
      l2_req_valid  = 1'b1;
      l2_req_addr   = l1_miss_addr;
      l2_req_pid    = PID_W'(alloc_id);
      l1_miss_ready = l2_req_ready;
      alloc_valid   = l2_req_ready;
    end

    // Completions: network reply > local L2 response.
    if (rx_is_reply) begin
      cmpl_valid = 1'b1;
      cmpl_id    = IW'(rx_msg.hdr.pid);
      cmpl_addr  = rx_msg.hdr.addr;
      rx_ready   = 1'b1;
    end else if (resp_local) begin
      cmpl_valid    = 1'b1;
      cmpl_id       = IW'(l2_resp_pid);
      cmpl_addr     = l2_resp_addr;
      l2_resp_ready = 1'b1;
    end
    if (rx_valid && !rx_is_req && !rx_is_reply) rx_ready = 1'b1;   // other types: consumed
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_fill_valid <= 1'b0;
      l1_fill_addr  <= '0;
      l1_fill_data  <= '0;
    end else begin
      l1_fill_valid <= cmpl_hit;
      if (cmpl_hit) begin
        l1_fill_addr <= cmpl_addr;
        l1_fill_data <= rx_is_reply ? rx_msg.data : l2_resp_data;
      end
    end
  end

  mshr_arq #(.ENTRIES(ENTRIES)) u_mshr (
    .clk, .rst_n, .arq_en, .arq_timeout,
    .alloc_valid, .alloc_addr(l1_miss_addr), .alloc_remote(!miss_local),
    .alloc_ready, .alloc_id,
    .cmpl_valid, .cmpl_id, .cmpl_addr, .cmpl_hit,
    .retx_valid, .retx_id, .retx_addr, .retx_ready,
    .outstanding, .retx_count, .dup_count
  );
endmodule
