// network_adapter: the tile's interface to its router's local port.
// Injection: accepts one message at a time from the tile controller, claims
// a VC of the router's local input port that is idle with all its credits,
// and sends the head flit followed by PL data flits (the last one as a
// tail), one flit per cycle while a credit is available. A request is one
// head flit (PL = 0); a reply is a head and REPLY_PL = 4 data flits.
// Ejection: flits from the router's local output are stored per VC in
// DEPTH-flit buffers, whose slots are announced to the router as credits.
// One packet at a time is reassembled from the buffer its head sits in.
// A finished L1 miss request whose L2 home tile, taken from the index bits
// of ADDRESS, is not its DID has been misdelivered: it is dropped here and
// counted, and never reaches the tile controller. Every other packet is
// offered to the tile controller with valid/ready and held until taken.
// Packet formats and the drop rule follow the description; the buffering,
// one-packet-at-a-time operation and VC choice are this design's.
module network_adapter
  import noc_pkg::*;
#(
  parameter int NUM_VC = 3,
  parameter int DEPTH  = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  // from / to tile controller
  input  logic    tx_valid,
  input  msg_t    tx_msg,
  output logic    tx_ready,
  output logic    rx_valid,
  output msg_t    rx_msg,
  input  logic    rx_ready,
  // to / from router local port
  output flit_t   inj_flit,
  input  credit_t inj_credit,
  input  flit_t   ej_flit,
  output credit_t ej_credit,
  // statistics
  output logic [31:0] drop_count
);
  localparam int CRW = $clog2(DEPTH + 1);
  localparam int IW  = $clog2(REPLY_PL + 1);

  // ---------------- injection ----------------
  logic [NUM_VC-1:0]  ivc_busy;
  logic [CRW-1:0]     ivc_cred [NUM_VC];
  logic               tx_active;
  msg_t               tx_cur;
  logic [IW-1:0]      tx_idx;
  logic [VCID_W-1:0]  tx_vc;
  logic               free_any;
  logic [VCID_W-1:0]  free_vc;

  always_comb begin
    free_any = 1'b0;
    free_vc  = '0;
    for (int v = NUM_VC - 1; v >= 0; v--)
      if (!ivc_busy[v] && ivc_cred[v] == CRW'(DEPTH)) begin
        free_any = 1'b1;
        free_vc  = VCID_W'(v);
      end
  end

  assign tx_ready = !tx_active && free_any;

  logic  send;
  flit_t next_flit;
  always_comb begin
    send      = tx_active && ivc_cred[tx_vc] != '0;
    next_flit = '0;
    next_flit.valid = send;
    next_flit.vcid  = tx_vc;
    if (tx_idx == '0) begin
      next_flit.ft   = FT_HEAD;
      next_flit.data = FLIT_W'(tx_cur.hdr);
    end else begin
      next_flit.ft   = (PL_W'(tx_idx) == tx_cur.hdr.pl) ? FT_TAIL : FT_BODY;
      next_flit.data = tx_cur.data[tx_idx - 1'b1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_active <= 1'b0;
      tx_cur    <= '0;
      tx_idx    <= '0;
      tx_vc     <= '0;
      inj_flit  <= '0;
      ivc_busy  <= '0;
      for (int v = 0; v < NUM_VC; v++) ivc_cred[v] <= CRW'(DEPTH);
    end else begin
      inj_flit <= send ? next_flit : '0;
      for (int v = 0; v < NUM_VC; v++)
        ivc_cred[v] <= ivc_cred[v]
                       - CRW'(send && tx_vc == VCID_W'(v))
                       + CRW'(inj_credit.valid && inj_credit.vc == VCID_W'(v));
      if (tx_valid && tx_ready) begin
        tx_active         <= 1'b1;
        tx_cur            <= tx_msg;
        tx_idx            <= '0;
        tx_vc             <= free_vc;
        ivc_busy[free_vc] <= 1'b1;
      end else if (send) begin
        if (is_last(next_flit)) begin
          tx_active       <= 1'b0;
          ivc_busy[tx_vc] <= 1'b0;
        end else begin
          tx_idx <= tx_idx + 1'b1;
        end
      end
    end
  end

  // ---------------- ejection ----------------
  flit_t             ej_front [NUM_VC];
  logic [NUM_VC-1:0] ej_nonempty;
  logic [NUM_VC-1:0] ej_pop;
  logic [NUM_VC-1:0] head_req, head_gnt;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_ej
    logic empty;
    logic [$clog2(DEPTH+1)-1:0] cnt;
    vc_fifo #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push(ej_flit.valid && ej_flit.vcid == VCID_W'(v)), .din(ej_flit),
      .pop(ej_pop[v]), .rewrite_en(1'b0), .rewrite_data('0),
      .front(ej_front[v]), .empty, .count(cnt)
    );
    assign ej_nonempty[v] = !empty;
  end

  logic              rx_active;     // assembling a packet
  logic [VCID_W-1:0] rx_vc;
  logic [IW-1:0]     rx_idx;
  msg_t              rx_buf;
  logic              rx_done;       // packet complete, offered to tile controller

  always_comb
    for (int v = 0; v < NUM_VC; v++)
      head_req[v] = ej_nonempty[v] && ej_front[v].ft == FT_HEAD && !rx_active && !rx_done;

  rr_arbiter #(.N(NUM_VC)) u_harb (.clk, .rst_n, .req(head_req), .update(1'b1), .gnt(head_gnt));

  always_comb begin
    ej_pop = head_gnt;
    if (rx_active && ej_nonempty[rx_vc]) ej_pop[rx_vc] = 1'b1;
  end

  flit_t pop_flit;
  always_comb begin
    pop_flit = '0;
    for (int v = 0; v < NUM_VC; v++) if (ej_pop[v]) pop_flit = ej_front[v];
  end

  // A completed request whose address home is not its DID is misdelivered.
  function automatic logic misdelivered(input head_t h);
    return h.ptype == PT_L1_MISS_REQ && home_tile(h.addr) != h.did;
  endfunction

  assign rx_valid = rx_done;
  assign rx_msg   = rx_buf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_active  <= 1'b0;
      rx_vc      <= '0;
      rx_idx     <= '0;
      rx_buf     <= '0;
      rx_done    <= 1'b0;
      ej_credit  <= '0;
      drop_count <= '0;
    end else begin
      ej_credit <= '0;
      for (int v = 0; v < NUM_VC; v++)
        if (ej_pop[v]) begin
          ej_credit.valid <= 1'b1;
          ej_credit.vc    <= VCID_W'(v);
        end
      if (rx_done && rx_ready) rx_done <= 1'b0;
      if (head_gnt != '0) begin
        head_t h;
        h = head_t'(pop_flit.data);
        rx_buf.hdr  <= h;
        rx_buf.data <= '0;
        rx_idx      <= '0;
        for (int v = 0; v < NUM_VC; v++) if (head_gnt[v]) rx_vc <= VCID_W'(v);
        if (h.pl == '0) begin
          if (misdelivered(h)) drop_count <= drop_count + 1'b1;
          else                 rx_done    <= 1'b1;
        end else begin
          rx_active <= 1'b1;
        end
      end else if (rx_active && ej_nonempty[rx_vc]) begin
        rx_buf.data[rx_idx] <= pop_flit.data;
        rx_idx              <= rx_idx + 1'b1;
        if (pop_flit.ft == FT_TAIL) begin
          rx_active <= 1'b0;
          if (misdelivered(rx_buf.hdr)) drop_count <= drop_count + 1'b1;
          else                          rx_done    <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ej_pop))
    else $error("network_adapter: two ejection buffers popped at once");
endmodule
