// network_adapter_tb: the adapter between a tile controller and the local
// port of its router (3 VCs of 3 flits).
// Injection: random requests (1 flit) and replies (head + 4 data flits) are
// offered. The testbench plays the router's local input port: it keeps the
// three VC buffers, takes flits out after random delays and returns
// credits. Checked: the flits of a packet arrive in order on one VC, the
// head carries the header, body/tail flits carry the data words, the last
// one is a tail, and no VC ever holds more than 3 flits. When flits are
// consumed at once, a reply's tail leaves 5 cycles after its head: three
// credits cover all but one cycle of the 4-cycle credit round trip.
// Ejection: the testbench plays the router's local output: it sends random
// packets, interleaved flit by flit across VCs, never more than 3 flits
// beyond the credits returned. Requests whose address home differs from
// their DID are misdelivered ones. Checked: every well-formed packet is
// handed to the tile controller exactly once with header and data intact
// (under random backpressure), every misdelivered request is dropped and
// counted, and nothing else is delivered.
module network_adapter_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tx_valid, tx_ready, rx_valid, rx_ready;
  msg_t tx_msg, rx_msg;
  flit_t inj_flit, ej_flit;
  credit_t inj_credit, ej_credit;
  logic [31:0] drop_count;
  int checks = 0, failures = 0;

  network_adapter #(.NUM_VC(3), .DEPTH(3)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  function automatic msg_t rand_msg(input bit reply, input bit good);
    msg_t m;
    m = '0;
    m.hdr = head_t'({$urandom, $urandom});
    m.hdr.ptype = reply ? PT_L1_MISS_REPLY : PT_L1_MISS_REQ;
    m.hdr.pl    = reply ? PL_W'(REPLY_PL) : '0;
    m.hdr.did   = home_tile(m.hdr.addr) ^ (good ? 4'd0 : 4'(1 + $urandom_range(0, 14)));
    for (int i = 0; i < REPLY_PL; i++) m.data[i] = reply ? {$urandom, $urandom} : '0;
    return m;
  endfunction

  // ---------------- injection model ----------------
  msg_t  sent_q [$];               // offered messages, in order
  flit_t lbuf [3][$];              // router local-input VC buffers
  int    pkt_vc = -1, pkt_idx = 0;
  msg_t  cur;
  int    inj_pkts = 0;
  int    consume_delay = 1;
  int    reply_start = -1, reply_ok = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tx_valid && tx_ready) void'(sent_q.size());
    if (rst_n && inj_flit.valid) begin
      int v;
      v = int'(inj_flit.vcid);
      lbuf[v].push_back(inj_flit);
      chk(lbuf[v].size() <= 3, "local input VC never overfilled");
      if (inj_flit.ft == FT_HEAD) begin
        chk(pkt_vc == -1, "previous packet finished before a new head");
        chk(sent_q.size() != 0, "head for an offered message");
        cur = sent_q.pop_front();
        chk(head_t'(inj_flit.data) == cur.hdr, "head carries the header");
        pkt_vc = v; pkt_idx = 0;
        if (cur.hdr.pl == 0) begin pkt_vc = -1; inj_pkts++; end
        else reply_start = int'(cyc);
      end else begin
        chk(v == pkt_vc, "body flit on the packet's VC");
        chk(inj_flit.data == cur.data[pkt_idx], "data word in order");
        pkt_idx++;
        chk((inj_flit.ft == FT_TAIL) == (pkt_idx == REPLY_PL), "tail marks the last flit");
        if (inj_flit.ft == FT_TAIL) begin
          pkt_vc = -1; inj_pkts++;
          if (consume_delay == 0) reply_ok = int'(cyc) - reply_start;
        end
      end
    end
  end

  // drain the local buffers and return credits
  int drain_wait = 0;
  always @(posedge clk) begin
    inj_credit <= '0;
    if (drain_wait > 0) drain_wait <= drain_wait - 1;
    else begin
      for (int v = 0; v < 3; v++)
        if (lbuf[v].size() != 0) begin
          void'(lbuf[v].pop_front());
          inj_credit <= '{valid: 1'b1, vc: 2'(v)};
          break;
        end
      drain_wait <= (consume_delay == 0) ? 0 : $urandom_range(0, consume_delay);
    end
  end

  // ---------------- ejection model ----------------
  msg_t exp_q [$];
  int   ej_cred [3];
  msg_t ej_pkt [3];
  int   ej_idx [3];             // -1: idle
  int   ej_todo = 0, ej_good = 0, ej_bad = 0, delivered = 0;

  always @(posedge clk) if (rst_n) begin
    if (ej_credit.valid) ej_cred[ej_credit.vc]++;
    if (rx_valid && rx_ready) begin
      int found;
      found = -1;
      foreach (exp_q[k]) if (found < 0 && exp_q[k] == rx_msg) found = k;
      chk(found >= 0, "delivered packet was sent and is well-formed");
      if (found >= 0) exp_q.delete(found);
      delivered++;
    end
  end

  // drive flits: at negedge choose a VC with credit and a packet in progress
  always @(negedge clk) begin
    ej_flit = '0;
    rx_ready = ($urandom_range(0, 3) != 0);
    if (rst_n) begin
      int v;
      v = $urandom_range(0, 2);
      if (ej_idx[v] < 0 && ej_todo > 0 && $urandom_range(0, 1)) begin
        bit good, reply;
        reply = $urandom_range(0, 1);
        good  = reply || ($urandom_range(0, 2) != 0);
        ej_pkt[v] = rand_msg(reply, good);
        ej_idx[v] = 0;
        ej_todo--;
        if (good) begin exp_q.push_back(ej_pkt[v]); ej_good++; end
        else ej_bad++;
      end
      if (ej_idx[v] >= 0 && ej_cred[v] > 0) begin
        ej_flit.valid = 1;
        ej_flit.vcid  = 2'(v);
        if (ej_idx[v] == 0) begin
          ej_flit.ft = FT_HEAD; ej_flit.data = FLIT_W'(ej_pkt[v].hdr);
        end else begin
          ej_flit.ft   = (ej_idx[v] == int'(ej_pkt[v].hdr.pl)) ? FT_TAIL : FT_BODY;
          ej_flit.data = ej_pkt[v].data[ej_idx[v] - 1];
        end
        ej_cred[v]--;
        ej_idx[v] = (ej_idx[v] == int'(ej_pkt[v].hdr.pl)) ? -1 : ej_idx[v] + 1;
      end
    end
  end

  initial begin
    tx_valid = 0; tx_msg = '0; inj_credit = '0; ej_flit = '0; rx_ready = 0;
    for (int v = 0; v < 3; v++) begin ej_cred[v] = 3; ej_idx[v] = -1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one reply with immediate credit return: 5 consecutive cycles
    consume_delay = 0;
    @(negedge clk);
    tx_msg = rand_msg(1, 1); tx_valid = 1;
    sent_q.push_back(tx_msg);
    @(posedge clk); #1; tx_valid = 0;
    repeat (20) @(negedge clk);
    chk(reply_ok == REPLY_PL + 1, $sformatf("reply tail %0d cycles after its head", reply_ok));
    // random injection and ejection together
    consume_delay = 4;
    ej_todo = 300;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      tx_msg = rand_msg($urandom_range(0, 1), 1);
      tx_valid = 1;
      do @(posedge clk); while (!tx_ready);
      sent_q.push_back(tx_msg);
      #1; tx_valid = 0;
    end
    repeat (3000) @(negedge clk);
    chk(inj_pkts == 301, $sformatf("all %0d packets injected (%0d)", 301, inj_pkts));
    chk(ej_todo == 0 && exp_q.size() == 0, "every well-formed packet delivered");
    chk(delivered == ej_good, "nothing else delivered");
    chk(int'(drop_count) == ej_bad && ej_bad > 0, $sformatf("misdelivered requests dropped: %0d of %0d", drop_count, ej_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
