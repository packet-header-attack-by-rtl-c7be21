// noc_router_tb: router 5 of the 4 x 4 mesh, with the Trojan mounted.
// The testbench plays the five upstream neighbours (they claim a VC of the
// router's input port only when it is idle with all credits back, send one
// flit per cycle per port while they hold credits) and the five downstream
// neighbours (they take every flit and return its credit after a random
// delay of 0-1 cycles).
//   Latency: in an idle router a head flit written at clock edge 0 leaves on
//   the output link at edge 2 (route, VC allocation, switch allocation).
//   Traffic: random requests and replies from all five inputs. Every packet
//   must leave on the XY port for its original DID, on one downstream VC,
//   in order and with its data intact, and a downstream VC may never hold
//   more than 3 unreturned flits.
//   Trojan dormant (first half): no header changes. Trojan enabled (second
//   half): only L1 miss request heads from mesh inputs may come out with a
//   different DID, that DID must be reachable from the next router without
//   a forbidden turn, every other header field must be unchanged, and the
//   number of changed heads must equal ht_tamper_count.
module noc_router_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t   in_flit    [5];
  credit_t credit_out [5];
  flit_t   out_flit   [5];
  credit_t credit_in  [5];
  logic ht_enable, ht_armed;
  logic [31:0] ht_tamper_count;
  int checks = 0, failures = 0;

  noc_router #(.K(4), .MY_ID(5), .NUM_VC(3), .DEPTH(3), .HT_EN(1'b1)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask
  function automatic port_e xy(input int c, input int d);
    if (d % 4 > c % 4) return P_EAST;
    if (d % 4 < c % 4) return P_WEST;
    if (d / 4 > c / 4) return P_NORTH;
    if (d / 4 < c / 4) return P_SOUTH;
    return P_LOCAL;
  endfunction
  function automatic bit reachable(input port_e op, input int d);
    case (op)
      P_EAST:  return d % 4 >= 2;
      P_WEST:  return d % 4 == 0;
      P_NORTH: return d % 4 == 1 && d / 4 >= 2;
      P_SOUTH: return d == 1;
      default: return 0;
    endcase
  endfunction

  typedef struct { head_t h; logic [REPLY_PL-1:0][FLIT_W-1:0] d; } pkt_t;
  pkt_t sent [int];                 // key: sid*256 + pid

  // ---------------- upstream senders ----------------
  int  up_cred [5][3];
  bit  up_busy [5][3];
  int  up_todo [5];
  pkt_t up_pkt [5][3];
  int  up_idx  [5][3];
  int  pid_ctr [5];
  bit  stop_sending = 0;

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < 5; i++) if (credit_out[i].valid) up_cred[i][credit_out[i].vc]++;

  always @(negedge clk) begin
    for (int i = 0; i < 5; i++) begin
      if (!stop_sending) in_flit[i] = '0;
      if (rst_n && !stop_sending) begin
        int v, start;
        // start a packet on an idle VC
        if (up_todo[i] > 0) begin
          v = $urandom_range(0, 2);
          if (!up_busy[i][v] && up_cred[i][v] == 3) begin
            pkt_t p;
            int did;
            bit reply;
            do did = $urandom_range(0, 15); while (i != int'(P_LOCAL) && did == 5);
            reply = $urandom_range(0, 1);
            p.h = head_t'({$urandom, $urandom});
            p.h.sid = 4'(i); p.h.pid = 8'(pid_ctr[i]++); p.h.did = 4'(did);
            p.h.ptype = reply ? PT_L1_MISS_REPLY : PT_L1_MISS_REQ;
            p.h.pl = reply ? 3'(REPLY_PL) : 3'd0;
            for (int k = 0; k < REPLY_PL; k++) p.d[k] = {$urandom, $urandom};
            up_pkt[i][v] = p; up_idx[i][v] = 0; up_busy[i][v] = 1;
            sent[i * 256 + int'(p.h.pid)] = p;
            up_todo[i]--;
          end
        end
        // send one flit from a busy VC with a credit
        start = $urandom_range(0, 2);
        for (int k = 0; k < 3; k++) begin
          v = (start + k) % 3;
          if (up_busy[i][v] && up_cred[i][v] > 0 && !in_flit[i].valid) begin
            in_flit[i].valid = 1;
            in_flit[i].vcid  = 2'(v);
            if (up_idx[i][v] == 0) begin
              in_flit[i].ft = FT_HEAD; in_flit[i].data = FLIT_W'(up_pkt[i][v].h);
            end else begin
              in_flit[i].ft = (up_idx[i][v] == int'(up_pkt[i][v].h.pl)) ? FT_TAIL : FT_BODY;
              in_flit[i].data = up_pkt[i][v].d[up_idx[i][v] - 1];
            end
            up_cred[i][v]--;
            if (up_idx[i][v] == int'(up_pkt[i][v].h.pl)) up_busy[i][v] = 0;
            else up_idx[i][v]++;
          end
        end
      end
    end
  end

  // ---------------- downstream receivers ----------------
  int   dn_out  [5][3];            // unreturned flits per downstream VC
  int   dn_key  [5][3];            // packet in progress per downstream VC (-1 none)
  int   dn_idx  [5][3];
  int   ret_q   [5][$];            // VC ids awaiting credit return
  int   ret_wait[5];
  int   delivered = 0, changed = 0;

  always @(posedge clk) begin
    for (int o = 0; o < 5; o++) begin
      credit_in[o] <= '0;
      if (ret_wait[o] > 0) ret_wait[o]--;
      else if (ret_q[o].size() != 0) begin
        int v;
        v = ret_q[o].pop_front();
        credit_in[o] <= '{valid: 1'b1, vc: 2'(v)};
        dn_out[o][v]--;
        ret_wait[o] = $urandom_range(0, 1);
      end
      if (rst_n && out_flit[o].valid) begin
        int v;
        v = int'(out_flit[o].vcid);
        dn_out[o][v]++;
        chk(dn_out[o][v] <= 3, "downstream VC never overfilled");
        ret_q[o].push_back(v);
        if (out_flit[o].ft == FT_HEAD) begin
          head_t h;
          int key;
          h = head_t'(out_flit[o].data);
          key = int'(h.sid) * 256 + int'(h.pid);
          chk(dn_key[o][v] < 0, "downstream VC idle when a head arrives");
          chk(sent.exists(key), "head belongs to a sent packet");
          if (sent.exists(key)) begin
            head_t e;
            e = sent[key].h;
            chk(int'(xy(5, int'(e.did))) == o, $sformatf("packet left on port %0d for DID %0d", o, e.did));
            if (h.did != e.did) begin
              changed++;
              chk(ht_enable_seen, "header changed only while the Trojan was enabled");
              chk(e.ptype == PT_L1_MISS_REQ && int'(e.sid) != int'(P_LOCAL), "only mesh-input requests changed");
              chk(reachable(port_e'(o), int'(h.did)), $sformatf("new DID %0d reachable via port %0d", h.did, o));
              h.did = e.did;
            end
            chk(h == e, "rest of the header intact");
            if (e.pl == 0) begin sent.delete(key); delivered++; end
            else begin dn_key[o][v] = key; dn_idx[o][v] = 0; end
          end
        end else begin
          int key;
          key = dn_key[o][v];
          chk(key >= 0, "body flit belongs to an open packet");
          if (key >= 0) begin
            chk(out_flit[o].data == sent[key].d[dn_idx[o][v]], "data word intact and in order");
            dn_idx[o][v]++;
            chk((out_flit[o].ft == FT_TAIL) == (dn_idx[o][v] == REPLY_PL), "tail is the last flit");
            if (out_flit[o].ft == FT_TAIL) begin sent.delete(key); dn_key[o][v] = -1; delivered++; end
          end
        end
      end
    end
  end

  bit ht_enable_seen = 0;
  always @(posedge clk) if (ht_enable) ht_enable_seen <= 1;

  int lat;
  initial begin
    ht_enable = 0;
    for (int i = 0; i < 5; i++) begin
      in_flit[i] = '0; credit_in[i] = '0; up_todo[i] = 0; pid_ctr[i] = 0; ret_wait[i] = 0;
      for (int v = 0; v < 3; v++) begin up_cred[i][v] = 3; up_busy[i][v] = 0; dn_out[i][v] = 0; dn_key[i][v] = -1; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency of one head flit from West to East (DID 7)
    stop_sending = 1;
    @(negedge clk);
    begin
      pkt_t p;
      p.h = '0; p.h.sid = 4'(P_WEST); p.h.pid = 8'd200; p.h.did = 4'd7; p.h.ptype = PT_L1_MISS_REPLY; p.h.pl = 0;
      p.d = '0;
      sent[int'(P_WEST) * 256 + 200] = p;
      in_flit[P_WEST] = '{valid: 1'b1, ft: FT_HEAD, vcid: 2'd0, data: FLIT_W'(p.h)};
      up_cred[P_WEST][0]--;
    end
    lat = 0;
    @(posedge clk);            // edge 0: written
    #1 in_flit[P_WEST] = '0;
    while (!out_flit[P_EAST].valid && lat < 20) begin @(posedge clk); #1; lat++; end
    chk(lat == 2, $sformatf("head flit leaves %0d edges after it is written", lat));
    repeat (5) @(negedge clk);
    stop_sending = 0;
    // random traffic, Trojan dormant then enabled
    for (int i = 0; i < 5; i++) up_todo[i] = 150;
    repeat (1500) @(negedge clk);
    chk(changed == 0, "no header changed while the Trojan is dormant");
    ht_enable = 1;
    for (int i = 0; i < 5; i++) up_todo[i] += 300;
    lat = 0;
    while (lat < 40000 && (sent.size() != 0 || up_todo[0] + up_todo[1] + up_todo[2] + up_todo[3] + up_todo[4] != 0)) begin
      @(negedge clk);
      lat++;
    end
    chk(sent.size() == 0, $sformatf("all packets delivered (%0d left)", sent.size()));
    chk(delivered == 1 + 5 * 450, $sformatf("delivered %0d", delivered));
    chk(changed > 0, "the enabled Trojan changed some headers");
    chk(int'(ht_tamper_count) == changed, $sformatf("tamper count %0d equals changed heads %0d", ht_tamper_count, changed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
