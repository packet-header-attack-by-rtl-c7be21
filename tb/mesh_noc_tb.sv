// mesh_noc_tb: the 4 x 4 mesh with the Trojan in router 5.
// The testbench plays the 16 network adapters: it injects packets through
// the local ports (claiming an idle VC with all credits, one flit per cycle
// while credits last) and takes every ejected flit at once, returning its
// credit the next cycle.
//   Latency: a head flit from tile 4 to tile 15 in the idle mesh passes six
//   routers (4, 5, 6, 7, 11, 15) at 3 cycles each, so it leaves router 15's
//   local port 17 edges after router 4 writes it.
//   Trojan dormant: random traffic between all tiles; every packet must be
//   ejected exactly once, intact, at the tile named by its DID.
//   Trojan enabled: the same, except that L1 miss requests whose XY path
//   enters router 5 from a neighbour may arrive with a new DID; they must
//   be ejected at that new tile (which the Trojan picked so that XY routing
//   can reach it), and their number must equal ht_tamper_count.
module mesh_noc_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t   inj_flit   [16];
  credit_t inj_credit [16];
  flit_t   ej_flit    [16];
  credit_t ej_credit  [16];
  logic ht_enable, ht_armed;
  logic [31:0] ht_tamper_count;
  int checks = 0, failures = 0;

  mesh_noc #(.K(4), .NUM_VC(3), .DEPTH(3), .HT_EN(1'b1), .HT_NODE(5)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  // does the XY path from s to d enter router 5 from a neighbour?
  function automatic bit via5(input int s, input int d);
    int x, y;
    x = s % 4; y = s / 4;
    while (x != d % 4) begin x += (d % 4 > x) ? 1 : -1; if (y * 4 + x == 5) return 1; end
    while (y != d / 4) begin y += (d / 4 > y) ? 1 : -1; if (y * 4 + x == 5) return 1; end
    return 0;
  endfunction

  typedef struct { head_t h; logic [REPLY_PL-1:0][FLIT_W-1:0] d; } pkt_t;
  pkt_t sent [int];

  int  up_cred [16][3];
  bit  up_busy [16][3];
  int  up_todo [16];
  pkt_t up_pkt [16][3];
  int  up_idx  [16][3];
  int  pid_ctr [16];
  bit  manual = 0;

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < 16; n++) if (inj_credit[n].valid) up_cred[n][inj_credit[n].vc]++;

  always @(negedge clk) if (!manual) begin
    for (int n = 0; n < 16; n++) begin
      inj_flit[n] = '0;
      if (rst_n) begin
        int v, start;
        if (up_todo[n] > 0) begin
          v = $urandom_range(0, 2);
          if (!up_busy[n][v] && up_cred[n][v] == 3) begin
            pkt_t p;
            bit reply;
            reply = ($urandom_range(0, 2) == 0);
            p.h = head_t'({$urandom, $urandom});
            p.h.sid = 4'(n); p.h.pid = 8'(pid_ctr[n]++);
            do p.h.did = 4'($urandom_range(0, 15)); while (p.h.did == 4'(n));
            p.h.ptype = reply ? PT_L1_MISS_REPLY : PT_L1_MISS_REQ;
            p.h.pl = reply ? 3'(REPLY_PL) : 3'd0;
            for (int k = 0; k < REPLY_PL; k++) p.d[k] = {$urandom, $urandom};
            up_pkt[n][v] = p; up_idx[n][v] = 0; up_busy[n][v] = 1;
            sent[n * 256 + int'(p.h.pid)] = p;
            up_todo[n]--;
          end
        end
        start = $urandom_range(0, 2);
        for (int k = 0; k < 3; k++) begin
          v = (start + k) % 3;
          if (up_busy[n][v] && up_cred[n][v] > 0 && !inj_flit[n].valid) begin
            inj_flit[n].valid = 1;
            inj_flit[n].vcid  = 2'(v);
            if (up_idx[n][v] == 0) begin
              inj_flit[n].ft = FT_HEAD; inj_flit[n].data = FLIT_W'(up_pkt[n][v].h);
            end else begin
              inj_flit[n].ft = (up_idx[n][v] == int'(up_pkt[n][v].h.pl)) ? FT_TAIL : FT_BODY;
              inj_flit[n].data = up_pkt[n][v].d[up_idx[n][v] - 1];
            end
            up_cred[n][v]--;
            if (up_idx[n][v] == int'(up_pkt[n][v].h.pl)) up_busy[n][v] = 0;
            else up_idx[n][v]++;
          end
        end
      end
    end
  end

  int dn_key [16][3];
  int dn_idx [16][3];
  int delivered = 0, changed = 0;
  bit ht_seen = 0;
  always @(posedge clk) if (ht_enable) ht_seen <= 1;

  always @(posedge clk) begin
    for (int n = 0; n < 16; n++) begin
      ej_credit[n] <= '0;
      if (rst_n && ej_flit[n].valid) begin
        int v;
        v = int'(ej_flit[n].vcid);
        ej_credit[n] <= '{valid: 1'b1, vc: 2'(v)};
        if (ej_flit[n].ft == FT_HEAD) begin
          head_t h, e;
          int key;
          h = head_t'(ej_flit[n].data);
          key = int'(h.sid) * 256 + int'(h.pid);
          chk(sent.exists(key), "ejected head belongs to a sent packet");
          if (sent.exists(key)) begin
            e = sent[key].h;
            chk(int'(h.did) == n, $sformatf("ejected at tile %0d, DID %0d", n, h.did));
            if (h.did != e.did) begin
              changed++;
              chk(ht_seen && e.ptype == PT_L1_MISS_REQ && via5(int'(e.sid), int'(e.did)),
                  "only requests crossing router 5 are redirected, while the Trojan is on");
              h.did = e.did;
            end
            chk(h == e, "header otherwise intact");
            if (e.pl == 0) begin sent.delete(key); delivered++; end
            else begin dn_key[n][v] = key; dn_idx[n][v] = 0; end
          end
        end else begin
          int key;
          key = dn_key[n][v];
          chk(key >= 0, "body flit of an open packet");
          if (key >= 0) begin
            chk(ej_flit[n].data == sent[key].d[dn_idx[n][v]], "data intact");
            dn_idx[n][v]++;
            if (ej_flit[n].ft == FT_TAIL) begin
              chk(dn_idx[n][v] == REPLY_PL, "tail is the last flit");
              sent.delete(key); dn_key[n][v] = -1; delivered++;
            end
          end
        end
      end
    end
  end

  function automatic int todo_sum();
    todo_sum = 0;
    for (int n = 0; n < 16; n++) todo_sum += up_todo[n];
  endfunction

  int lat;
  initial begin
    ht_enable = 0;
    for (int n = 0; n < 16; n++) begin
      inj_flit[n] = '0; ej_credit[n] = '0; up_todo[n] = 0; pid_ctr[n] = 0;
      for (int v = 0; v < 3; v++) begin up_cred[n][v] = 3; up_busy[n][v] = 0; dn_key[n][v] = -1; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency 4 -> 15
    manual = 1;
    @(negedge clk);
    begin
      pkt_t p;
      p.h = '0; p.h.sid = 4'd4; p.h.pid = 8'd250; p.h.did = 4'd15; p.h.ptype = PT_L1_MISS_REPLY; p.d = '0;
      sent[4 * 256 + 250] = p;
      inj_flit[4] = '{valid: 1'b1, ft: FT_HEAD, vcid: 2'd0, data: FLIT_W'(p.h)};
      up_cred[4][0]--;
    end
    @(posedge clk);            // edge 0: router 4 writes the head
    #1 inj_flit[4] = '0;
    lat = 0;
    while (!ej_flit[15].valid && lat < 100) begin @(posedge clk); #1; lat++; end
    chk(lat == 17, $sformatf("4 -> 15 head latency %0d edges", lat));
    repeat (3) @(negedge clk);
    manual = 0;
    // dormant
    for (int n = 0; n < 16; n++) up_todo[n] = 60;
    lat = 0;
    while ((sent.size() != 0 || todo_sum() != 0) && lat < 40000) begin @(negedge clk); lat++; end
    chk(sent.size() == 0 && changed == 0, "dormant: all delivered to their DID");
    // enabled
    ht_enable = 1;
    for (int n = 0; n < 16; n++) up_todo[n] = 150;
    lat = 0;
    while ((sent.size() != 0 || todo_sum() != 0) && lat < 80000) begin @(negedge clk); lat++; end
    chk(sent.size() == 0, $sformatf("enabled: all delivered (%0d left)", sent.size()));
    chk(delivered == 1 + 16 * 210, $sformatf("delivered %0d", delivered));
    chk(changed > 0, "the Trojan redirected some requests");
    chk(int'(ht_tamper_count) == changed, $sformatf("tamper count %0d, redirected %0d", ht_tamper_count, changed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
