// tcmp_top_tb: end-to-end test of the 16-tile interconnect at its default
// size (4 x 4 mesh, 3 VCs of 3 flits, 256-entry MSHRs, Trojan in router 5
// armed 10 cycles in every 100).
// The testbench stands in for the L1 and L2 cache controllers: every tile
// issues L1 misses to addresses whose home tile is chosen by the test, and
// every L2 slice answers a request after L2_LAT cycles with data that is a
// known function of the address. Each fill is checked against that function
// and against the set of outstanding misses.
//   Phase A  Trojan off, ARQ off: random traffic from all tiles, every miss
//            must be filled, nothing dropped, nothing tampered.
//   Phase B  Trojan on, ARQ off: tile 4 sends misses homed at tile 15, which
//            cross router 5. Every rewritten request must be dropped at a
//            tile east of router 5, its miss must stay outstanding, all
//            others must be filled.
//   Phase C  Trojan off, ARQ on (200-cycle timer): the stuck misses must be
//            re-sent and filled.
//   Phase D  Trojan on, ARQ on: traffic from all tiles; after the Trojan is
//            switched off again every miss must complete.
// Mechanisms counted: Trojan rewrites, drops, re-transmissions, misses served
// by the local L2 slice, remote misses and cycles an L1 miss was held back.
module tcmp_top_tb;
  import noc_pkg::*;

  localparam int N      = 16;
  localparam int L2_LAT = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ht_enable, arq_en;
  logic [15:0] arq_timeout;
  logic [N-1:0] l1_miss_valid, l1_miss_ready, l1_fill_valid;
  logic [ADDR_W-1:0] l1_miss_addr [N];
  logic [ADDR_W-1:0] l1_fill_addr [N];
  logic [REPLY_PL-1:0][FLIT_W-1:0] l1_fill_data [N];
  logic [N-1:0] l2_req_valid, l2_req_ready, l2_resp_valid, l2_resp_ready;
  logic [ADDR_W-1:0] l2_req_addr [N];
  logic [NODE_W-1:0] l2_req_src [N];
  logic [PID_W-1:0]  l2_req_pid [N];
  logic [ADDR_W-1:0] l2_resp_addr [N];
  logic [NODE_W-1:0] l2_resp_dst [N];
  logic [PID_W-1:0]  l2_resp_pid [N];
  logic [REPLY_PL-1:0][FLIT_W-1:0] l2_resp_data [N];
  logic ht_armed;
  logic [31:0] ht_tamper_count;
  logic [31:0] drop_count [N];
  logic [31:0] retx_count [N];
  logic [31:0] dup_count  [N];
  logic [8:0]  outstanding [N];

  tcmp_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [REPLY_PL-1:0][FLIT_W-1:0] line_data(input logic [ADDR_W-1:0] a);
    for (int i = 0; i < REPLY_PL; i++) line_data[i] = {28'h5A5A000 + 28'(i), a};
  endfunction

  function automatic logic [ADDR_W-1:0] mk_addr(input int src, input int seq, input int home);
    return {4'(src), 14'(seq), 4'(home), 8'($urandom), 6'b0};
  endfunction

  // ---------------- L1 side ----------------
  logic [ADDR_W-1:0] miss_q [N][$];
  bit   expected [logic [ADDR_W-1:0]];
  int   issued = 0, filled = 0, n_local = 0, n_remote = 0, n_stall = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (l1_miss_valid[n] && l1_miss_ready[n]) begin
        expected[l1_miss_addr[n]] = 1'b1;
        issued++;
        if (home_tile(l1_miss_addr[n]) == NODE_W'(n)) n_local++; else n_remote++;
        void'(miss_q[n].pop_front());
      end else if (l1_miss_valid[n]) n_stall++;
      if (l1_fill_valid[n]) begin
        check(expected.exists(l1_fill_addr[n]), $sformatf("tile %0d fill for address not outstanding", n));
        check(l1_fill_data[n] == line_data(l1_fill_addr[n]), $sformatf("tile %0d fill data", n));
        check(l1_fill_addr[n][35:32] == 4'(n), $sformatf("tile %0d fill reached the wrong tile", n));
        expected.delete(l1_fill_addr[n]);
        filled++;
      end
    end
  end
  always_comb
    for (int n = 0; n < N; n++) begin
      l1_miss_valid[n] = rst_n && miss_q[n].size() != 0;
      l1_miss_addr[n]  = (miss_q[n].size() != 0) ? miss_q[n][0] : '0;
    end

  // ---------------- L2 slices ----------------
  typedef struct { logic [ADDR_W-1:0] a; logic [NODE_W-1:0] src; logic [PID_W-1:0] pid; longint t; } l2req_t;
  l2req_t l2_q [N][$];
  longint cyc = 0;
  int l2_served [N];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n)
      for (int n = 0; n < N; n++) begin
        if (l2_req_valid[n] && l2_req_ready[n]) begin
          l2req_t r;
          r.a = l2_req_addr[n]; r.src = l2_req_src[n]; r.pid = l2_req_pid[n]; r.t = cyc + L2_LAT;
          check(home_tile(r.a) == NODE_W'(n), $sformatf("L2 slice %0d got a request it is not home for", n));
          l2_q[n].push_back(r);
          l2_served[n]++;
        end
        if (l2_resp_valid[n] && l2_resp_ready[n]) void'(l2_q[n].pop_front());
      end
  end
  always_comb
    for (int n = 0; n < N; n++) begin
      l2_req_ready[n]  = 1'b1;
      l2_resp_valid[n] = l2_q[n].size() != 0 && l2_q[n][0].t <= cyc;
      l2_resp_addr[n]  = l2_resp_valid[n] ? l2_q[n][0].a   : '0;
      l2_resp_dst[n]   = l2_resp_valid[n] ? l2_q[n][0].src : '0;
      l2_resp_pid[n]   = l2_resp_valid[n] ? l2_q[n][0].pid : '0;
      l2_resp_data[n]  = line_data(l2_resp_addr[n]);
    end

  function automatic int sum(input logic [31:0] v [N]);
    sum = 0;
    for (int n = 0; n < N; n++) sum += int'(v[n]);
  endfunction
  function automatic int total_out();
    total_out = 0;
    for (int n = 0; n < N; n++) total_out += int'(outstanding[n]);
  endfunction
  function automatic bit queues_empty();
    queues_empty = 1'b1;
    for (int n = 0; n < N; n++) if (miss_q[n].size() != 0) queues_empty = 1'b0;
  endfunction

  task automatic drain(input int max_cycles);
    int c = 0;
    while ((!queues_empty() || expected.size() != 0) && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
  endtask

  int seq = 0;
  int drops_b, tamp_b, fills_before;

  initial begin
    ht_enable = 1'b0; arq_en = 1'b0; arq_timeout = 16'd200;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // ---- Phase A: clean network ----
    for (int n = 0; n < N; n++)
      for (int k = 0; k < 10; k++) miss_q[n].push_back(mk_addr(n, seq++, $urandom_range(0, N-1)));
    drain(20000);
    check(expected.size() == 0, "phase A: all misses filled");
    check(issued == 160 && filled == 160, $sformatf("phase A: issued %0d filled %0d", issued, filled));
    check(sum(drop_count) == 0, "phase A: no drops");
    check(ht_tamper_count == 0, "phase A: no tampering");
    check(total_out() == 0, "phase A: MSHRs empty");

    // ---- Phase B: Trojan on, no re-transmission ----
    ht_enable = 1'b1;
    fills_before = filled;
    for (int k = 0; k < 150; k++) miss_q[4].push_back(mk_addr(4, seq++, 15));
    repeat (4000) @(posedge clk);
    drops_b = sum(drop_count);
    tamp_b  = int'(ht_tamper_count);
    $display("phase B: tampered %0d dropped %0d", tamp_b, drops_b);
    check(tamp_b > 0, "phase B: Trojan rewrote at least one request");
    check(tamp_b < 150, "phase B: Trojan did not rewrite every request");
    check(drops_b == tamp_b, "phase B: every rewritten request dropped");
    check(int'(outstanding[4]) == drops_b, "phase B: dropped misses stay outstanding at tile 4");
    check(filled - fills_before == 150 - drops_b, "phase B: untouched misses filled");
    for (int n = 0; n < N; n++)
      if (n % 4 <= 1) check(drop_count[n] == 0, $sformatf("phase B: no drop west of the Trojan (tile %0d)", n));
    check(drop_count[15] == 0, "phase B: no drop at the true home");

    // ---- Phase C: ARQ recovers ----
    ht_enable = 1'b0;
    arq_en    = 1'b1;
    drain(20000);
    check(expected.size() == 0, "phase C: stuck misses filled after re-transmission");
    check(int'(retx_count[4]) >= drops_b, "phase C: tile 4 re-sent its lost requests");
    check(total_out() == 0, "phase C: MSHRs empty");

    // ---- Phase D: Trojan and ARQ together, all tiles ----
    ht_enable = 1'b1;
    for (int n = 0; n < N; n++)
      for (int k = 0; k < 40; k++) miss_q[n].push_back(mk_addr(n, seq++, $urandom_range(0, N-1)));
    repeat (3000) @(posedge clk);
    ht_enable = 1'b0;
    drain(40000);
    check(expected.size() == 0, "phase D: every miss completed");
    check(total_out() == 0, "phase D: MSHRs empty");
    check(issued == 160 + 150 + 640, $sformatf("phase D: issued %0d", issued));

    // ---- mechanisms ----
    $display("mechanisms: tampered=%0d dropped=%0d retx=%0d dup=%0d local=%0d remote=%0d stall=%0d",
             ht_tamper_count, sum(drop_count), sum(retx_count), sum(dup_count), n_local, n_remote, n_stall);
    check(ht_tamper_count > 0, "mechanism: Trojan rewrite");
    check(sum(drop_count) > 0, "mechanism: misdelivered drop");
    check(sum(retx_count) > 0, "mechanism: ARQ re-transmission");
    check(n_local > 0, "mechanism: miss served by local L2 slice");
    check(n_remote > 0, "mechanism: miss sent over the mesh");
    check(n_stall > 0, "mechanism: L1 miss held back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
