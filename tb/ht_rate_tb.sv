// ht_rate_tb: attack rate of the Trojan router for p = 0.05, 0.10 and 0.15.
// Three copies of router 5 with the Trojan mounted are built side by side,
// armed 5, 10 and 15 cycles in every 100-cycle window. All three get the same
// stream of one-flit L1 miss requests:
//   * from the West input, to tiles in the two columns east of the router
//     (2, 3, 6, 7, 10, 11, 14, 15), leaving on the East output;
//   * from the South input, to tiles 9 and 13, leaving on the North output.
// Upstream, the testbench claims an input VC only when it is idle with all
// credits back. Downstream, it takes every flit and returns its credit on the
// next cycle.
// Every request is tagged by a sequence number in its address. At the outputs,
// the testbench counts B (requests that crossed the router) and C (requests
// whose DID came out changed). It checks that:
//   * every request leaves exactly once, on the port of its original DID;
//   * a changed DID is still reachable without a forbidden turn;
//   * C equals the router's tamper counter;
//   * C/B lies within +-35 % of p. Every request that wins its VC while
//     the Trojan is armed is changed, since both routes have more than one
//     reachable tile;
//   * C grows with p.
// With p = 0.1, C should be roughly a tenth of B.
module ht_rate_tb;
  import noc_pkg::*;
  localparam int NR     = 3;
  localparam int CYCLES = 40000;
  localparam int ACT [NR] = '{5, 10, 15};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t   in_flit    [NR][5];
  credit_t credit_out [NR][5];
  flit_t   out_flit   [NR][5];
  credit_t credit_in  [NR][5];
  logic        ht_armed [NR];
  logic [31:0] tcount   [NR];
  logic ht_enable = 0;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NR; g++) begin : g_r
    noc_router #(.K(4), .MY_ID(5), .NUM_VC(3), .DEPTH(3), .HT_EN(1'b1),
                 .HT_WINDOW(100), .HT_ACTIVE(ACT[g])) dut (
      .clk, .rst_n, .in_flit(in_flit[g]), .credit_out(credit_out[g]),
      .out_flit(out_flit[g]), .credit_in(credit_in[g]), .ht_enable,
      .ht_armed(ht_armed[g]), .ht_tamper_count(tcount[g]));
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  // Input ports used and the tiles their requests go to.
  localparam int NSRC = 2;
  localparam port_e SRC_PORT [NSRC] = '{P_WEST, P_SOUTH};
  localparam int EAST_D [8] = '{2, 3, 6, 7, 10, 11, 14, 15};
  localparam int NORTH_D [2] = '{9, 13};

  int  up_cred  [NR][NSRC][3];
  int  orig_did [NR][int];          // original DID by sequence number
  int  seq      [NR];
  int  sent_b   [NR];
  int  seen_b   [NR], seen_c [NR];
  real exp_sum  [NR];               // expected changes, summed per request
  bit  sending = 0;

  // credits from the router back to the upstream senders
  always @(posedge clk) if (rst_n)
    for (int r = 0; r < NR; r++)
      for (int s = 0; s < NSRC; s++)
        if (credit_out[r][SRC_PORT[s]].valid) up_cred[r][s][credit_out[r][SRC_PORT[s]].vc]++;

  // upstream: one request per source port per cycle on an idle VC
  always @(negedge clk) begin
    int v, did;
    head_t h;
    for (int r = 0; r < NR; r++) for (int p = 0; p < 5; p++) in_flit[r][p] = '0;
    if (sending) begin
      for (int s = 0; s < NSRC; s++) begin
        did = (s == 0) ? EAST_D[$urandom_range(0, 7)] : NORTH_D[$urandom_range(0, 1)];
        v   = $urandom_range(0, 2);
        h   = head_t'({$urandom, $urandom});
        h.sid = 4'(s == 0 ? 4 : 1); h.did = 4'(did); h.pl = '0;
        h.ptype = PT_L1_MISS_REQ;
        for (int r = 0; r < NR; r++) begin
          if (up_cred[r][s][v] == 3) begin
            h.addr = ADDR_W'(seq[r]);
            orig_did[r][seq[r]] = did;
            seq[r]++;
            sent_b[r]++;
            exp_sum[r] += real'(ACT[r]) / 100.0;
            in_flit[r][SRC_PORT[s]] = '{valid: 1'b1, ft: FT_HEAD, vcid: 2'(v), data: FLIT_W'(h)};
            up_cred[r][s][v]--;
          end
        end
      end
    end
  end

  // downstream: take every flit, return its credit next cycle
  always @(posedge clk) begin
    for (int r = 0; r < NR; r++)
      for (int o = 0; o < 5; o++) begin
        credit_in[r][o] <= '0;
        if (rst_n && out_flit[r][o].valid) begin
          head_t h;
          int k;
          h = head_t'(out_flit[r][o].data);
          k = int'(h.addr);
          credit_in[r][o] <= '{valid: 1'b1, vc: out_flit[r][o].vcid};
          if (!orig_did[r].exists(k)) begin
            chk(0, $sformatf("router %0d: unknown or repeated request %0d", r, k));
          end else begin
            port_e want;
            want = (h.sid == 4'd4) ? P_EAST : P_NORTH;
            chk(out_flit[r][o].ft == FT_HEAD && o == int'(want),
                $sformatf("router %0d: request %0d left on port %0d", r, k, o));
            seen_b[r]++;
            if (int'(h.did) != orig_did[r][k]) begin
              seen_c[r]++;
              if (want == P_EAST) chk(int'(h.did) % 4 >= 2, "East rewrite stays east");
              else chk(int'(h.did) % 4 == 1 && int'(h.did) / 4 >= 2, "North rewrite stays north");
            end
            orig_did[r].delete(k);
          end
        end
      end
  end

  initial begin
    for (int r = 0; r < NR; r++) begin
      for (int p = 0; p < 5; p++) credit_in[r][p] = '0;
      for (int s = 0; s < NSRC; s++) for (int v = 0; v < 3; v++) up_cred[r][s][v] = 3;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    ht_enable = 1;
    @(posedge clk);
    sending = 1;
    repeat (CYCLES) @(posedge clk);
    sending = 0;
    repeat (50) @(posedge clk);
    for (int r = 0; r < NR; r++) begin
      real rate, expct;
      rate  = real'(seen_c[r]) / real'(seen_b[r]);
      expct = exp_sum[r] / real'(sent_b[r]);
      $display("p=%0.2f: B=%0d C=%0d C/B=%0.4f expected %0.4f tamper_count=%0d",
               real'(ACT[r]) / 100.0, seen_b[r], seen_c[r], rate, expct, tcount[r]);
      chk(sent_b[r] > CYCLES / 2, $sformatf("router %0d: enough requests sent (%0d)", r, sent_b[r]));
      chk(seen_b[r] == sent_b[r], $sformatf("router %0d: all %0d requests left (%0d)", r, sent_b[r], seen_b[r]));
      chk(orig_did[r].size() == 0, "no request left inside the router");
      chk(int'(tcount[r]) == seen_c[r], $sformatf("router %0d: tamper counter %0d = changed %0d", r, tcount[r], seen_c[r]));
      chk(rate > 0.65 * expct && rate < 1.35 * expct,
          $sformatf("router %0d: C/B %0.4f near %0.4f", r, rate, expct));
    end
    chk(seen_c[0] < seen_c[1] && seen_c[1] < seen_c[2], "more rewrites at higher p");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
