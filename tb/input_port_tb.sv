// input_port_tb: input port of router 5 with 3 VCs of 3 flits.
// A directed part follows one reply packet (head + 3 body + tail, PL = 4)
// heading for tile 15: after the head is written OP must be East, S busy and
// PL 4; PL counts down with each later flit and S drops when it reaches 0;
// a VC grant sets VCID; popping returns one credit per flit on the next
// cycle; popping the tail clears OP and VCID. A single-flit request leaves
// S free. The tamper port must rewrite the buffered head.
// A random part streams packets into all three VCs (never more flits than
// free slots, as credit flow control guarantees), pops random VCs, and
// compares every front flit, OP, S, PL and returned credit with a model.
module input_port_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t in_flit;
  credit_t credit_out;
  flit_t vc_front [3];
  logic [2:0] vc_nonempty, vc_busy, vc_op_valid, vc_ovc_valid;
  logic [PL_W-1:0] vc_pl [3];
  port_e vc_op [3];
  logic [1:0] vc_pr [3];
  logic [VCID_W-1:0] vc_ovc [3];
  logic [2:0] va_grant, sa_pop, tamper_en;
  logic [VCID_W-1:0] va_vc [3];
  logic [FLIT_W-1:0] tamper_data [3];
  int checks = 0, failures = 0;

  input_port #(.K(4), .NUM_VC(3), .DEPTH(3), .MY_ID(5)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  function automatic flit_t mk_head(input int vc, input int did, input int pl, input pkt_type_e t);
    head_t h;
    h = head_t'({$urandom, $urandom});
    h.did = 4'(did); h.pl = 3'(pl); h.ptype = t;
    mk_head = '0;
    mk_head.valid = 1; mk_head.ft = FT_HEAD; mk_head.vcid = 2'(vc); mk_head.data = FLIT_W'(h);
  endfunction
  function automatic flit_t mk_body(input int vc, input bit tail);
    mk_body = '0;
    mk_body.valid = 1; mk_body.ft = tail ? FT_TAIL : FT_BODY; mk_body.vcid = 2'(vc);
    mk_body.data = {$urandom, $urandom};
  endfunction
  function automatic port_e xy(input int c, input int d);
    if (d % 4 > c % 4) return P_EAST;
    if (d % 4 < c % 4) return P_WEST;
    if (d / 4 > c / 4) return P_NORTH;
    if (d / 4 < c / 4) return P_SOUTH;
    return P_LOCAL;
  endfunction

  task automatic idle();
    in_flit = '0; va_grant = '0; sa_pop = '0; tamper_en = '0;
  endtask

  // random-phase model
  flit_t q [3][$];
  int left [3];            // flits still to send of the current packet
  int m_pl [3];
  bit m_busy [3];
  port_e m_op [3];
  logic [1:0] m_pr [3];
  int credits_back;

  initial begin
    idle();
    for (int v = 0; v < 3; v++) begin va_vc[v] = '0; tamper_data[v] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------- directed ----------
    @(negedge clk);
    in_flit = mk_head(1, 15, 4, PT_L1_MISS_REPLY);
    @(negedge clk);
    idle();
    chk(vc_nonempty == 3'b010, "head stored in VC1");
    chk(vc_op_valid[1] && vc_op[1] == P_EAST, "OP East for DID 15 at router 5");
    chk(vc_busy[1] && vc_pl[1] == 3'd4, "S busy, PL 4");
    chk(!vc_ovc_valid[1], "no VCID before allocation");
    va_grant[1] = 1; va_vc[1] = 2'd2;
    @(negedge clk);
    idle();
    chk(vc_ovc_valid[1] && vc_ovc[1] == 2'd2, "VCID recorded");
    for (int k = 1; k <= 4; k++) begin
      in_flit = mk_body(1, k == 4);
      sa_pop[1] = (k == 1 || k == 3);    // head and body 1 leave as others arrive
      @(negedge clk);
      idle();
      chk(vc_pl[1] == 3'(4 - k), $sformatf("PL %0d after %0d body flits", 4 - k, k));
      chk(vc_busy[1] == (k < 4), "S free only after the last flit");
      if (k == 1) chk(credit_out.valid && credit_out.vc == 2'd1, "credit for popped head");
      chk(vc_op_valid[1] && vc_op[1] == P_EAST, "body flits inherit OP");
    end
    for (int k = 0; k < 3; k++) begin
      sa_pop[1] = 1;
      @(negedge clk);
      idle();
    end
    chk(!vc_nonempty[1], "VC1 drained");
    chk(!vc_op_valid[1] && !vc_ovc_valid[1], "OP and VCID reset after the tail left");
    // single-flit request, then tamper
    in_flit = mk_head(0, 4, 0, PT_L1_MISS_REQ);
    @(negedge clk);
    idle();
    chk(!vc_busy[0] && vc_op[0] == P_WEST, "request: S free, OP West for DID 4 at router 5");
    tamper_en[0] = 1; tamper_data[0] = 64'h0123_4567_89AB_CDEF;
    @(negedge clk);
    idle();
    chk(vc_front[0].data == 64'h0123_4567_89AB_CDEF && vc_front[0].ft == FT_HEAD, "head rewritten in place");
    sa_pop[0] = 1;
    @(negedge clk);
    idle();
    chk(!vc_nonempty[0], "request popped");

    // ---------- random ----------
    for (int v = 0; v < 3; v++) begin left[v] = 0; m_pl[v] = 0; m_busy[v] = 0; m_op[v] = P_LOCAL; end
    credits_back = 0;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      int pv, sv;
      bit cred_exp;
      idle();
      // compare state
      for (int v = 0; v < 3; v++) begin
        chk(vc_nonempty[v] == (q[v].size() != 0), "occupancy");
        if (q[v].size() != 0) chk(vc_front[v] == q[v][0], "front flit");
        chk(vc_busy[v] == m_busy[v] && int'(vc_pl[v]) == m_pl[v], "S and PL");
        if (q[v].size() != 0 && q[v][0].ft == FT_HEAD) chk(vc_op[v] == m_op[v], "OP of head");
        if (q[v].size() != 0 && q[v][0].ft == FT_HEAD) chk(vc_pr[v] == m_pr[v], "PR of head kept");
      end
      // pop one VC (only flits already stored can leave)
      sv = $urandom_range(0, 3);
      cred_exp = 0;
      if (sv < 3 && q[sv].size() != 0) begin
        sa_pop[sv] = 1;
        void'(q[sv].pop_front());
        cred_exp = 1;
      end
      // push into a VC with room
      pv = $urandom_range(0, 2);
      if ($urandom_range(0, 1) && q[pv].size() < 3) begin
        flit_t f;
        if (left[pv] == 0) begin
          int pl, d;
          pl = ($urandom_range(0, 1) != 0) ? 0 : 4;
          d  = $urandom_range(0, 15);
          f = mk_head(pv, d, pl, pl == 0 ? PT_L1_MISS_REQ : PT_L1_MISS_REPLY);
          left[pv] = pl;
          m_pl[pv] = pl; m_busy[pv] = (pl != 0);
          m_op[pv] = xy(5, d);
          begin head_t fh; fh = head_t'(f.data); m_pr[pv] = fh.pr; end
        end else begin
          f = mk_body(pv, left[pv] == 1);
          left[pv]--;
          if (m_pl[pv] == 1) m_busy[pv] = 0;
          m_pl[pv]--;
        end
        in_flit = f;
        q[pv].push_back(f);
      end
      @(negedge clk);
      chk(credit_out.valid == cred_exp && (!cred_exp || int'(credit_out.vc) == sv), $sformatf("credit returned for pop exp %0d got %0d sv %0d", cred_exp, credit_out.valid, sv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
