// ht_trojan_tb: checks the Trojan of router 5 (column 1, row 1 of the 4 x 4
// mesh) with its default 10-in-100 trigger.
//   Trigger: with enable low it is never armed; with enable high every
//   100-cycle window since reset holds exactly 10 armed cycles, in one
//   consecutive burst (p = 0.1).
//   Payload: random head/body flits, packet types, output ports and VC
//   grants on all ports. A rewrite must happen exactly when the Trojan is
//   armed, the VC was granted this cycle, the flit is the head of an L1 miss
//   request arriving on a mesh port, the output port is not local and a
//   reachable tile other than the old DID exists. The new DID must be
//   reachable without a forbidden turn from the next router (East: column
//   2 or 3; West: column 0; North: column 1, row 2 or 3; South: tile 1),
//   and every other header field must be unchanged. tamper_count must
//   count the rewrites.
module ht_trojan_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable;
  flit_t      vc_front [5][3];
  port_e      vc_op    [5][3];
  logic [2:0] va_grant [5];
  logic       armed;
  logic [2:0] tamper_en [5];
  logic [FLIT_W-1:0] tamper_data [5][3];
  logic [31:0] tamper_count;
  int checks = 0, failures = 0;

  ht_trojan #(.K(4), .MY_ID(5), .NIN(5), .NUM_VC(3), .WINDOW(100), .ACTIVE(10)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic bit legal(input port_e op, input int d);
    int x, y;
    x = d % 4; y = d / 4;
    case (op)
      P_EAST:  return x >= 2;
      P_WEST:  return x == 0;
      P_NORTH: return x == 1 && y >= 2;
      P_SOUTH: return x == 1 && y == 0;
      default: return 0;
    endcase
  endfunction
  function automatic int nlegal(input port_e op);
    nlegal = 0;
    for (int d = 0; d < 16; d++) nlegal += int'(legal(op, d));
  endfunction

  int armed_in_win, win_cycles, bursts, expected_count, hits;
  logic prev_armed;
  initial begin
    enable = 0;
    for (int i = 0; i < 5; i++) begin va_grant[i] = 0; for (int v = 0; v < 3; v++) begin vc_front[i][v] = '0; vc_op[i][v] = P_LOCAL; end end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // disabled: never armed
    for (int t = 0; t < 300; t++) begin @(negedge clk); chk(!armed, "not armed while disabled"); end
    // align to a window start (300 cycles since reset = 3 windows)
    enable = 1;
    expected_count = 0;
    hits = 0;
    for (int w = 0; w < 60; w++) begin
      armed_in_win = 0; bursts = 0; prev_armed = 0;
      for (int t = 0; t < 100; t++) begin
        // random stimulus
        for (int i = 0; i < 5; i++) begin
          va_grant[i] = 3'($urandom);
          for (int v = 0; v < 3; v++) begin
            head_t h;
            h = head_t'({$urandom, $urandom});
            h.ptype = ($urandom_range(0, 3) == 0) ? PT_L1_MISS_REPLY : PT_L1_MISS_REQ;
            vc_front[i][v].valid = 1;
            vc_front[i][v].ft    = ($urandom_range(0, 4) == 0) ? FT_BODY : FT_HEAD;
            vc_front[i][v].vcid  = 2'(v);
            vc_front[i][v].data  = FLIT_W'(h);
            vc_op[i][v] = port_e'($urandom_range(0, 4));
          end
        end
        #1;
        if (armed) armed_in_win++;
        if (armed && !prev_armed) bursts++;
        prev_armed = armed;
        for (int i = 0; i < 5; i++) for (int v = 0; v < 3; v++) begin
          head_t h, n;
          bit cond, alt;
          h = head_t'(vc_front[i][v].data);
          n = head_t'(tamper_data[i][v]);
          alt  = nlegal(vc_op[i][v]) > 1 || (nlegal(vc_op[i][v]) == 1 && !legal(vc_op[i][v], int'(h.did)));
          cond = armed && i != 4 && va_grant[i][v] && vc_front[i][v].ft == FT_HEAD
                 && h.ptype == PT_L1_MISS_REQ && vc_op[i][v] != P_LOCAL;
          if (!cond || !alt) chk(!tamper_en[i][v], "no rewrite without all trigger conditions");
          else chk(tamper_en[i][v], "rewrite whenever all trigger conditions hold");
          if (tamper_en[i][v]) begin
            hits++;
            expected_count++;
            chk(legal(vc_op[i][v], int'(n.did)), $sformatf("new DID %0d reachable via port %0d", n.did, vc_op[i][v]));
            chk(n.did != h.did, "new DID differs");
            n.did = h.did;
            chk(n == h, "other header fields unchanged");
          end
        end
        @(negedge clk);
      end
      chk(armed_in_win == 10, $sformatf("window %0d armed %0d cycles", w, armed_in_win));
      chk(bursts <= 2, "armed cycles form one burst (may straddle a window edge)");
    end
    chk(hits > 0, "some rewrites happened");
    @(negedge clk);
    chk(tamper_count == 32'(expected_count), $sformatf("tamper_count %0d expected %0d", tamper_count, expected_count));
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
