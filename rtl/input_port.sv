// input_port: one router input port with NUM_VC virtual channels.
// The demultiplexer steers an arriving flit into the VC named by the VCID of
// its control prefix. Each VC is a DEPTH-flit FIFO plus a control buffer:
//   S     busy from the head flit until the last flit of the packet arrives;
//   PL    loaded from the head flit's PL, decremented by every non-head flit,
//         S returns to free when it reaches zero;
//   VCID  the downstream VC granted by the VC allocator;
//   OP    the output port, computed by the XY routing unit from the DID of
//         the head flit as it is written, and inherited by the body and tail
//         flits (wormhole switching). OP and VCID are cleared when the last
//         flit of the packet leaves.
// The head's PR field is also kept per VC, for the switch allocator's
// ranking of body and tail flits.
// The VC allocator and switch allocator read the per-VC state below; the
// switch allocator pops at most one VC per cycle. A pop returns one credit to
// the upstream router on the following cycle. The tamper inputs let a Trojan
// rewrite the head flit in the front of a VC.
// Timing: a head written in cycle t has OP valid in t+1, can win VC
// allocation in t+1 and switch allocation from t+2.
// The control-buffer fields and the routing rule follow the described input
// port; the single-cycle stages and the registered credit are this design's.
module input_port
  import noc_pkg::*;
#(
  parameter int K      = 4,
  parameter int NUM_VC = 3,
  parameter int DEPTH  = 3,
  parameter int MY_ID  = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,
  output credit_t credit_out,
  // per-VC state
  output flit_t                     vc_front    [NUM_VC],
  output logic  [NUM_VC-1:0]        vc_nonempty,
  output logic  [NUM_VC-1:0]        vc_busy,        // S
  output logic  [PL_W-1:0]          vc_pl       [NUM_VC],
  output logic  [NUM_VC-1:0]        vc_op_valid,
  output port_e                     vc_op       [NUM_VC],
  output logic  [1:0]               vc_pr       [NUM_VC],   // PR of the packet
  output logic  [NUM_VC-1:0]        vc_ovc_valid,
  output logic  [VCID_W-1:0]        vc_ovc      [NUM_VC],
  // allocator commands
  input  logic  [NUM_VC-1:0]        va_grant,
  input  logic  [VCID_W-1:0]        va_vc       [NUM_VC],
  input  logic  [NUM_VC-1:0]        sa_pop,
  // head-flit rewrite port
  input  logic  [NUM_VC-1:0]        tamper_en,
  input  logic  [FLIT_W-1:0]        tamper_data [NUM_VC]
);
  head_t in_hdr;
  port_e in_op;
  assign in_hdr = head_t'(in_flit.data);

  xy_route #(.K(K)) u_rc (.cur_id(NODE_W'(MY_ID)), .did(in_hdr.did), .op(in_op));

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic push;
    logic empty;
    logic [$clog2(DEPTH+1)-1:0] cnt;
    assign push = in_flit.valid && (in_flit.vcid == VCID_W'(v));

    vc_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .push, .din(in_flit), .pop(sa_pop[v]),
      .rewrite_en(tamper_en[v]), .rewrite_data(tamper_data[v]),
      .front(vc_front[v]), .empty, .count(cnt)
    );
    assign vc_nonempty[v] = !empty;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vc_busy[v]      <= 1'b0;
        vc_pl[v]        <= '0;
        vc_op_valid[v]  <= 1'b0;
        vc_op[v]        <= P_LOCAL;
        vc_pr[v]        <= '0;
        vc_ovc_valid[v] <= 1'b0;
        vc_ovc[v]       <= '0;
      end else begin
        if (sa_pop[v] && !empty && is_last(vc_front[v])) begin
          vc_op_valid[v]  <= 1'b0;
          vc_ovc_valid[v] <= 1'b0;
        end else if (va_grant[v]) begin
          vc_ovc_valid[v] <= 1'b1;
          vc_ovc[v]       <= va_vc[v];
        end
        if (push) begin
          if (in_flit.ft == FT_HEAD) begin
            vc_pl[v]       <= in_hdr.pl;
            vc_busy[v]     <= (in_hdr.pl != '0);
            vc_op[v]       <= in_op;
            vc_pr[v]       <= in_hdr.pr;
            vc_op_valid[v] <= 1'b1;
          end else begin
            vc_pl[v]   <= vc_pl[v] - 1'b1;
            if (vc_pl[v] == PL_W'(1)) vc_busy[v] <= 1'b0;
          end
        end
      end
    end
  end

  // One credit per popped flit, returned on the next cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= '0;
    else begin
      credit_out <= '0;
      for (int v = 0; v < NUM_VC; v++)
        if (sa_pop[v] && vc_nonempty[v]) begin
          credit_out.valid <= 1'b1;
          credit_out.vc    <= VCID_W'(v);
        end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sa_pop))
    else $error("input_port: more than one VC popped in a cycle");
endmodule
