// ht_trojan: a header-tampering hardware Trojan mounted on the input buffers
// of one router.
// Trigger: a free-running counter divides time into WINDOW-cycle windows.
// Once enable is high, the Trojan is armed for ACTIVE consecutive cycles in
// every window, so a passing packet is attacked with probability
// p = ACTIVE/WINDOW (10/100 = 0.1 by default). Where the burst starts inside
// each window is drawn from a 16-bit LFSR, so the attack is random and
// sporadic.
// Payload: in the cycle a head flit in a mesh input VC is granted its
// downstream VC (so OP and VCID are already fixed), an armed Trojan checks
// TYPE; for an L1 miss request it rewrites DID in the buffered head flit to a
// random tile that XY routing can still reach from the next router without
// a forbidden turn or U-turn:
//   OP East : any tile in a column east of this router,
//   OP West : any tile in a column west of this router,
//   OP North/South : a tile further along the same column.
// Packets leaving through the local port, and packets injected by the local
// tile, are left alone. When the random pick equals the old DID, the next
// reachable tile is taken instead, so an attack always changes DID; only a
// North/South route with a single reachable tile (South of router 5: tile 1)
// is left as is.
// The outputs drive the rewrite ports of the input ports in the same cycle.
// tamper_data is the whole head flit with only DID replaced, so all its other
// bits are copies of vc_front by construction.
// The trigger window, the TYPE check, the rewrite timing and the reachability
// rule follow the described Trojan; the LFSR, the burst placement and the
// way a random tile is chosen are this design's choices.
module ht_trojan
  import noc_pkg::*;
#(
  parameter int K            = 4,
  parameter int MY_ID        = 5,
  parameter int NIN          = 5,
  parameter int NUM_VC       = 3,
  parameter int WINDOW       = 100,
  parameter int ACTIVE       = 10,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  flit_t              vc_front  [NIN][NUM_VC],
  input  port_e              vc_op     [NIN][NUM_VC],
  input  logic [NUM_VC-1:0]  va_grant  [NIN],
  output logic               armed,
  output logic [NUM_VC-1:0]  tamper_en   [NIN],
  output logic [FLIT_W-1:0]  tamper_data [NIN][NUM_VC],
  output logic [31:0]        tamper_count
);
  localparam int CW = $clog2(WINDOW);
  localparam int CX = MY_ID % K;
  localparam int CY = MY_ID / K;

  logic [15:0]   lfsr;
  logic [CW-1:0] cnt;
  logic [CW-1:0] start;

  // Galois LFSR, x^16 + x^14 + x^13 + x^11 + 1
  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr  <= SEED;
      cnt   <= '0;
      start <= '0;
    end else begin
      lfsr <= lfsr_next(lfsr);
      if (cnt == CW'(WINDOW - 1)) begin
        cnt   <= '0;
        start <= CW'(int'(lfsr) % (WINDOW - ACTIVE + 1));
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign armed = enable && (cnt >= start) && (int'(cnt) < int'(start) + ACTIVE);

  // Pick a reachable tile other than the old DID; returns the old DID when no
  // other choice exists.
  function automatic logic [NODE_W-1:0] pick_did(input port_e op, input logic [15:0] r,
                                                 input logic [NODE_W-1:0] old);
    int nx, ny, span;
    nx = CX; ny = CY;
    unique case (op)
      P_EAST:  begin span = K - 1 - CX; nx = CX + 1 + (int'(r[7:0]) % (span > 0 ? span : 1)); ny = int'(r[15:8]) % K; end
      P_WEST:  begin span = CX;         nx = int'(r[7:0]) % (span > 0 ? span : 1);          ny = int'(r[15:8]) % K; end
      P_NORTH: begin span = K - 1 - CY; ny = CY + 1 + (int'(r[7:0]) % (span > 0 ? span : 1)); end
      P_SOUTH: begin span = CY;         ny = int'(r[7:0]) % (span > 0 ? span : 1);          end
      default: return old;
    endcase
    // a hit on the old DID moves to the next row (East/West) or to the next
    // tile along the allowed part of the column (North/South)
    if (NODE_W'(ny * K + nx) == old) begin
      if (op == P_EAST || op == P_WEST) ny = (ny + 1) % K;
      else if (span > 1 && op == P_NORTH) ny = CY + 1 + ((ny - CY) % span);
      else if (span > 1)                  ny = (ny + 1) % span;
    end
    return NODE_W'(ny * K + nx);
  endfunction

  logic [NUM_VC-1:0] hit [NIN];

  always_comb begin
    for (int i = 0; i < NIN; i++)
      for (int v = 0; v < NUM_VC; v++) begin
        head_t h;
        logic [NODE_W-1:0] nd;
        h  = head_t'(vc_front[i][v].data);
        nd = pick_did(vc_op[i][v], {lfsr[7:0], lfsr[15:8]} ^ 16'(v * 16'h3A5B + i * 16'h1F27), h.did);
        hit[i][v] = armed && (i != int'(P_LOCAL)) && va_grant[i][v]
                    && vc_front[i][v].ft == FT_HEAD && h.ptype == PT_L1_MISS_REQ
                    && vc_op[i][v] != P_LOCAL && nd != h.did;
        h.did = nd;
        tamper_en[i][v]   = hit[i][v];
        tamper_data[i][v] = FLIT_W'(h);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tamper_count <= '0;
    else begin
      int n;
      n = 0;
      for (int i = 0; i < NIN; i++)
        for (int v = 0; v < NUM_VC; v++) n += int'(hit[i][v]);
      tamper_count <= tamper_count + 32'(n);
    end
  end
endmodule
