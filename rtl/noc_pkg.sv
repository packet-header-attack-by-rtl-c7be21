// noc_pkg: types and constants shared by the mesh NoC, the tile logic and the
// header-tampering Trojan.
//
// A flit travels on a 64-bit data channel with a parallel control channel that
// carries the flit type (FT) and the virtual-channel identifier (VCID). The
// head flit's 64 data bits hold the packet header: PID, SID, DID, PL, TYPE, PR,
// CMD and ADDRESS, in that order from the most significant bit. The field
// order and the 64-bit channel follow the described flit format; the
// individual field widths are this design's choice (4-bit tile ids fit the
// 4x4 mesh, an 8-bit PID is the index of one of 256 MSHR entries, and the
// address takes the remaining 36 bits).
//
// The L2 home tile of an address is the top log2(16) bits of the L2 set
// index. With an assumed 64-byte line, a 2 MB 8-way shared L2 has 4096 sets,
// so the index is address bits [17:6] and the home tile is bits [17:14].
package noc_pkg;

  localparam int FLIT_W   = 64;   // flit channel width
  localparam int NODE_W   = 4;    // tile id width (16 tiles)
  localparam int VCID_W   = 2;    // enough for up to 4 VCs
  localparam int PID_W    = 8;
  localparam int PL_W     = 3;
  localparam int ADDR_W   = 36;
  localparam int NPORTS   = 5;

  // Address split used by the L2 home-tile check.
  localparam int OFFSET_BITS   = 6;   // 64-byte line
  localparam int L2_INDEX_BITS = 12;  // 2 MB / 64 B / 8 ways = 4096 sets
  localparam int HOME_LSB      = OFFSET_BITS + L2_INDEX_BITS - NODE_W;  // 14

  // Reply packets are one head flit plus REPLY_PL non-head flits.
  localparam int REPLY_PL = 4;

  typedef enum logic [1:0] {
    FT_HEAD = 2'd0,
    FT_BODY = 2'd1,
    FT_TAIL = 2'd2
  } flit_type_e;

  typedef enum logic [2:0] {
    PT_L1_MISS_REQ   = 3'd0,   // L1 miss request (single head flit)
    PT_L1_MISS_REPLY = 3'd1,   // data reply to an L1 miss
    PT_L1_WRITEBACK  = 3'd2,
    PT_OTHER         = 3'd3
  } pkt_type_e;

  // Router port numbering: East, West, North, South, local processing element.
  typedef enum logic [2:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef struct packed {
    logic [PID_W-1:0]  pid;
    logic [NODE_W-1:0] sid;
    logic [NODE_W-1:0] did;
    logic [PL_W-1:0]   pl;
    pkt_type_e         ptype;
    logic [1:0]        pr;
    logic [3:0]        cmd;
    logic [ADDR_W-1:0] addr;
  } head_t;

  typedef struct packed {
    logic              valid;
    flit_type_e        ft;
    logic [VCID_W-1:0] vcid;
    logic [FLIT_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic              valid;
    logic [VCID_W-1:0] vc;
  } credit_t;

  // A whole message as handed between the tile controller and the network
  // adapter: header plus up to REPLY_PL data words.
  typedef struct packed {
    head_t                          hdr;
    logic [REPLY_PL-1:0][FLIT_W-1:0] data;
  } msg_t;

  function automatic logic [NODE_W-1:0] home_tile(input logic [ADDR_W-1:0] addr);
    return addr[HOME_LSB +: NODE_W];
  endfunction

  // Last flit of a packet: a tail flit, or a head flit that has no followers.
  function automatic logic is_last(input flit_t f);
    head_t h;
    h = head_t'(f.data);
    return (f.ft == FT_TAIL) || (f.ft == FT_HEAD && h.pl == '0);
  endfunction

endpackage
