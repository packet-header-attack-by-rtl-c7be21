// mshr_arq: L1 miss status holding registers with optional ARQ
// re-transmission.
// Each outstanding L1 miss occupies one of ENTRIES entries; the entry index
// is the packet id (PID) of its request, so a reply names its entry. An
// allocation takes the lowest free entry. A completion frees the entry when
// it is valid and the address matches; a reply for an entry that is no
// longer waiting (a late duplicate after a re-transmission) is counted and
// ignored.
// ARQ: when arq_en is high every entry whose request went over the network
// runs a timer; once it reaches arq_timeout cycles without a reply the entry
// asks for its request to be sent again (lowest such entry first) and the
// timer restarts when the re-send is accepted. The timeout is a run-time
// input so that both described settings (1000 and 200 cycles) can be used
// with one build.
// 256 entries and MSHR-level timer-based re-transmission follow the
// description; the lowest-first choices and address check are this design's.
module mshr_arq
  import noc_pkg::*;
#(
  parameter int ENTRIES = 256,
  parameter int TW      = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       arq_en,
  input  logic [TW-1:0]              arq_timeout,
  // allocate
  input  logic                       alloc_valid,
  input  logic [ADDR_W-1:0]          alloc_addr,
  input  logic                       alloc_remote,
  output logic                       alloc_ready,
  output logic [$clog2(ENTRIES)-1:0] alloc_id,
  // complete
  input  logic                       cmpl_valid,
  input  logic [$clog2(ENTRIES)-1:0] cmpl_id,
  input  logic [ADDR_W-1:0]          cmpl_addr,
  output logic                       cmpl_hit,
  // re-transmit
  output logic                       retx_valid,
  output logic [$clog2(ENTRIES)-1:0] retx_id,
  output logic [ADDR_W-1:0]          retx_addr,
  input  logic                       retx_ready,
  // statistics
  output logic [$clog2(ENTRIES+1)-1:0] outstanding,
  output logic [31:0]                retx_count,
  output logic [31:0]                dup_count
);
  localparam int IW = $clog2(ENTRIES);
  localparam int OW = $clog2(ENTRIES + 1);

  logic              valid  [ENTRIES];
  logic              remote [ENTRIES];
  logic [ADDR_W-1:0] addr   [ENTRIES];
  logic [TW-1:0]     timer  [ENTRIES];

  always_comb begin
    alloc_ready = 1'b0;
    alloc_id    = '0;
    retx_valid  = 1'b0;
    retx_id     = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (!valid[e]) begin
        alloc_ready = 1'b1;
        alloc_id    = IW'(e);
      end
      if (valid[e] && remote[e] && arq_en && timer[e] >= arq_timeout) begin
        retx_valid = 1'b1;
        retx_id    = IW'(e);
      end
    end
    retx_addr = addr[retx_id];
    cmpl_hit  = cmpl_valid && valid[cmpl_id] && addr[cmpl_id] == cmpl_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        valid[e]  <= 1'b0;
        remote[e] <= 1'b0;
        addr[e]   <= '0;
        timer[e]  <= '0;
      end
      outstanding <= '0;
      retx_count  <= '0;
      dup_count   <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++)
        if (valid[e] && remote[e] && arq_en && timer[e] != '1) timer[e] <= timer[e] + 1'b1;
      if (retx_valid && retx_ready) begin
        timer[retx_id] <= '0;
        retx_count     <= retx_count + 1'b1;
      end
      if (cmpl_hit) valid[cmpl_id] <= 1'b0;
      else if (cmpl_valid) dup_count <= dup_count + 1'b1;
      if (alloc_valid && alloc_ready) begin
        valid[alloc_id]  <= 1'b1;
        remote[alloc_id] <= alloc_remote;
        addr[alloc_id]   <= alloc_addr;
        timer[alloc_id]  <= '0;
      end
      outstanding <= outstanding + OW'(alloc_valid && alloc_ready) - OW'(cmpl_hit);
    end
  end
endmodule
