// tile_controller_tb: tile controller of tile 5 with its 256-entry MSHR.
// Directed cases, each checked against values worked out from the address
// map (home tile = address bits [17:14]):
//   1. an L1 miss homed at tile 5 goes to the local L2 controller (source 5,
//      PID = MSHR entry) and its L2 response fills L1 one cycle later;
//   2. an L1 miss homed at tile 9 leaves as a single-flit L1 miss request
//      packet (SID 5, DID 9, PL 0, same address and PID);
//   3. a request arriving from tile 3 is passed to the local L2 controller
//      with the requester's id and PID, and the L2 response leaves as a
//      reply packet (DID 3, PL 4, data words);
//   4. the reply for case 2 completes the MSHR entry and fills L1;
//   5. priorities: a network request beats a local miss for the L2 port,
//      a remote L2 response beats a new remote miss for the adapter;
//   6. ARQ with a 50-cycle timeout: an unanswered remote miss is re-sent,
//      with its PID and address, 50 cycles after it was sent.
module tile_controller_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic arq_en;
  logic [15:0] arq_timeout;
  logic l1_miss_valid, l1_miss_ready, l1_fill_valid;
  logic [ADDR_W-1:0] l1_miss_addr, l1_fill_addr;
  logic [REPLY_PL-1:0][FLIT_W-1:0] l1_fill_data, l2_resp_data;
  logic l2_req_valid, l2_req_ready, l2_resp_valid, l2_resp_ready;
  logic [ADDR_W-1:0] l2_req_addr, l2_resp_addr;
  logic [NODE_W-1:0] l2_req_src, l2_resp_dst;
  logic [PID_W-1:0] l2_req_pid, l2_resp_pid;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  msg_t tx_msg, rx_msg;
  logic [8:0] outstanding;
  logic [31:0] retx_count, dup_count;
  int checks = 0, failures = 0;

  tile_controller #(.MY_ID(5), .ENTRIES(256)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask
  function automatic logic [ADDR_W-1:0] A(input int home, input int tag);
    return {18'(tag), 4'(home), 8'h3C, 6'h0};
  endfunction
  function automatic logic [REPLY_PL-1:0][FLIT_W-1:0] D(input logic [ADDR_W-1:0] a);
    for (int i = 0; i < REPLY_PL; i++) D[i] = {28'(i + 7), a};
  endfunction

  task automatic quiet();
    l1_miss_valid = 0; l2_resp_valid = 0; rx_valid = 0;
    l2_req_ready = 1; tx_ready = 1;
  endtask

  logic [7:0] pid_local, pid_remote, pid_retx;
  int n;
  initial begin
    arq_en = 0; arq_timeout = 16'd50;
    quiet();
    l1_miss_addr = '0; l2_resp_addr = '0; l2_resp_dst = '0; l2_resp_pid = '0; l2_resp_data = '0; rx_msg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. local miss
    @(negedge clk);
    l1_miss_valid = 1; l1_miss_addr = A(5, 1);
    #1;
    chk(l2_req_valid && l2_req_addr == A(5, 1) && l2_req_src == 4'd5, "local miss to local L2");
    chk(!tx_valid && l1_miss_ready, "local miss not sent to the network");
    pid_local = l2_req_pid;
    @(negedge clk);
    quiet();
    chk(outstanding == 1, "one outstanding");
    l2_resp_valid = 1; l2_resp_addr = A(5, 1); l2_resp_dst = 4'd5; l2_resp_pid = pid_local; l2_resp_data = D(A(5, 1));
    #1; chk(l2_resp_ready && !tx_valid, "local response consumed, not sent");
    @(negedge clk);
    quiet();
    chk(l1_fill_valid && l1_fill_addr == A(5, 1) && l1_fill_data == D(A(5, 1)), "local fill");
    chk(outstanding == 0, "none outstanding");

    // 2. remote miss
    l1_miss_valid = 1; l1_miss_addr = A(9, 2);
    #1;
    chk(tx_valid && !l2_req_valid, "remote miss goes to the network");
    chk(tx_msg.hdr.ptype == PT_L1_MISS_REQ && tx_msg.hdr.sid == 4'd5 && tx_msg.hdr.did == 4'd9
        && tx_msg.hdr.pl == 0 && tx_msg.hdr.addr == A(9, 2), "request header");
    pid_remote = tx_msg.hdr.pid;
    @(negedge clk);
    quiet();

    // 3. request from tile 3, then its L2 response
    rx_valid = 1;
    rx_msg = '0; rx_msg.hdr.ptype = PT_L1_MISS_REQ; rx_msg.hdr.sid = 4'd3; rx_msg.hdr.did = 4'd5;
    rx_msg.hdr.pid = 8'd17; rx_msg.hdr.addr = A(5, 3);
    l2_req_ready = 0;
    #1; chk(l2_req_valid && !rx_ready, "request held while L2 busy");
    l2_req_ready = 1;
    #1; chk(l2_req_valid && rx_ready && l2_req_src == 4'd3 && l2_req_pid == 8'd17 && l2_req_addr == A(5, 3),
            "network request to local L2");
    @(negedge clk);
    quiet();
    l2_resp_valid = 1; l2_resp_addr = A(5, 3); l2_resp_dst = 4'd3; l2_resp_pid = 8'd17; l2_resp_data = D(A(5, 3));
    tx_ready = 0;
    #1; chk(tx_valid && !l2_resp_ready, "reply waits for the adapter");
    tx_ready = 1;
    #1; chk(tx_valid && l2_resp_ready && tx_msg.hdr.ptype == PT_L1_MISS_REPLY && tx_msg.hdr.did == 4'd3
            && tx_msg.hdr.sid == 4'd5 && tx_msg.hdr.pl == 3'(REPLY_PL) && tx_msg.hdr.pid == 8'd17
            && tx_msg.data == D(A(5, 3)), "reply packet");
    @(negedge clk);
    quiet();

    // 4. reply for the remote miss
    rx_valid = 1;
    rx_msg = '0; rx_msg.hdr.ptype = PT_L1_MISS_REPLY; rx_msg.hdr.sid = 4'd9; rx_msg.hdr.did = 4'd5;
    rx_msg.hdr.pid = pid_remote; rx_msg.hdr.addr = A(9, 2); rx_msg.hdr.pl = 3'(REPLY_PL); rx_msg.data = D(A(9, 2));
    #1; chk(rx_ready, "reply consumed");
    @(negedge clk);
    quiet();
    chk(l1_fill_valid && l1_fill_addr == A(9, 2) && l1_fill_data == D(A(9, 2)), "remote fill");
    chk(outstanding == 0, "none outstanding after remote fill");

    // 5. priorities
    rx_valid = 1; rx_msg = '0; rx_msg.hdr.ptype = PT_L1_MISS_REQ; rx_msg.hdr.sid = 4'd2; rx_msg.hdr.addr = A(5, 4);
    l1_miss_valid = 1; l1_miss_addr = A(5, 5);
    #1; chk(l2_req_valid && l2_req_src == 4'd2 && !l1_miss_ready, "network request beats local miss");
    quiet();
    l2_resp_valid = 1; l2_resp_dst = 4'd1; l2_resp_addr = A(5, 6);
    l1_miss_valid = 1; l1_miss_addr = A(8, 7);
    #1; chk(tx_valid && tx_msg.hdr.ptype == PT_L1_MISS_REPLY && !l1_miss_ready, "reply beats new remote miss");
    quiet();
    @(negedge clk);

    // 6. ARQ
    arq_en = 1;
    l1_miss_valid = 1; l1_miss_addr = A(12, 8);
    #1; pid_retx = tx_msg.hdr.pid;
    @(negedge clk);
    quiet();
    #1;
    n = 0;                       // clock edges since the request left
    while (!(tx_valid && tx_msg.hdr.addr == A(12, 8)) && n < 500) begin @(negedge clk); #1; n++; end
    chk(n == 50, $sformatf("re-sent after %0d cycles", n));
    chk(tx_msg.hdr.pid == pid_retx && tx_msg.hdr.did == 4'd12 && tx_msg.hdr.ptype == PT_L1_MISS_REQ, "re-sent request header");
    @(negedge clk);
    chk(retx_count == 1, "re-send counted");
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
