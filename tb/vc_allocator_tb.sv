// vc_allocator_tb: random requests and downstream-VC availability. Checked
// each cycle against rules worked out independently of the arbiter order:
//   * only requesting input VCs are granted, and only when their output
//     port has a free VC;
//   * each output port grants exactly one requester when it has a request
//     and a free VC, and the VC given is the lowest free one;
//   * alloc marks exactly the VC handed out.
// A fairness check holds all 15 requesters on one port and expects each to
// be served once in 15 consecutive grants (round robin).
module vc_allocator_tb;
  import noc_pkg::*;
  localparam int NR = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NR-1:0]     req, grant;
  port_e             req_port [NR];
  logic [2:0]        ovc_free [5];
  logic [VCID_W-1:0] grant_vc [NR];
  logic [2:0]        alloc    [5];
  int checks = 0, failures = 0;

  vc_allocator #(.NIN(5), .NOUT(5), .NUM_VC(3)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  int served [NR];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      req = NR'($urandom);
      for (int r = 0; r < NR; r++) req_port[r] = port_e'($urandom_range(0, 4));
      for (int o = 0; o < 5; o++) ovc_free[o] = 3'($urandom);
      #1;
      for (int o = 0; o < 5; o++) begin
        int nreq, ngnt, lowest;
        nreq = 0; ngnt = 0; lowest = -1;
        for (int v = 2; v >= 0; v--) if (ovc_free[o][v]) lowest = v;
        for (int r = 0; r < NR; r++) if (req[r] && int'(req_port[r]) == o) begin
          nreq++;
          if (grant[r]) begin
            ngnt++;
            chk(int'(grant_vc[r]) == lowest, "granted VC is the lowest free one");
          end
        end
        chk(ngnt == ((nreq > 0 && lowest >= 0) ? 1 : 0), $sformatf("one grant at output %0d", o));
        chk(alloc[o] == ((ngnt == 1) ? 3'(1 << lowest) : 3'b0), "alloc marks the VC handed out");
      end
      for (int r = 0; r < NR; r++) if (grant[r]) chk(req[r], "grant only to a requester");
    end
    // fairness: everybody asks for the North port, one VC always free
    @(negedge clk);
    req = '1;
    for (int r = 0; r < NR; r++) req_port[r] = P_NORTH;
    for (int o = 0; o < 5; o++) ovc_free[o] = 3'b100;
    for (int t = 0; t < NR; t++) begin
      #1;
      for (int r = 0; r < NR; r++) if (grant[r]) served[r]++;
      @(negedge clk);
    end
    for (int r = 0; r < NR; r++) chk(served[r] == 1, $sformatf("requester %0d served once in 15", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
