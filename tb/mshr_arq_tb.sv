// mshr_arq_tb: the 256-entry MSHR with its ARQ timer.
//   * 256 allocations receive ids 0..255 in order, then the MSHR is full;
//   * a completion with the right address frees its entry (cmpl_hit), the
//     next allocation reuses the lowest free id; a completion with a wrong
//     address, or for a free entry, is ignored and counted as a duplicate;
//   * outstanding follows allocations and completions;
//   * with ARQ off no re-send is requested; with ARQ on and a 200-cycle
//     timeout a remote entry asks for a re-send exactly 200 cycles after
//     it was allocated, and again 200 cycles after the re-send was
//     accepted; a local entry never asks; retx_count counts accepted
//     re-sends.
module mshr_arq_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic arq_en;
  logic [15:0] arq_timeout;
  logic alloc_valid, alloc_remote, alloc_ready;
  logic [ADDR_W-1:0] alloc_addr, cmpl_addr, retx_addr;
  logic [7:0] alloc_id, cmpl_id, retx_id;
  logic cmpl_valid, cmpl_hit, retx_valid, retx_ready;
  logic [8:0] outstanding;
  logic [31:0] retx_count, dup_count;
  int checks = 0, failures = 0;

  mshr_arq #(.ENTRIES(256)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  function automatic logic [ADDR_W-1:0] A(input int k);
    return ADDR_W'(64'h1000 + k * 64);
  endfunction

  int wait_cycles;
  initial begin
    arq_en = 0; arq_timeout = 16'd200;
    alloc_valid = 0; alloc_remote = 0; alloc_addr = '0;
    cmpl_valid = 0; cmpl_id = '0; cmpl_addr = '0; retx_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill
    for (int k = 0; k < 256; k++) begin
      alloc_valid = 1; alloc_addr = A(k); alloc_remote = 1;
      #1;
      chk(alloc_ready && alloc_id == 8'(k), $sformatf("allocation %0d gets id %0d", k, alloc_id));
      @(negedge clk);
    end
    alloc_valid = 0;
    #1;
    chk(!alloc_ready, "full after 256");
    chk(outstanding == 9'd256, "256 outstanding");
    chk(!retx_valid, "no re-send with ARQ off");
    // complete entry 7 correctly, entry 9 with a wrong address
    cmpl_valid = 1; cmpl_id = 8'd7; cmpl_addr = A(7);
    #1; chk(cmpl_hit, "completion hits");
    @(negedge clk);
    cmpl_id = 8'd9; cmpl_addr = A(10);
    #1; chk(!cmpl_hit, "wrong address does not hit");
    @(negedge clk);
    cmpl_id = 8'd7; cmpl_addr = A(7);
    #1; chk(!cmpl_hit, "freed entry does not hit again");
    @(negedge clk);
    cmpl_valid = 0;
    #1;
    chk(dup_count == 2, "two duplicates counted");
    chk(outstanding == 9'd255, "255 outstanding");
    chk(alloc_ready && alloc_id == 8'd7, "lowest free id is 7");
    // free everything
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      cmpl_valid = 1; cmpl_id = 8'(k); cmpl_addr = A(k);
    end
    @(negedge clk);
    cmpl_valid = 0;
    #1; chk(outstanding == 0, "all freed");
    // ARQ timing
    arq_en = 1;
    alloc_valid = 1; alloc_addr = A(100); alloc_remote = 1;   // id 0, remote
    @(negedge clk);
    alloc_addr = A(101); alloc_remote = 0;                     // id 1, local
    @(negedge clk);
    alloc_valid = 0;
    wait_cycles = 1;     // clock edges since the allocating edge
    while (!retx_valid && wait_cycles < 1000) begin @(negedge clk); wait_cycles++; end
    chk(wait_cycles == 200, $sformatf("first re-send after %0d cycles", wait_cycles));
    chk(retx_id == 8'd0 && retx_addr == A(100), "re-send names the remote entry");
    retx_ready = 1;
    @(negedge clk);
    retx_ready = 0;
    #1; chk(!retx_valid && retx_count == 1, "re-send accepted and counted");
    wait_cycles = 0;
    while (!retx_valid && wait_cycles < 1000) begin @(negedge clk); wait_cycles++; end
    chk(wait_cycles == 200, $sformatf("second re-send after %0d cycles", wait_cycles));
    chk(retx_id == 8'd0, "local entry never re-sends");
    cmpl_valid = 1; cmpl_id = 8'd0; cmpl_addr = A(100);
    @(negedge clk);
    cmpl_valid = 0;
    repeat (300) begin #1; chk(!retx_valid, "no re-send after completion"); @(negedge clk); end
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
