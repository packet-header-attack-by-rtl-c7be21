// switch_allocator_tb: random eligibility and output ports. Every cycle the
// grants must form a legal crossbar setting: at most one VC popped per input
// port, only eligible VCs popped, each output driven by exactly the one
// input whose popped VC targets it (out_sel names that input), and at least
// one grant whenever any VC is eligible. Priorities (PR) are random:
// a popped VC must carry the highest PR among its input's eligible VCs, and
// no input whose top-PR eligible VCs all target an output may hold a higher
// PR than that output's winner. A fairness run has all 15 VCs eligible for
// East at equal PR and expects each served once in 15 cycles; a directed
// run shows a PR 3 packet beating PR 0 packets for the same output every
// cycle.
module switch_allocator_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] elig [5];
  port_e      op   [5][3];
  logic [1:0] pr   [5][3];
  logic [2:0] pop  [5];
  logic [4:0] out_valid;
  logic [2:0] out_sel [5];
  int checks = 0, failures = 0;

  switch_allocator #(.NIN(5), .NOUT(5), .NUM_VC(3)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  int served [5][3];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int drv [5];
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        elig[i] = 3'($urandom);
        for (int v = 0; v < 3; v++) begin
          op[i][v] = port_e'($urandom_range(0, 4));
          pr[i][v] = 2'($urandom_range(0, 3));
        end
      end
      #1;
      for (int i = 0; i < 5; i++) begin
        int top;
        bit all_to [5];
        top = -1;
        for (int v = 0; v < 3; v++) if (elig[i][v] && int'(pr[i][v]) > top) top = pr[i][v];
        for (int v = 0; v < 3; v++) if (pop[i][v]) chk(int'(pr[i][v]) == top, "popped VC has its input's top PR");
        for (int o = 0; o < 5; o++) all_to[o] = (top >= 0);
        for (int v = 0; v < 3; v++) if (elig[i][v] && int'(pr[i][v]) == top)
          for (int o = 0; o < 5; o++) if (int'(op[i][v]) != o) all_to[o] = 0;
        for (int o = 0; o < 5; o++) if (all_to[o]) begin
          int wpr;
          wpr = -1;
          for (int j = 0; j < 5; j++) for (int w = 0; w < 3; w++)
            if (pop[j][w] && int'(op[j][w]) == o) wpr = pr[j][w];
          chk(out_valid[o] && wpr >= top, $sformatf("output %0d winner PR %0d not below input %0d PR %0d", o, wpr, i, top));
        end
      end
      for (int o = 0; o < 5; o++) drv[o] = 0;
      for (int i = 0; i < 5; i++) begin
        chk($countones(pop[i]) <= 1, "one pop per input");
        chk((pop[i] & ~elig[i]) == 0, "only eligible VCs popped");
        chk(!(elig[i] != 0 && pop[i] == 0 && out_valid == 0), "something granted when any input is eligible");
        for (int v = 0; v < 3; v++) if (pop[i][v]) begin
          drv[op[i][v]]++;
          chk(out_valid[op[i][v]] && int'(out_sel[op[i][v]]) == i, "out_sel names the popped input");
        end
      end
      for (int o = 0; o < 5; o++) chk(drv[o] == int'(out_valid[o]), "each valid output driven by exactly one pop");
    end
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      elig[i] = 3'b111;
      for (int v = 0; v < 3; v++) begin op[i][v] = P_EAST; pr[i][v] = 2'd0; end
    end
    for (int t = 0; t < 15; t++) begin
      #1;
      for (int i = 0; i < 5; i++) for (int v = 0; v < 3; v++) if (pop[i][v]) served[i][v]++;
      @(negedge clk);
    end
    for (int i = 0; i < 5; i++) for (int v = 0; v < 3; v++)
      chk(served[i][v] == 1, $sformatf("VC %0d.%0d served once in 15", i, v));
    // directed: VC 2.1 with PR 3 wins East every cycle against 14 PR 0 VCs
    pr[2][1] = 2'd3;
    for (int t = 0; t < 10; t++) begin
      #1;
      chk(pop[2] == 3'b010 && out_valid[P_EAST] && out_sel[P_EAST] == 3'd2, "PR 3 packet wins East");
      @(negedge clk);
    end
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
