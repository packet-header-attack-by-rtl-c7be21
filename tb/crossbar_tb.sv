// crossbar_tb: drives random flits and random output selections into the
// 5 x 5 crossbar and checks every output against a reference: an enabled
// output carries the selected input's flit with valid set and the VCID
// replaced by that input's allocated downstream VC; a disabled one is idle.
module crossbar_tb;
  import noc_pkg::*;
  flit_t             in_flit  [5];
  logic [VCID_W-1:0] in_ovc   [5];
  logic [4:0]        out_valid;
  logic [2:0]        out_sel  [5];
  flit_t             out_flit [5];
  int checks = 0, failures = 0;

  crossbar #(.NIN(5), .NOUT(5)) dut (.*);

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 5; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom, $urandom});
        in_ovc[i]  = VCID_W'($urandom_range(0, 2));
        out_sel[i] = 3'($urandom_range(0, 4));
      end
      out_valid = 5'($urandom);
      #1;
      for (int o = 0; o < 5; o++) begin
        flit_t exp;
        exp = '0;
        if (out_valid[o]) begin
          exp       = in_flit[out_sel[o]];
          exp.valid = 1'b1;
          exp.vcid  = in_ovc[out_sel[o]];
        end
        checks++;
        if (out_flit[o] != exp) begin
          failures++;
          $display("FAIL: output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
