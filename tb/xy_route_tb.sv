// xy_route_tb: exhaustive check of XY routing on the 4 x 4 mesh. For every
// (current, destination) pair the expected port is worked out from the
// coordinates: X first (East if the destination column is larger, West if
// smaller), then Y (North if the row is larger, South if smaller), Local at
// the destination.
module xy_route_tb;
  import noc_pkg::*;
  logic [NODE_W-1:0] cur_id, did;
  port_e op;
  int checks = 0, failures = 0;

  xy_route #(.K(4)) dut (.*);

  initial begin
    for (int c = 0; c < 16; c++)
      for (int d = 0; d < 16; d++) begin
        port_e exp;
        cur_id = NODE_W'(c);
        did    = NODE_W'(d);
        #1;
        if      (d % 4 > c % 4) exp = P_EAST;
        else if (d % 4 < c % 4) exp = P_WEST;
        else if (d / 4 > c / 4) exp = P_NORTH;
        else if (d / 4 < c / 4) exp = P_SOUTH;
        else                    exp = P_LOCAL;
        checks++;
        if (op != exp) begin
          failures++;
          $display("FAIL: cur %0d did %0d op %0d expected %0d", c, d, op, exp);
        end
      end
    // the example path 4 -> 15: East at 4, 5, 6, then North at 7 and 11
    cur_id = 4'd5; did = 4'd15; #1; checks++; if (op != P_EAST)  failures++;
    cur_id = 4'd7; did = 4'd15; #1; checks++; if (op != P_NORTH) failures++;
    cur_id = 4'd7; did = 4'd3;  #1; checks++; if (op != P_SOUTH) failures++;
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
