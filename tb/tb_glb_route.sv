// tb_glb_route: walks packets hop by hop through a 6 x 5 mesh with the routing unit, for every
// source/destination pair and random congestion flags at each hop. Checks that every chosen
// port is admissible, that each hop moves one step closer to the destination (minimal
// routing), that the packet ends at the local port of its destination, and that the path
// obeys the odd-even turn rules: no east-to-north/south turn in an even column, no
// north/south-to-west turn in an odd column. Also checks that the selection avoids a congested
// X neighbour when the Y direction is admissible and free.
module tb_glb_route;
  import glb_pkg::*;
  localparam int MX = 6, MY = 5;
  logic [2:0] cur_x, cur_y, src_x, dst_x, dst_y;
  logic [4:0] nbr_cong, admissible;
  port_e sel;
  int checks = 0, failures = 0;
  int n_avoid = 0;

  glb_route dut (.*);

  initial begin
    for (int s = 0; s < MX * MY; s++)
      for (int d = 0; d < MX * MY; d++) begin
        int x, y, hops, mdist;
        port_e prev;
        x = s % MX; y = s / MX;
        src_x = 3'(x);
        dst_x = 3'(d % MX); dst_y = 3'(d / MX);
        mdist = ((d % MX > x) ? d % MX - x : x - d % MX) + ((d / MX > y) ? d / MX - y : y - d / MX);
        hops = 0;
        prev = P_LOCAL;
        for (int step = 0; step < 20; step++) begin
          cur_x = 3'(x); cur_y = 3'(y);
          nbr_cong = 5'($urandom) & 5'b11110;
          #1;
          checks++;
          if (!admissible[sel]) begin
            failures++; $display("FAIL: %0d->%0d sel %0d not admissible", s, d, sel);
          end
          // congestion-aware choice
          if (admissible[P_EAST] + admissible[P_WEST] == 1 && (admissible[P_NORTH] || admissible[P_SOUTH])) begin
            port_e xp, yp;
            xp = admissible[P_EAST] ? P_EAST : P_WEST;
            yp = admissible[P_NORTH] ? P_NORTH : P_SOUTH;
            checks++;
            if (nbr_cong[xp] && !nbr_cong[yp]) begin
              n_avoid++;
              if (sel != yp) begin failures++; $display("FAIL: did not avoid congested X port"); end
            end else if (sel != xp) begin
              failures++; $display("FAIL: X direction not preferred");
            end
          end
          if (sel == P_LOCAL) break;
          // turn rules (prev = direction of travel into this node)
          if (prev == P_EAST && (sel == P_NORTH || sel == P_SOUTH) && x % 2 == 0) begin
            failures++; $display("FAIL: EN/ES turn in even column %0d (%0d->%0d)", x, s, d);
          end
          if ((prev == P_NORTH || prev == P_SOUTH) && sel == P_WEST && x % 2 == 1) begin
            failures++; $display("FAIL: NW/SW turn in odd column %0d (%0d->%0d)", x, s, d);
          end
          case (sel)
            P_EAST:  x++;
            P_WEST:  x--;
            P_NORTH: y++;
            default: y--;
          endcase
          prev = sel;
          hops++;
        end
        checks++;
        if (x != d % MX || y != d / MX || hops != mdist) begin
          failures++;
          $display("FAIL: %0d->%0d ended at (%0d,%0d) after %0d hops, distance %0d", s, d, x, y, hops, mdist);
        end
      end
    checks++;
    if (n_avoid == 0) begin failures++; $display("FAIL: congestion avoidance never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
