// glb_route: odd-even adaptive routing function with congestion-based output selection.
//
// The routing function is the minimal odd-even turn model: it returns the set of admissible
// output ports for a packet at (cur_x, cur_y) that came from (src_x, src_y) and goes to
// (dst_x, dst_y). East-west turns are forbidden where the model forbids them (a packet may
// turn from east to north/south only in odd columns or in its source column, and may keep
// going east towards an even destination column only while more than one hop remains), so no
// virtual channels are needed for deadlock freedom. The selection function then picks one
// admissible port whose downstream input buffer is not congested (cong flag 0), preferring the
// X direction; if all admissible ports are congested the X direction is taken. Y grows towards
// north. Purely combinational. The routing model and the local congestion flags as selection
// metric follow the design description; the X-first preference on ties is this design's choice.
module glb_route
  import glb_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x, cur_y,
  input  logic [COORD_W-1:0] src_x,
  input  logic [COORD_W-1:0] dst_x, dst_y,
  input  logic [NUM_PORTS-1:0] nbr_cong,   // congestion flag per output direction
  output logic [NUM_PORTS-1:0] admissible,
  output port_e                sel
);
  always_comb begin
    logic       north;
    logic       xdir_ok;
    port_e      xp, yp;
    admissible = '0;
    north = (dst_y > cur_y);
    yp    = north ? P_NORTH : P_SOUTH;
    xp    = (dst_x > cur_x) ? P_EAST : P_WEST;
    if (dst_x == cur_x && dst_y == cur_y) begin
      admissible[P_LOCAL] = 1'b1;
    end else if (dst_x == cur_x) begin
      admissible[yp] = 1'b1;
    end else if (dst_x > cur_x) begin
      // eastbound
      if (dst_y == cur_y) begin
        admissible[P_EAST] = 1'b1;
      end else begin
        if (cur_x[0] || cur_x == src_x) admissible[yp] = 1'b1;
        if (dst_x[0] || (dst_x - cur_x) != 1) admissible[P_EAST] = 1'b1;
      end
    end else begin
      // westbound
      admissible[P_WEST] = 1'b1;
      if (!cur_x[0] && dst_y != cur_y) admissible[yp] = 1'b1;
    end

    // selection
    xdir_ok = admissible[xp];
    if (admissible[P_LOCAL])                     sel = P_LOCAL;
    else if (xdir_ok && !nbr_cong[xp])           sel = xp;
    else if (admissible[yp] && !nbr_cong[yp])    sel = yp;
    else if (xdir_ok)                            sel = xp;
    else                                         sel = yp;
  end
endmodule
