// glb_sched: Quadrants Information Table (QIT) and adaptive request scheduler of a slave
// network interface.
//
// QIT: four 4-bit congestion values, one per quadrant (SW, SE, NW, NE) around this node.
// When a request header arrives (upd_valid), its CS is averaged into the entry of the
// quadrant its source master lies in: QIT[q] <= (QIT[q] + CS) / 2. A source in the same row
// or column updates both quadrants on that side (a source to the east updates SE and NE).
// Scheduler: the packet queue presents SLOTS complete requests with their source coordinates.
// For each, QuadCon is the QIT entry of its quadrant, or the average of the two entries when
// the source is in the same row or column. The scheduler selects the request with the
// smallest QuadCon - W, where W counts the scheduling decisions the request has waited
// through (cleared when the slot is filled, incremented for every waiting request each time
// a request is taken, saturating). Ties go to the lowest slot index. Selection is
// combinational; the table and the counters change at the clock edge. The table, the
// averaging rule and the QuadCon - W selection follow the design description; reset values of
// zero, a W one bit wider than CS (so an old request always wins in the end) and the tie
// rule are this design's choices.
module glb_sched
  import glb_pkg::*;
#(
  parameter int unsigned SLOTS = 4,
  parameter int unsigned X     = 2,
  parameter int unsigned Y     = 2,
  parameter int unsigned W_W   = CS_W + 1,
  localparam int unsigned SW_ = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // QIT update from an arriving request header
  input  logic               upd_valid,
  input  logic [COORD_W-1:0] upd_src_x,
  input  logic [COORD_W-1:0] upd_src_y,
  input  logic [CS_W-1:0]    upd_cs,
  // requests waiting in the packet queue
  input  logic [SLOTS-1:0]   slot_ready,   // complete request in slot
  input  logic [SLOTS-1:0]   slot_fill,    // slot is being (re)filled: clear its W
  input  logic [COORD_W-1:0] slot_src_x [SLOTS],
  input  logic [COORD_W-1:0] slot_src_y [SLOTS],
  input  logic               take,         // the selected request is taken this cycle
  output logic               sel_valid,
  output logic [SW_-1:0]     sel_idx,
  output logic [CS_W-1:0]    qit [4]
);
  localparam logic [COORD_W-1:0] CX = COORD_W'(X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(Y);
  localparam int unsigned VW = CS_W + 2;  // signed QuadCon - W

  logic [W_W-1:0] w [SLOTS];

  function automatic logic [CS_W-1:0] avg(input logic [CS_W-1:0] a, input logic [CS_W-1:0] b);
    return CS_W'(({1'b0, a} + {1'b0, b}) >> 1);
  endfunction

  function automatic logic [CS_W-1:0] quad_con(input logic [COORD_W-1:0] sx,
                                               input logic [COORD_W-1:0] sy,
                                               input logic [CS_W-1:0] q [4]);
    if      (sx <  CX && sy == CY) return avg(q[Q_SW], q[Q_NW]);
    else if (sx >  CX && sy == CY) return avg(q[Q_SE], q[Q_NE]);
    else if (sx == CX && sy >  CY) return avg(q[Q_NW], q[Q_NE]);
    else if (sx == CX && sy <  CY) return avg(q[Q_SW], q[Q_SE]);
    else if (sx <  CX && sy <  CY) return q[Q_SW];
    else if (sx >  CX && sy <  CY) return q[Q_SE];
    else if (sx <  CX && sy >  CY) return q[Q_NW];
    else if (sx >  CX && sy >  CY) return q[Q_NE];
    else                           return '0;
  endfunction

  // quadrants touched by a source position
  function automatic logic [3:0] quad_mask(input logic [COORD_W-1:0] sx, input logic [COORD_W-1:0] sy);
    logic [3:0] m;
    m = '0;
    if (sx <= CX && sy <= CY) m[Q_SW] = 1'b1;
    if (sx >= CX && sy <= CY) m[Q_SE] = 1'b1;
    if (sx <= CX && sy >= CY) m[Q_NW] = 1'b1;
    if (sx >= CX && sy >= CY) m[Q_NE] = 1'b1;
    if (sx == CX && sy == CY) m = '0;
    return m;
  endfunction

  // selection: minimum of QuadCon - W
  always_comb begin
    logic signed [VW-1:0] best, val;
    sel_valid = 1'b0;
    sel_idx   = '0;
    best      = '0;
    for (int i = 0; i < SLOTS; i++) begin
      val = signed'(VW'(quad_con(slot_src_x[i], slot_src_y[i], qit))) - signed'(VW'(w[i]));
      if (slot_ready[i] && (!sel_valid || val < best)) begin
        sel_valid = 1'b1;
        sel_idx   = SW_'(i);
        best      = val;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++) qit[q] <= '0;
      for (int i = 0; i < SLOTS; i++) w[i] <= '0;
    end else begin
      if (upd_valid) begin
        logic [3:0] m;
        m = quad_mask(upd_src_x, upd_src_y);
        for (int q = 0; q < 4; q++)
          if (m[q]) qit[q] <= avg(qit[q], upd_cs);
      end
      for (int i = 0; i < SLOTS; i++) begin
        if (slot_fill[i])
          w[i] <= '0;
        else if (take && slot_ready[i] && sel_idx != SW_'(i) && w[i] != '1)
          w[i] <= w[i] + 1'b1;
      end
    end
  end
endmodule
