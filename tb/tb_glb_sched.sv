// tb_glb_sched: test of the QIT and adaptive request scheduler of a slave interface at node
// (2,2). A directed part reproduces the four-quadrant example: requests A, B, C, D from the
// SW, SE, NW and NE corners with quadrant congestion 4, 2, 3 and 1 must be served in the
// order D, B, C, A. A random part drives table updates, slot fills and takes every cycle and
// compares the table and every selection with an independent model of the rules
// (QIT[q] <- (QIT[q] + CS) / 2 for the source's quadrant(s); pick min QuadCon - W).
module tb_glb_sched;
  import glb_pkg::*;
  localparam int S = 4, CXI = 2, CYI = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic upd_valid, take, sel_valid;
  logic [2:0] upd_src_x, upd_src_y;
  logic [3:0] upd_cs;
  logic [S-1:0] slot_ready, slot_fill;
  logic [2:0] slot_src_x [S], slot_src_y [S];
  logic [1:0] sel_idx;
  logic [3:0] qit [4];
  int checks = 0, failures = 0;
  int mq [4];
  int mw [S];

  glb_sched dut (.*);

  // quadrant weights of a source: returns list of quadrants (SW=0, SE=1, NW=2, NE=3)
  function automatic int qcon(input int sx, input int sy);
    bit w, e, s, n;
    w = sx < CXI; e = sx > CXI; s = sy < CYI; n = sy > CYI;
    if (w && !s && !n) return (mq[0] + mq[2]) / 2;
    if (e && !s && !n) return (mq[1] + mq[3]) / 2;
    if (n && !w && !e) return (mq[2] + mq[3]) / 2;
    if (s && !w && !e) return (mq[0] + mq[1]) / 2;
    if (w && s) return mq[0];
    if (e && s) return mq[1];
    if (w && n) return mq[2];
    if (e && n) return mq[3];
    return 0;
  endfunction

  function automatic void model_update(input int sx, input int sy, input int cs);
    bit in_q [4];
    in_q[0] = sx <= CXI && sy <= CYI;
    in_q[1] = sx >= CXI && sy <= CYI;
    in_q[2] = sx <= CXI && sy >= CYI;
    in_q[3] = sx >= CXI && sy >= CYI;
    if (sx == CXI && sy == CYI) return;
    for (int q = 0; q < 4; q++) if (in_q[q]) mq[q] = (mq[q] + cs) / 2;
  endfunction

  function automatic int model_sel();
    int best, bi, v;
    bi = -1; best = 0;
    for (int i = 0; i < S; i++)
      if (slot_ready[i]) begin
        v = qcon(int'(slot_src_x[i]), int'(slot_src_y[i])) - mw[i];
        if (bi < 0 || v < best) begin bi = i; best = v; end
      end
    return bi;
  endfunction

  task automatic step();
    int want;
    want = model_sel();
    #1;
    checks++;
    if ((want < 0) == sel_valid || (want >= 0 && int'(sel_idx) != want)) begin
      failures++;
      $display("FAIL: sel %0d valid %0b, model %0d", sel_idx, sel_valid, want);
    end
    for (int q = 0; q < 4; q++) if (int'(qit[q]) != mq[q]) begin
      failures++; $display("FAIL: qit[%0d]=%0d model %0d", q, qit[q], mq[q]);
    end
    @(posedge clk);
    if (upd_valid) model_update(int'(upd_src_x), int'(upd_src_y), int'(upd_cs));
    for (int i = 0; i < S; i++)
      if (slot_fill[i]) mw[i] = 0;
      else if (take && slot_ready[i] && i != want && mw[i] < 31) mw[i]++;
    @(negedge clk);
  endtask

  initial begin
    int order [4];
    int names [4];
    upd_valid = 0; take = 0; slot_ready = '0; slot_fill = '0;
    upd_src_x = 0; upd_src_y = 0; upd_cs = 0;
    for (int i = 0; i < S; i++) begin slot_src_x[i] = 0; slot_src_y[i] = 0; mw[i] = 0; end
    for (int q = 0; q < 4; q++) mq[q] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // directed: build QIT = {SW 4, SE 2, NW 3, NE 1} from reset values of 0
    upd_valid = 1;
    upd_src_x = 0; upd_src_y = 0; upd_cs = 8; step();
    upd_src_x = 4; upd_src_y = 0; upd_cs = 4; step();
    upd_src_x = 0; upd_src_y = 4; upd_cs = 6; step();
    upd_src_x = 4; upd_src_y = 4; upd_cs = 2; step();
    upd_valid = 0;
    // A (SW) slot 0, B (SE) slot 1, C (NW) slot 2, D (NE) slot 3
    slot_src_x = '{0, 4, 0, 4};
    slot_src_y = '{0, 0, 4, 4};
    slot_fill = 4'b1111; step();
    slot_fill = '0; slot_ready = 4'b1111;
    for (int k = 0; k < 4; k++) begin
      take = 1;
      #1;
      order[k] = int'(sel_idx);
      step();
      slot_ready[order[k]] = 1'b0;
    end
    take = 0;
    checks++;
    if (order != '{3, 1, 2, 0}) begin
      failures++;
      $display("FAIL: service order %p, expected D B C A = 3 1 2 0", order);
    end
    // random
    for (int c = 0; c < 5000; c++) begin
      upd_valid = $urandom_range(1);
      upd_src_x = 3'($urandom_range(4)); upd_src_y = 3'($urandom_range(4));
      upd_cs = 4'($urandom);
      slot_fill = '0;
      for (int i = 0; i < S; i++)
        if (!slot_ready[i] && $urandom_range(3) == 0) begin
          slot_fill[i] = 1;
          slot_src_x[i] = 3'($urandom_range(4)); slot_src_y[i] = 3'($urandom_range(4));
        end
      take = $urandom_range(1);
      begin
        int t;
        t = model_sel();
        step();
        if (take && t >= 0) slot_ready[t] = 0;
      end
      for (int i = 0; i < S; i++) if (slot_fill[i]) slot_ready[i] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
