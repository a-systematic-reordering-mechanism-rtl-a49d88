// tb_glb_noc: end-to-end test of the GLB network-on-chip at its default size (6 x 5 mesh,
// 12 processors, 18 memories).
//
// Every processor port is driven by a traffic generator that issues N_REQ random commands as
// fast as the interface takes them: random memory, random read or write, bursts of 1..8 beats,
// four AXI IDs. A second phase of N_REQ commands per processor uses localized traffic: 70% of
// the commands go to a memory one hop away from the processor and the rest to any other memory,
// as in the non-uniform workload the method is evaluated with. Reads go to a region no one writes, so their data is the memory model's
// pattern; writes go to a region private to each processor. After the random phase each
// processor reads back its last write. A scoreboard keeps, per processor and ID, the commands
// in issue order and checks every response beat against the head of that list: response type,
// data and last flag. This checks the in-order delivery per ID through the reorder unit. The
// test also counts how often each mechanism of the design fired and fails if one never did:
// out-of-order responses stored and released by the reorder unit, admittance stalls of a full
// reorder buffer, congested input ports, GLB arbitration that overrode index order, adaptive
// Y-first routing around a congested X neighbour, scheduler picks that overrode slot order,
// and non-zero quadrant congestion values in the memories' tables.
module tb_glb_noc;
  import glb_pkg::*;

  localparam int unsigned MX = 6, MY = 5, NN = MX * MY, NM = 12, NS = 18;
  localparam int unsigned N_REQ = 200;
  localparam int unsigned LOCAL_PCT = 70;
  localparam int unsigned WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             m_cmd_valid [NM], m_cmd_ready [NM], m_cmd_write [NM];
  logic [ID_W-1:0]  m_cmd_id    [NM];
  logic [31:0]      m_cmd_addr  [NM];
  logic [LEN_W-1:0] m_cmd_len   [NM];
  logic             m_wdata_valid [NM], m_wdata_ready [NM], m_wlast [NM];
  logic [31:0]      m_wdata [NM];
  logic             m_rsp_valid [NM], m_rsp_ready [NM], m_rsp_last [NM], m_rsp_write [NM];
  logic [ID_W-1:0]  m_rsp_id [NM];
  logic [31:0]      m_rsp_data [NM];
  logic [5:0]       m_rob_reserved [NM];
  logic             m_rob_stored [NM], m_rob_released [NM];
  logic             s_req_valid [NS], s_req_ready [NS], s_req_write [NS];
  logic [31:0]      s_req_addr [NS];
  logic [LEN_W-1:0] s_req_len [NS];
  logic [31:0]      s_req_wdata [NS][MAX_BURST];
  logic             s_rsp_valid [NS], s_rsp_ready [NS], s_rsp_last [NS];
  logic [31:0]      s_rsp_data [NS];
  logic [CS_W-1:0]  s_qit [NS][4];

  glb_noc dut (.*);

  for (genvar k = 0; k < NS; k++) begin : g_mem
    glb_mem_model u_mem (
      .clk, .rst_n,
      .req_valid(s_req_valid[k]), .req_ready(s_req_ready[k]), .req_write(s_req_write[k]),
      .req_addr(s_req_addr[k]), .req_len(s_req_len[k]), .req_wdata(s_req_wdata[k]),
      .rsp_valid(s_rsp_valid[k]), .rsp_ready(s_rsp_ready[k]),
      .rsp_data(s_rsp_data[k]), .rsp_last(s_rsp_last[k])
    );
  end

  int checks = 0, failures = 0;

  function automatic logic [31:0] rd_pattern(input logic [31:0] a);
    return a ^ 32'h5A5A_5A5A;
  endfunction
  function automatic logic [31:0] wr_pattern(input logic [31:0] a);
    return (a * 32'd2654435761) ^ 32'hC3C3_0000;
  endfunction

  // per processor: commands still to issue, write beats still to send, expected responses
  typedef struct packed {
    logic        write;
    logic [3:0]  id;
    logic [31:0] addr;
    logic [2:0]  len;
  } cmd_t;

  cmd_t        to_issue [NM][$];
  cmd_t        wr_pend  [NM][$];
  cmd_t        expect_q [NM][16][$];
  int unsigned wbeat    [NM];
  int unsigned rbeat    [NM];
  int unsigned done_cnt [NM];
  int unsigned issued   [NM];
  logic [31:0] last_wr  [NM];
  logic [2:0]  last_len [NM];

  // coordinates of the node of master m and of memory k
  function automatic int unsigned master_node(input int unsigned m);
    master_node = 0;
    for (int unsigned n = 0; n < NN; n++)
      if (is_master_node(n) && kind_index(n) == m) master_node = n;
  endfunction
  function automatic int unsigned hops(input int unsigned a, input int unsigned b);
    int ax, ay, bx, by;
    ax = int'(a % MX); ay = int'(a / MX); bx = int'(b % MX); by = int'(b / MX);
    return int'(((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay));
  endfunction

  // memory for the next command of master m: uniform over all memories, or, in the localized
  // phase, with probability LOCAL_PCT one of the memories one hop away and otherwise one of
  // the others
  function automatic int unsigned pick_mem(input int unsigned m, input logic localized);
    int unsigned near [$], far [$], mn;
    mn = master_node(m);
    for (int unsigned k = 0; k < NS; k++)
      if (hops(mn, slave_node(k, NN)) == 1) near.push_back(k); else far.push_back(k);
    if (!localized) return $urandom_range(NS - 1);
    if ($urandom_range(99) < LOCAL_PCT) return near[$urandom_range(near.size() - 1)];
    return far[$urandom_range(far.size() - 1)];
  endfunction

  int unsigned n_local_cmd = 0, n_local_near = 0;

  function automatic cmd_t rand_cmd(input int unsigned m, input logic localized);
    cmd_t c;
    int unsigned k;
    k       = pick_mem(m, localized);
    if (localized) begin
      n_local_cmd++;
      if (hops(master_node(m), slave_node(k, NN)) == 1) n_local_near++;
    end
    c.write = $urandom_range(2) == 0;
    c.id    = 4'($urandom_range(3));
    c.len   = 3'($urandom_range(7));
    c.addr  = (32'(k) << 24) | (c.write ? 32'h0010_0000 : 32'h0) | (32'(m) << 12) |
              (32'($urandom_range(255)) << 2);
    return c;
  endfunction

  // command and write-data drivers, updated after every clock edge
  task automatic drive_masters();
    for (int m = 0; m < NM; m++) begin
      m_cmd_valid[m] <= to_issue[m].size() > 0;
      if (to_issue[m].size() > 0) begin
        m_cmd_write[m] <= to_issue[m][0].write;
        m_cmd_id[m] <= to_issue[m][0].id;
        m_cmd_addr[m] <= to_issue[m][0].addr;
        m_cmd_len[m] <= to_issue[m][0].len;
      end else begin
        m_cmd_write[m] <= 1'b0;
        m_cmd_id[m] <= '0;
        m_cmd_addr[m] <= '0;
        m_cmd_len[m] <= '0;
      end
      m_wdata_valid[m] <= wr_pend[m].size() > 0;
      if (wr_pend[m].size() > 0) begin
        m_wdata[m] <= wr_pattern(wr_pend[m][0].addr + 32'(wbeat[m]) * 4);
        m_wlast[m] <= (wbeat[m] == int'(wr_pend[m][0].len));
      end else begin
        m_wdata[m] <= '0;
        m_wlast[m] <= 1'b0;
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int m = 0; m < NM; m++) begin
        m_rsp_ready[m] <= ($urandom_range(7) != 0);
        if (m_cmd_valid[m] && m_cmd_ready[m]) begin
          cmd_t c;
          c = to_issue[m].pop_front();
          expect_q[m][c.id].push_back(c);
          if (c.write) begin
            wr_pend[m].push_back(c);
            last_wr[m]  = c.addr;
            last_len[m] = c.len;
          end
          issued[m]++;
        end
        if (m_wdata_valid[m] && m_wdata_ready[m]) begin
          if (m_wlast[m]) begin
            void'(wr_pend[m].pop_front());
            wbeat[m] = 0;
          end else begin
            wbeat[m]++;
          end
        end
        // scoreboard
        if (m_rsp_valid[m] && m_rsp_ready[m]) begin
          int unsigned id;
          id = int'(m_rsp_id[m]);
          checks++;
          if (expect_q[m][id].size() == 0) begin
            failures++;
            $display("FAIL m%0d: unexpected response id %0d", m, id);
          end else begin
            cmd_t e;
            logic [31:0] want;
            e = expect_q[m][id][0];
            want = (e.addr & 32'h0010_0000) != 0 ? wr_pattern(e.addr + 32'(rbeat[m]) * 4)
                                                 : rd_pattern(e.addr + 32'(rbeat[m]) * 4);
            if (m_rsp_write[m] != e.write ||
                (!e.write && m_rsp_data[m] != want) ||
                m_rsp_last[m] != (e.write || rbeat[m] == int'(e.len))) begin
              failures++;
              $display("FAIL m%0d id%0d: got w=%0b d=%h l=%0b, want w=%0b d=%h beat %0d/%0d",
                       m, id, m_rsp_write[m], m_rsp_data[m], m_rsp_last[m], e.write, want,
                       rbeat[m], e.len);
            end
            if (m_rsp_last[m]) begin
              void'(expect_q[m][id].pop_front());
              rbeat[m] = 0;
              done_cnt[m]++;
            end else begin
              rbeat[m]++;
            end
          end
        end
      end
      drive_masters();
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int unsigned n_store, n_release, n_admit_stall, n_cong, n_prio, n_detour, n_sched, n_qit;
  int unsigned r_cong [NN], r_prio [NN], r_detour [NN], r_sched [NN], r_stall [NN];

  for (genvar n = 0; n < NN; n++) begin : g_probe
    always @(posedge clk) if (rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (dut.g_node[n].u_router.cong_out[p]) r_cong[n]++;
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        logic [4:0] rq, gt, low;
        rq  = dut.g_node[n].u_router.s2_req[o];
        gt  = dut.g_node[n].u_router.s2_gnt[o];
        low = rq & (~rq + 5'd1);
        if (gt != 0 && gt != low) r_prio[n]++;
      end
    end
    // a head that could go either way took the Y direction: the X neighbour was congested
    for (genvar i = 0; i < 2 * NUM_PORTS; i++) begin : g_det
      always @(posedge clk) if (rst_n) begin
        if (dut.g_node[n].u_router.buf_pop[i] &&
            dut.g_node[n].u_router.f_head[i] && !dut.g_node[n].u_router.active[i] &&
            (dut.g_node[n].u_router.want[i] == P_NORTH || dut.g_node[n].u_router.want[i] == P_SOUTH) &&
            (dut.g_node[n].u_router.g_rc[i].adm[P_EAST] || dut.g_node[n].u_router.g_rc[i].adm[P_WEST]))
          r_detour[n]++;
      end
    end
    if (is_master_node(n)) begin : g_pm
      always @(posedge clk) if (rst_n) begin
        if (!dut.g_node[n].g_m.u_mni.q_empty && !dut.g_node[n].g_m.u_mni.iss_ok) r_stall[n]++;
      end
    end else begin : g_ps
      always @(posedge clk) if (rst_n) begin
        logic [3:0] rdy;
        int lowest;
        rdy = dut.g_node[n].g_sl.u_sni.s_ready;
        lowest = -1;
        for (int i = 3; i >= 0; i--) if (rdy[i]) lowest = i;
        if (dut.g_node[n].g_sl.u_sni.take && lowest >= 0 &&
            int'(dut.g_node[n].g_sl.u_sni.sel_idx) != lowest)
          r_sched[n]++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NM; m++) begin
      if (m_rob_stored[m])   n_store++;
      if (m_rob_released[m]) n_release++;
    end
    for (int k = 0; k < NS; k++)
      for (int q = 0; q < 4; q++)
        if (s_qit[k][q] != 0) n_qit++;
  end

  task automatic mech(input string name, input int unsigned cnt);
    checks++;
    $display("  %-32s %0d", name, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never happened", name);
    end
  endtask

  function automatic int unsigned all_done();
    int unsigned d;
    d = 0;
    for (int m = 0; m < NM; m++) d += done_cnt[m];
    return d;
  endfunction

  initial begin
    int unsigned cyc;
    for (int m = 0; m < NM; m++) begin
      wbeat[m] = 0; rbeat[m] = 0; done_cnt[m] = 0; issued[m] = 0;
      m_rsp_ready[m] = 1'b1;
      m_cmd_valid[m] = 1'b0; m_cmd_write[m] = 1'b0; m_cmd_id[m] = '0; m_cmd_addr[m] = '0;
      m_cmd_len[m] = '0; m_wdata_valid[m] = 1'b0; m_wdata[m] = '0; m_wlast[m] = 1'b0;
      last_wr[m] = 32'h0010_0000; last_len[m] = 0;
      for (int r = 0; r < N_REQ; r++) to_issue[m].push_back(rand_cmd(m, 1'b0));
    end
    for (int n = 0; n < NN; n++) begin
      r_cong[n] = 0; r_prio[n] = 0; r_detour[n] = 0; r_sched[n] = 0; r_stall[n] = 0;
    end
    n_store = 0; n_release = 0; n_qit = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    cyc = 0;
    while (all_done() < NM * N_REQ && cyc < WATCHDOG / 2) begin
      @(posedge clk);
      cyc++;
    end
    $display("uniform phase: %0d transactions in %0d cycles", all_done(), cyc);
    // localized phase
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < N_REQ; r++) to_issue[m].push_back(rand_cmd(m, 1'b1));
    while (all_done() < NM * 2 * N_REQ && cyc < WATCHDOG / 2) begin
      @(posedge clk);
      cyc++;
    end
    $display("localized phase: %0d of %0d commands one hop away, total %0d cycles",
             n_local_near, n_local_cmd, cyc);
    checks++;
    if (n_local_near * 100 < n_local_cmd * (LOCAL_PCT - 10) ||
        n_local_near * 100 > n_local_cmd * (LOCAL_PCT + 10)) begin
      failures++;
      $display("FAIL: localized share %0d of %0d", n_local_near, n_local_cmd);
    end
    // read back the last write of every processor
    for (int m = 0; m < NM; m++) begin
      cmd_t c;
      c.write = 1'b0; c.id = 4'd5; c.addr = last_wr[m]; c.len = last_len[m];
      to_issue[m].push_back(c);
    end
    while (all_done() < NM * (2 * N_REQ + 1) && cyc < WATCHDOG) begin
      @(posedge clk);
      cyc++;
    end
    checks++;
    if (all_done() != NM * (2 * N_REQ + 1)) begin
      failures++;
      $display("FAIL: only %0d of %0d transactions completed", all_done(), NM * (2 * N_REQ + 1));
    end
    for (int n = 0; n < NN; n++) begin
      n_cong += r_cong[n]; n_prio += r_prio[n]; n_detour += r_detour[n];
      n_sched += r_sched[n]; n_admit_stall += r_stall[n];
    end
    $display("mechanisms:");
    mech("reorder buffer store", n_store);
    mech("reorder buffer release", n_release);
    mech("admittance stall", n_admit_stall);
    mech("congested input port (cycles)", n_cong);
    mech("GLB arbitration override", n_prio);
    mech("adaptive Y-first detour", n_detour);
    mech("scheduler override", n_sched);
    mech("non-zero QIT entry (cycles)", n_qit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
