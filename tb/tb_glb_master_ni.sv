// tb_glb_master_ni: test of a master network interface at node (0,0) of the 6 x 5 mesh. The
// testbench plays the processor (random reads and writes on four IDs, write bursts on the
// write-data channel) and the network (it collects request packets with credits, and sends
// the response packets back in a random order). Checks: request packet format (destination
// node from the address map, source, type, ID, consecutive sequence numbers per ID, length,
// CS 0, address flit, write data and tail), and that the processor receives the responses of
// each ID in issue order with the right data, whatever order the network delivered them in.
module tb_glb_master_ni;
  import glb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid, cmd_ready, cmd_write, wdata_valid, wdata_ready, wlast;
  logic [ID_W-1:0] cmd_id, rsp_id;
  logic [31:0] cmd_addr, wdata, rsp_data;
  logic [LEN_W-1:0] cmd_len;
  logic rsp_valid, rsp_ready, rsp_last, rsp_write;
  flit_t tx_flit, rx_flit;
  logic [NUM_VC-1:0] tx_credit, rx_credit;
  logic [5:0] rob_reserved;
  logic rob_stored, rob_released;
  int checks = 0, failures = 0;

  glb_master_ni dut (.*);

  typedef struct packed { logic write; logic [3:0] id; logic [31:0] addr; logic [2:0] len; } cmd_t;
  cmd_t cmds [$];
  cmd_t wq [$];
  cmd_t expect_q [4][$];
  int slave_nodes [$];
  int seqm [4];
  int wb = 0, rb = 0;
  // network side
  hdr_t pend_h [$];
  cmd_t pend_c [$];
  logic [33:0] rspq [$];
  int cred_rx = 5;
  int pk_idx = 0;
  hdr_t pk_h;
  cmd_t pk_c;
  int n_pkts = 0, n_done = 0;

  function automatic logic [31:0] rdat(input logic [31:0] a, input int b);
    return (a + 32'(b) * 4) ^ 32'hFACE_0000;
  endfunction
  function automatic logic [31:0] wdat(input logic [31:0] a, input int b);
    return (a + 32'(b) * 4) ^ 32'h0BAD_0000;
  endfunction

  // processor side: drive the next command and write beat after each clock edge
  task automatic drive_master();
    cmd_valid <= rst_n && cmds.size() > 0;
    {cmd_write, cmd_id, cmd_addr, cmd_len} <= cmds.size() > 0 ? cmds[0] : '0;
    wdata_valid <= wq.size() > 0;
    wdata <= wq.size() > 0 ? wdat(wq[0].addr, wb) : '0;
    wlast <= wq.size() > 0 && wb == int'(wq[0].len);
  endtask

  always @(posedge clk) if (rst_n) begin
    rsp_ready <= $urandom_range(3) != 0;
    if (cmd_valid && cmd_ready) begin
      cmd_t c;
      c = cmds.pop_front();
      expect_q[c.id].push_back(c);
      if (c.write) wq.push_back(c);
    end
    if (wdata_valid && wdata_ready) begin
      if (wlast) begin void'(wq.pop_front()); wb = 0; end else wb++;
    end
    if (rsp_valid && rsp_ready) begin
      cmd_t e;
      checks++;
      if (expect_q[rsp_id].size() == 0) begin
        failures++; $display("FAIL: unexpected response id %0d", rsp_id);
      end else begin
        e = expect_q[rsp_id][0];
        if (rsp_write != e.write || (!e.write && rsp_data != rdat(e.addr, rb)) ||
            rsp_last != (e.write || rb == int'(e.len))) begin
          failures++; $display("FAIL: id %0d beat %0d data %h w %0b l %0b, want addr %h w %0b len %0d at %0t", rsp_id, rb, rsp_data, rsp_write, rsp_last, e.addr, e.write, e.len, $time);
        end
        if (rsp_last) begin void'(expect_q[rsp_id].pop_front()); rb = 0; n_done++; end else rb++;
      end
    end
    drive_master();
  end

  // network side: collect requests
  always @(posedge clk) begin
    tx_credit <= '0;
    if (rst_n && tx_flit.valid) begin
      tx_credit[VC_REQ] <= 1'b1;
      checks++;
      if (tx_flit.head) begin
        int k, n;
        pk_h = hdr_t'(tx_flit.data);
        pk_idx = 0;
        if (tx_flit.vc != 1'(VC_REQ) || pk_h.src_x != 0 || pk_h.src_y != 0 || pk_h.cs != 0 ||
            int'(pk_h.seq) != seqm[pk_h.id] % 64) begin
          failures++; $display("FAIL: bad request header %h", tx_flit.data);
        end
        seqm[pk_h.id]++;
      end else if (pk_idx == 0) begin
        int k, n;
        pk_c.addr = tx_flit.data; pk_c.write = (pk_h.mtype == MT_WR_REQ); pk_c.len = pk_h.len; pk_c.id = pk_h.id;
        k = int'(tx_flit.data >> 24) % 18;
        n = slave_nodes[k];
        if (int'(pk_h.dst_x) != n % 6 || int'(pk_h.dst_y) != n / 6 || tx_flit.tail == pk_c.write) begin
          failures++; $display("FAIL: address %h sent to (%0d,%0d), want node %0d", tx_flit.data, pk_h.dst_x, pk_h.dst_y, n);
        end
        pk_idx = 1;
      end else begin
        if (tx_flit.data != wdat(pk_c.addr, pk_idx - 1) || tx_flit.tail != (pk_idx - 1 == int'(pk_c.len))) begin
          failures++; $display("FAIL: write beat %0d data %h", pk_idx - 1, tx_flit.data);
        end
        pk_idx++;
      end
      if (tx_flit.tail) begin pend_h.push_back(pk_h); pend_c.push_back(pk_c); end
    end
  end

  // network side: return responses in random order
  always @(posedge clk) begin
    flit_t f;
    f = '0;
    if (rst_n) begin
      if (rx_credit[VC_RSP]) cred_rx++;
      if (rspq.size() == 0 && pend_h.size() > 0 && $urandom_range(3) == 0) begin
        int j;
        hdr_t h;
        cmd_t c;
        j = $urandom_range(pend_h.size() - 1);
        h = pend_h[j]; c = pend_c[j];
        pend_h.delete(j); pend_c.delete(j);
        h.dst_x = 0; h.dst_y = 0;
        h.mtype = c.write ? MT_WR_RSP : MT_RD_RSP;
        rspq.push_back({1'b1, c.write, 32'(h)});
        if (!c.write)
          for (int b = 0; b <= int'(c.len); b++) rspq.push_back({1'b0, b == int'(c.len), rdat(c.addr, b)});
      end
      if (rspq.size() > 0 && cred_rx > 0) begin
        logic [33:0] e;
        e = rspq.pop_front();
        f.valid = 1; f.vc = 1'(VC_RSP); f.head = e[33]; f.tail = e[32]; f.data = e[31:0];
        cred_rx--;
      end
    end
    rx_flit <= f;
  end

  initial begin
    for (int n = 0; n < 30; n++) if (!is_master_node(n)) slave_nodes.push_back(n);
    for (int i = 0; i < 4; i++) seqm[i] = 0;
    for (int r = 0; r < 300; r++) begin
      cmd_t c;
      c.write = $urandom_range(2) == 0;
      c.id = 4'($urandom_range(3));
      c.addr = {8'($urandom_range(40)), 14'd0, 8'($urandom), 2'b00};
      c.len = 3'($urandom_range(7));
      cmds.push_back(c);
    end
    rsp_ready = 1; rx_flit = '0; tx_credit = '0;
    cmd_valid = 0; wdata_valid = 0; cmd_write = 0; cmd_id = 0; cmd_addr = 0; cmd_len = 0;
    wdata = 0; wlast = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 40000 && n_done < 300; c++) @(posedge clk);
    checks++;
    if (n_done != 300) begin failures++; $display("FAIL: %0d of 300 transactions completed", n_done); end
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
