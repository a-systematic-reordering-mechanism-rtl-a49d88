// tb_glb_slave_ni: test of a slave network interface at node (2,2) with a behavioural memory.
// The testbench sends request packets into the interface under credit flow control and
// collects the response packets, returning credits. Checks: every response header (routed
// back to the requester, source (2,2), response type, ID, sequence number, length, CS 0),
// read data from the memory, write acknowledgements, and data written then read back. A
// directed part first sets the quadrant table to SW 4, SE 2, NW 3, NE 1 with four requests,
// then holds the memory busy while requests A (SW), B (SE), C (NW), D (NE) arrive, and checks
// they are served in the order D, B, C, A.
module tb_glb_slave_ni;
  import glb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  flit_t rx_flit, tx_flit;
  logic [NUM_VC-1:0] rx_credit, tx_credit;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid, mem_rsp_ready, mem_rsp_last;
  logic [31:0] mem_req_addr, mem_rsp_data;
  logic [LEN_W-1:0] mem_req_len;
  logic [31:0] mem_req_wdata [MAX_BURST];
  logic [CS_W-1:0] qit [4];
  logic model_ready, gate;
  int checks = 0, failures = 0;

  glb_slave_ni #(.X(2), .Y(2)) dut (.*);
  glb_mem_model u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid && gate), .req_ready(model_ready),
    .req_write(mem_req_write), .req_addr(mem_req_addr), .req_len(mem_req_len),
    .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready),
    .rsp_data(mem_rsp_data), .rsp_last(mem_rsp_last)
  );
  assign mem_req_ready = model_ready && gate;

  function automatic logic [31:0] wpat(input logic [31:0] a);
    return a * 3 + 32'h1234;
  endfunction

  typedef struct packed { logic write; logic [31:0] addr; logic [2:0] len; logic [2:0] sx, sy; logic [3:0] id; logic [5:0] seq; } req_t;
  logic [33:0] txq [$];
  req_t outstanding [int];
  int cred = 5;
  int served [$];
  int tagc = 0;
  int rx_idx = 0;
  req_t cur;

  function automatic void send_req(input req_t r, input logic [3:0] cs);
    hdr_t h;
    h = '0;
    h.dst_x = 2; h.dst_y = 2; h.src_x = r.sx; h.src_y = r.sy; h.cs = cs;
    h.mtype = r.write ? MT_WR_REQ : MT_RD_REQ;
    h.id = r.id; h.seq = r.seq; h.len = r.len;
    txq.push_back({1'b1, 1'b0, 32'(h)});
    txq.push_back({1'b0, !r.write, r.addr});
    if (r.write)
      for (int b = 0; b <= int'(r.len); b++)
        txq.push_back({1'b0, b == int'(r.len), wpat(r.addr + 32'(b) * 4)});
    outstanding[{r.id, r.seq}] = r;
  endfunction

  always @(posedge clk) begin
    flit_t f;
    f = '0;
    if (rst_n) begin
      if (rx_credit[VC_REQ]) cred++;
      if (txq.size() > 0 && cred > 0 && $urandom_range(3) != 0) begin
        logic [33:0] e;
        e = txq.pop_front();
        f.valid = 1; f.vc = 1'(VC_REQ); f.head = e[33]; f.tail = e[32]; f.data = e[31:0];
        cred--;
      end
    end
    rx_flit <= f;
  end

  // response collection
  always @(posedge clk) begin
    tx_credit <= '0;
    if (rst_n && tx_flit.valid) begin
      tx_credit[VC_RSP] <= 1'b1;
      checks++;
      if (tx_flit.vc != 1'(VC_RSP)) begin failures++; $display("FAIL: response on VC 0"); end
      if (tx_flit.head) begin
        hdr_t h;
        h = hdr_t'(tx_flit.data);
        if (!outstanding.exists({h.id, h.seq})) begin
          failures++; $display("FAIL: response for unknown request %0d/%0d", h.id, h.seq);
          cur = '0;
        end else begin
          cur = outstanding[{h.id, h.seq}];
          outstanding.delete({h.id, h.seq});
          served.push_back(int'(h.seq));
          if (h.dst_x != cur.sx || h.dst_y != cur.sy || h.src_x != 2 || h.src_y != 2 ||
              h.mtype != (cur.write ? MT_WR_RSP : MT_RD_RSP) || h.len != cur.len || h.cs != 0 ||
              tx_flit.tail != cur.write) begin
            failures++; $display("FAIL: bad response header %h", tx_flit.data);
          end
        end
        rx_idx = 0;
      end else begin
        logic [31:0] want;
        want = (cur.addr[20]) ? wpat(cur.addr + 32'(rx_idx) * 4) : (cur.addr + 32'(rx_idx) * 4) ^ 32'h5A5A_5A5A;
        if (tx_flit.data != want || tx_flit.tail != (rx_idx == int'(cur.len))) begin
          failures++; $display("FAIL: read beat %0d data %h want %h", rx_idx, tx_flit.data, want);
        end
        rx_idx++;
      end
    end
  end

  function automatic req_t mk(input bit w, input int sx, input int sy, input logic [31:0] a, input int len);
    req_t r;
    r.write = w; r.addr = a; r.len = 3'(len); r.sx = 3'(sx); r.sy = 3'(sy);
    {r.id, r.seq} = 10'(tagc++);
    return r;
  endfunction

  task automatic drain();
    for (int c = 0; c < 20000 && (outstanding.size() > 0 || txq.size() > 0); c++) @(posedge clk);
  endtask

  initial begin
    req_t wr;
    int sx [4] = '{0, 4, 0, 4};
    int sy [4] = '{0, 0, 4, 4};
    int csa [4] = '{8, 4, 6, 2};
    int csb [4] = '{4, 2, 3, 1};
    int first;
    wr = '0;
    wr.addr = 32'h0010_0000;
    gate = 1; rx_flit = '0; tx_credit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // set the quadrant table
    for (int q = 0; q < 4; q++) send_req(mk(0, sx[q], sy[q], 32'h100, 0), 4'(csa[q]));
    drain();
    checks++;
    if (qit[Q_SW] != 4 || qit[Q_SE] != 2 || qit[Q_NW] != 3 || qit[Q_NE] != 1) begin
      failures++; $display("FAIL: QIT %0d %0d %0d %0d", qit[0], qit[1], qit[2], qit[3]);
    end
    // A B C D while the memory is held
    served.delete();
    gate = 0;
    first = tagc;
    for (int q = 0; q < 4; q++) send_req(mk(0, sx[q], sy[q], 32'h200, 1), 4'(csb[q]));
    repeat (60) @(posedge clk);
    gate = 1;
    drain();
    checks++;
    if (served.size() != 4 || served[0] != (first + 3) % 64 || served[1] != (first + 1) % 64 ||
        served[2] != (first + 2) % 64 || served[3] != first % 64) begin
      failures++; $display("FAIL: service order %p (first %0d), expected D B C A", served, first);
    end
    // random traffic
    for (int n = 0; n < 80; n++) begin
      int x, y;
      bit w;
      do begin x = $urandom_range(5); y = $urandom_range(4); end while (x == 2 && y == 2);
      w = $urandom_range(1);
      begin
        req_t r;
        r = mk(w, x, y, (w ? 32'h0010_0000 : 32'h0) | (32'($urandom_range(1023)) << 2), $urandom_range(7));
        send_req(r, 4'($urandom));
        if (w) wr = r;
      end
    end
    drain();
    // read back the last write
    send_req(mk(0, 0, 0, wr.addr, wr.len), 0);
    drain();
    checks++;
    if (outstanding.size() != 0) begin failures++; $display("FAIL: %0d requests unanswered", outstanding.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
