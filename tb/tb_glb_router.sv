// tb_glb_router: test of one router at node (2,2) of a 6 x 5 mesh. The testbench plays all
// five neighbours: it injects packets under credit flow control and returns a credit for
// every flit it receives. Directed checks: a single-flit packet leaves two cycles after it
// enters; a header leaving with all neighbours congested carries CS = (CS_in + 4'b0011) / 2;
// when two packets with different CS contend for one output, the one with the larger CS goes
// first, in both orders. Random part: 600 packets of 1..5 flits from all inputs with
// destinations a minimal route can reach from there; checks that each packet leaves on a
// port that brings it closer (or Local at its destination), on its own VC, with its flits in
// order and not interleaved with another packet on that output VC, and that all arrive.
module tb_glb_router;
  import glb_pkg::*;
  localparam int CXI = 2, CYI = 2, MX = 6, MY = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  flit_t in_flit [NUM_PORTS], out_flit [NUM_PORTS];
  logic [NUM_VC-1:0] credit_out [NUM_PORTS], credit_in [NUM_PORTS];
  logic cong_out [NUM_PORTS], cong_in [NUM_PORTS];
  int checks = 0, failures = 0;

  glb_router #(.X(CXI), .Y(CYI)) dut (.*);

  // packets: tag in body flits; header carries destination
  typedef struct { int tag; int len; int vc; hdr_t h; int sent; } pkt_t;
  pkt_t txq [NUM_PORTS][NUM_VC][$];
  int cred [NUM_PORTS][NUM_VC];
  int rx_cur [NUM_PORTS][NUM_VC];   // tag of packet in progress per output VC, -1 none
  int rx_idx [NUM_PORTS][NUM_VC];
  int rx_dst [NUM_PORTS][NUM_VC];
  int rx_len [NUM_PORTS][NUM_VC];
  int delivered = 0;
  int first_tag = -1;
  logic [3:0] last_cs;
  int last_out_cycle, cycle, inj_cycle;
  logic rr_vc [NUM_PORTS];

  // injection: one flit per port per cycle, alternating VCs
  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int p = 0; p < NUM_PORTS; p++) begin
      flit_t f;
      int v;
      f = '0;
      for (int vv = 0; vv < NUM_VC; vv++) if (rst_n && credit_out[p][vv]) cred[p][vv]++;
      v = int'(rr_vc[p]);
      if (!(txq[p][v].size() > 0 && cred[p][v] > 0)) v = 1 - v;
      if (rst_n && txq[p][v].size() > 0 && cred[p][v] > 0) begin
        pkt_t k;
        k = txq[p][v][0];
        f.valid = 1; f.vc = 1'(v);
        f.head = (k.sent == 0);
        if (f.head) inj_cycle = cycle;
        f.tail = (k.sent == k.len - 1);
        f.data = (k.sent == 0) ? 32'(k.h) : 32'(k.tag * 16 + k.sent);
        cred[p][v]--;
        txq[p][v][0].sent++;
        if (f.tail) void'(txq[p][v].pop_front());
        rr_vc[p] <= !rr_vc[p];
      end
      in_flit[p] <= f;
    end
  end

  // reception
  always @(posedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      credit_in[o] <= '0;
      if (rst_n && out_flit[o].valid) begin
        int v;
        v = int'(out_flit[o].vc);
        credit_in[o][v] <= 1'b1;
        last_out_cycle = cycle;
        if (out_flit[o].head) begin
          hdr_t h;
          int dx, dy, ok;
          h = hdr_t'(out_flit[o].data);
          last_cs = h.cs;
          dx = int'(h.dst_x); dy = int'(h.dst_y);
          checks++;
          case (o)
            P_LOCAL: ok = (dx == CXI && dy == CYI);
            P_EAST:  ok = dx > CXI;
            P_WEST:  ok = dx < CXI;
            P_NORTH: ok = dy > CYI;
            default: ok = dy < CYI;
          endcase
          if (!ok || rx_cur[o][v] >= 0) begin
            failures++;
            $display("FAIL: head to (%0d,%0d) left on port %0d (busy %0d)", dx, dy, o, rx_cur[o][v]);
          end
          rx_cur[o][v] = int'(h.rsvd ? 0 : 0) + int'({h.id, h.seq});
          if (first_tag < 0) first_tag = rx_cur[o][v];
          rx_idx[o][v] = 1;
          rx_len[o][v] = int'(h.len) + 1;
        end else begin
          checks++;
          if (rx_cur[o][v] < 0 || out_flit[o].data != 32'(rx_cur[o][v] * 16 + rx_idx[o][v])) begin
            failures++;
            $display("FAIL: port %0d vc %0d body %h, expected tag %0d flit %0d", o, v,
                     out_flit[o].data, rx_cur[o][v], rx_idx[o][v]);
          end
          rx_idx[o][v]++;
        end
        if (out_flit[o].tail) begin
          checks++;
          if (rx_idx[o][v] != rx_len[o][v]) begin
            failures++; $display("FAIL: packet %0d had %0d flits, want %0d", rx_cur[o][v], rx_idx[o][v], rx_len[o][v]);
          end
          rx_cur[o][v] = -1;
          delivered++;
        end
      end
    end
  end

  int tagc = 1;
  function automatic void add_pkt(input int p, input int v, input int dx, input int dy,
                                  input int sx, input int len, input int cs);
    pkt_t k;
    k.h = '0;
    k.h.dst_x = 3'(dx); k.h.dst_y = 3'(dy); k.h.src_x = 3'(sx); k.h.src_y = 0;
    k.h.cs = 4'(cs);
    {k.h.id, k.h.seq} = 10'(tagc);
    k.h.len = 3'(len - 1);
    k.tag = tagc; k.len = len; k.vc = v; k.sent = 0;
    tagc++;
    txq[p][v].push_back(k);
  endfunction

  task automatic wait_idle();
    int left;
    for (int c = 0; c < 3000; c++) begin
      left = 0;
      for (int p = 0; p < NUM_PORTS; p++) for (int v = 0; v < NUM_VC; v++) left += txq[p][v].size();
      if (left == 0 && delivered == tagc - 1) break;
      @(posedge clk);
    end
  endtask

  initial begin
    int total;
    for (int p = 0; p < NUM_PORTS; p++) begin
      cong_in[p] = 0; in_flit[p] = '0; credit_in[p] = '0; rr_vc[p] = 0;
      for (int v = 0; v < NUM_VC; v++) begin cred[p][v] = 5; rx_cur[p][v] = -1; rx_idx[p][v] = 0; rx_len[p][v] = 0; end
    end
    cycle = 0; last_out_cycle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // latency: single-flit packet from West to East
    // (in_flit is valid from the edge after inj_cycle; out_flit is sampled one edge after it
    // becomes valid, so the router's own latency is the difference minus one)
    @(negedge clk);
    add_pkt(P_WEST, 0, 4, 2, 0, 1, 0);
    wait_idle();
    checks++;
    if (last_out_cycle - inj_cycle - 1 != 2) begin
      failures++; $display("FAIL: latency %0d cycles, expected 2", last_out_cycle - inj_cycle - 1);
    end
    // CS update with all neighbours congested
    for (int p = 1; p < NUM_PORTS; p++) cong_in[p] = 1;
    @(negedge clk);
    add_pkt(P_LOCAL, 0, 2, 4, 2, 1, 9);
    wait_idle();
    checks++;
    if (last_cs != 4'((9 + 3) / 2)) begin failures++; $display("FAIL: CS %0d, expected 6", last_cs); end
    for (int p = 1; p < NUM_PORTS; p++) cong_in[p] = 0;
    // arbitration: South (CS 12) against West (CS 2), both to East
    for (int r = 0; r < 2; r++) begin
      int tw, ts;
      first_tag = -1;
      @(negedge clk);
      tw = tagc; add_pkt(P_WEST, 0, 5, 2, 0, 2, r == 0 ? 2 : 12);
      ts = tagc; add_pkt(P_SOUTH, 0, 5, 2, 2, 2, r == 0 ? 12 : 2);
      wait_idle();
      checks++;
      if (first_tag != (r == 0 ? ts : tw)) begin
        failures++; $display("FAIL: round %0d first packet %0d, expected the high-CS one", r, first_tag);
      end
    end
    // random traffic
    for (int n = 0; n < 600; n++) begin
      int p, v, dx, dy;
      p = $urandom_range(4); v = $urandom_range(1);
      dx = $urandom_range(MX - 1); dy = $urandom_range(MY - 1);
      case (p)
        P_EAST:  if (dx > CXI) dx = CXI;
        P_WEST:  if (dx < CXI) dx = CXI;
        P_NORTH: if (dy > CYI) dy = CYI;
        P_SOUTH: if (dy < CYI) dy = CYI;
        default: ;
      endcase
      add_pkt(p, v, dx, dy, (p == P_WEST) ? 0 : CXI, $urandom_range(1, 5), $urandom_range(15));
    end
    total = 600 + 6;
    wait_idle();
    checks++;
    if (delivered != total) begin failures++; $display("FAIL: %0d of %0d packets delivered", delivered, total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
