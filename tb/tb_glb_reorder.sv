// tb_glb_reorder: test of the reorder unit with its default 48-word buffer. In each round the
// testbench issues random reads and writes on four IDs until the unit refuses one, checking
// iss_ok against a model of the reservation rule (reserved + need <= 48, need = len+1 for a
// read, 1 for a write) and the sequence numbers (consecutive per ID). It then returns all
// responses as flits in a random order, with random gaps and random back-pressure from the
// master, and checks that per ID the responses come out in issue order with the right data,
// type and last flags, and that the reservation returns to zero. It also checks that some
// responses were stored and released and some bypassed.
module tb_glb_reorder;
  import glb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [ID_W-1:0] iss_id;
  logic iss_write, iss_ok, iss_fire;
  logic [LEN_W-1:0] iss_len;
  logic [SEQ_W-1:0] iss_seq;
  logic rx_valid, rx_head, rx_tail, rx_pop;
  logic [31:0] rx_data;
  logic rsp_valid, rsp_ready, rsp_last, rsp_write;
  logic [ID_W-1:0] rsp_id;
  logic [31:0] rsp_data;
  logic [5:0] reserved;
  logic stored_ev, released_ev;
  int checks = 0, failures = 0;

  glb_reorder dut (.*);

  typedef struct packed { logic write; logic [3:0] id; logic [5:0] seq; logic [2:0] len; logic [15:0] tag; } txn_t;
  txn_t expect_q [4][$];
  logic [33:0] flits [$];   // head, tail, data
  int seq_model [4];
  int n_stored = 0, n_released = 0, n_bypass = 0, res_model = 0, tagc = 0;
  int rbeat = 0;

  function automatic logic [31:0] dword(input logic [15:0] tag, input int b);
    return {tag, 16'(b * 7 + 1)};
  endfunction

  always @(posedge clk) begin
    if (stored_ev) n_stored++;
    if (released_ev) n_released++;
    rsp_ready <= $urandom_range(3) != 0;
    if (rsp_valid && rsp_ready) begin
      int id;
      id = int'(rsp_id);
      checks++;
      if (expect_q[id].size() == 0) begin
        failures++; $display("FAIL: unexpected response on id %0d", id);
      end else begin
        txn_t e;
        e = expect_q[id][0];
        if (rsp_write != e.write || (!e.write && rsp_data != dword(e.tag, rbeat)) ||
            rsp_last != (e.write || rbeat == int'(e.len))) begin
          failures++;
          $display("FAIL id %0d: data %h last %0b write %0b, want tag %h beat %0d/%0d w %0b",
                   id, rsp_data, rsp_last, rsp_write, e.tag, rbeat, e.len, e.write);
        end
        if (rsp_last) begin void'(expect_q[id].pop_front()); rbeat = 0; end
        else rbeat++;
      end
    end
  end

  // response flit source
  // flits are pushed only by the initial block between clock edges; the head of the queue is
  // driven after each edge
  always @(posedge clk or negedge clk) begin
    if (clk && rx_valid && rx_pop) void'(flits.pop_front());
    if (clk) rx_valid <= flits.size() > 0 && $urandom_range(4) != 0;
    rx_head <= flits.size() > 0 ? flits[0][33] : 1'b0;
    rx_tail <= flits.size() > 0 ? flits[0][32] : 1'b0;
    rx_data <= flits.size() > 0 ? flits[0][31:0] : '0;
  end

  initial begin
    txn_t pending [$];
    iss_id = 0; iss_write = 0; iss_len = 0; iss_fire = 0; rx_valid = 0; rsp_ready = 1;
    for (int i = 0; i < 4; i++) seq_model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      @(negedge clk);
      // issue until refused
      forever begin
        int need;
        iss_id = 4'($urandom_range(3));
        iss_write = $urandom_range(3) == 0;
        iss_len = 3'($urandom_range(7));
        need = iss_write ? 1 : int'(iss_len) + 1;
        #1;
        checks++;
        if (iss_ok != (res_model + need <= 48) || int'(iss_seq) != seq_model[iss_id] % 64) begin
          failures++;
          $display("FAIL: iss_ok %0b seq %0d, model reserved %0d need %0d seq %0d",
                   iss_ok, iss_seq, res_model, need, seq_model[iss_id]);
        end
        if (!iss_ok) break;
        begin
          txn_t t;
          t.write = iss_write; t.id = iss_id; t.seq = iss_seq; t.len = iss_len; t.tag = 16'(tagc++);
          expect_q[iss_id].push_back(t);
          pending.push_back(t);
        end
        iss_fire = 1;
        @(posedge clk);
        res_model += need;
        seq_model[iss_id]++;
        @(negedge clk);
        iss_fire = 0;
      end
      iss_fire = 0;
      pending.shuffle();
      foreach (pending[k]) begin
        hdr_t h;
        h = '0;
        h.mtype = pending[k].write ? MT_WR_RSP : MT_RD_RSP;
        h.id = pending[k].id; h.seq = pending[k].seq; h.len = pending[k].len;
        flits.push_back({1'b1, pending[k].write, 32'(h)});
        if (!pending[k].write)
          for (int b = 0; b <= int'(pending[k].len); b++)
            flits.push_back({1'b0, b == int'(pending[k].len), dword(pending[k].tag, b)});
      end
      pending.delete();
      // wait until everything came out
      for (int c = 0; c < 5000; c++) begin
        int left;
        left = 0;
        for (int i = 0; i < 4; i++) left += expect_q[i].size();
        if (left == 0 && flits.size() == 0) break;
        @(posedge clk);
      end
      repeat (3) @(posedge clk);
      res_model = 0;
      checks++;
      if (reserved != 0) begin failures++; $display("FAIL: %0d words still reserved", reserved); end
    end
    checks++;
    if (n_stored == 0 || n_released != n_stored) begin
      failures++; $display("FAIL: stored %0d released %0d", n_stored, n_released);
    end
    for (int i = 0; i < 4; i++) if (expect_q[i].size() != 0) begin
      failures++; $display("FAIL: id %0d has %0d responses missing", i, expect_q[i].size());
    end
    $display("stored %0d released %0d words", n_stored, n_released);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
