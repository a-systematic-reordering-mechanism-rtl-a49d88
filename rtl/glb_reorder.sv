// glb_reorder: reorder unit of the master network interface.
//
// Forward side: every transaction gets the next sequence number of its AXI ID. A transaction
// is admitted only if the reorder buffer can hold all of its response: a read needs len+1
// words, a write response one word. The unit keeps a count of reserved words and admits a new
// transaction while reserved + need <= ROB_WORDS (iss_ok); iss_fire then takes the sequence
// number and the reservation. Each response word handed to the master releases one word.
// Reverse side: response packets come in from the packet queue. A response whose sequence
// number is the one expected next for its ID bypasses the buffer and streams straight to the
// master. Any other response is stored word by word in free buffer entries, each tagged with
// ID, sequence number and beat index. Before taking a new packet, the unit looks for a stored
// response whose ID now expects it and releases it word by word, in beat order. Responses
// with one ID therefore reach the master in issue order; different IDs may overtake each
// other. Because the whole response was reserved at issue, a free entry always exists.
// Timing: one response word per cycle to the master (rsp_valid/rsp_ready); a new packet or a
// release starts one cycle after the previous one ended.
// From the design description: sequence numbers per ID, admittance against a 48-word reorder
// buffer, reservation of as much buffer as each request needs, and the bypass-or-store
// decision with later release. This design's own choices: the tagged, fully associative buffer
// entries, a one-word reservation for write responses and the release-first priority.
module glb_reorder
  import glb_pkg::*;
#(
  parameter int unsigned ROB_WORDS = 48,
  localparam int unsigned NID = 1 << ID_W,
  localparam int unsigned RW  = $clog2(ROB_WORDS + 1),
  localparam int unsigned EW  = $clog2(ROB_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // forward path: admittance and sequence numbering
  input  logic [ID_W-1:0]  iss_id,
  input  logic             iss_write,
  input  logic [LEN_W-1:0] iss_len,
  output logic             iss_ok,
  output logic [SEQ_W-1:0] iss_seq,
  input  logic             iss_fire,
  // reverse path: response flits from the packet queue
  input  logic             rx_valid,
  input  logic             rx_head,
  input  logic             rx_tail,
  input  logic [31:0]      rx_data,
  output logic             rx_pop,
  // responses to the master
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output logic [ID_W-1:0]  rsp_id,
  output logic [31:0]      rsp_data,
  output logic             rsp_last,
  output logic             rsp_write,
  // status
  output logic [RW-1:0]    reserved,
  output logic             stored_ev,     // a word went into the buffer this cycle
  output logic             released_ev    // a word left the buffer this cycle
);
  // ---------------------------------------------------------------- sequence numbers
  logic [SEQ_W-1:0] next_seq [NID];
  logic [SEQ_W-1:0] exp_seq  [NID];

  logic [RW:0] need;
  assign need    = iss_write ? (RW+1)'(1) : (RW+1)'(iss_len) + 1'b1;
  assign iss_ok  = ((RW+1)'(reserved) + need) <= (RW+1)'(ROB_WORDS);
  assign iss_seq = next_seq[iss_id];

  // ---------------------------------------------------------------- buffer entries
  logic [ROB_WORDS-1:0] e_valid;
  logic [ID_W-1:0]      e_id    [ROB_WORDS];
  logic [SEQ_W-1:0]     e_seq   [ROB_WORDS];
  logic [LEN_W-1:0]     e_beat  [ROB_WORDS];
  logic                 e_last  [ROB_WORDS];
  logic                 e_write [ROB_WORDS];
  logic [31:0]          e_data  [ROB_WORDS];

  typedef enum logic [1:0] {R_IDLE, R_BYPASS, R_STORE, R_RELEASE} r_state_e;
  r_state_e         state;
  hdr_t             hdr;
  logic [ID_W-1:0]  cur_id;
  logic [SEQ_W-1:0] cur_seq;
  logic [LEN_W-1:0] cur_beat;

  assign hdr = hdr_t'(rx_data);

  // free entry
  logic          free_found;
  logic [EW-1:0] free_idx;
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = ROB_WORDS - 1; i >= 0; i--)
      if (!e_valid[i]) begin
        free_found = 1'b1;
        free_idx   = EW'(i);
      end
  end

  // first word of a stored response that is now due
  logic          due_found;
  logic [EW-1:0] due_idx;
  always_comb begin
    due_found = 1'b0;
    due_idx   = '0;
    for (int i = ROB_WORDS - 1; i >= 0; i--)
      if (e_valid[i] && e_beat[i] == '0 && e_seq[i] == exp_seq[e_id[i]]) begin
        due_found = 1'b1;
        due_idx   = EW'(i);
      end
  end

  // next word of the response being released
  logic          rel_found;
  logic [EW-1:0] rel_idx;
  always_comb begin
    rel_found = 1'b0;
    rel_idx   = '0;
    for (int i = ROB_WORDS - 1; i >= 0; i--)
      if (e_valid[i] && e_id[i] == cur_id && e_seq[i] == cur_seq && e_beat[i] == cur_beat) begin
        rel_found = 1'b1;
        rel_idx   = EW'(i);
      end
  end

  logic in_order;
  assign in_order = (hdr.seq == exp_seq[hdr.id]);

  always_comb begin
    rx_pop    = 1'b0;
    rsp_valid = 1'b0;
    rsp_id    = cur_id;
    rsp_data  = rx_data;
    rsp_last  = rx_tail;
    rsp_write = 1'b0;
    case (state)
      R_IDLE: begin
        if (!due_found && rx_valid && rx_head) begin
          if (hdr.mtype == MT_WR_RSP && in_order) begin
            // an in-order write response goes straight out
            rsp_valid = 1'b1;
            rsp_id    = hdr.id;
            rsp_data  = '0;
            rsp_last  = 1'b1;
            rsp_write = 1'b1;
            rx_pop    = rsp_ready;
          end else begin
            rx_pop = 1'b1;
          end
        end
      end
      R_BYPASS: begin
        rsp_valid = rx_valid;
        rx_pop    = rx_valid && rsp_ready;
      end
      R_STORE: begin
        rx_pop = rx_valid;
      end
      R_RELEASE: begin
        rsp_valid = rel_found;
        rsp_data  = e_data[rel_idx];
        rsp_last  = e_last[rel_idx];
        rsp_write = e_write[rel_idx];
      end
      default: ;
    endcase
  end

  logic deliver;
  assign deliver     = rsp_valid && rsp_ready;
  assign stored_ev   = (state == R_STORE && rx_pop) ||
                       (state == R_IDLE && rx_pop && hdr.mtype == MT_WR_RSP && !in_order);
  assign released_ev = (state == R_RELEASE) && deliver;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_IDLE;
      reserved  <= '0;
      e_valid   <= '0;
      cur_id    <= '0;
      cur_seq   <= '0;
      cur_beat  <= '0;
      for (int i = 0; i < NID; i++) begin
        next_seq[i] <= '0;
        exp_seq[i]  <= '0;
      end
    end else begin
      reserved <= RW'((RW+1)'(reserved) + (iss_fire ? need : '0) - (RW+1)'(deliver));
      if (iss_fire) next_seq[iss_id] <= next_seq[iss_id] + 1'b1;

      case (state)
        R_IDLE: begin
          if (due_found) begin
            state    <= R_RELEASE;
            cur_id   <= e_id[due_idx];
            cur_seq  <= e_seq[due_idx];
            cur_beat <= '0;
          end else if (rx_pop) begin
            cur_id    <= hdr.id;
            cur_seq   <= hdr.seq;
            cur_beat  <= '0;
            if (hdr.mtype == MT_WR_RSP) begin
              if (in_order) begin
                exp_seq[hdr.id] <= exp_seq[hdr.id] + 1'b1;
              end else begin
                e_valid[free_idx] <= 1'b1;
                e_id[free_idx]    <= hdr.id;
                e_seq[free_idx]   <= hdr.seq;
                e_beat[free_idx]  <= '0;
                e_last[free_idx]  <= 1'b1;
                e_write[free_idx] <= 1'b1;
                e_data[free_idx]  <= '0;
              end
            end else begin
              state <= in_order ? R_BYPASS : R_STORE;
            end
          end
        end
        R_BYPASS: begin
          if (rx_pop && rx_tail) begin
            exp_seq[cur_id] <= exp_seq[cur_id] + 1'b1;
            state           <= R_IDLE;
          end
        end
        R_STORE: begin
          if (rx_pop) begin
            e_valid[free_idx] <= 1'b1;
            e_id[free_idx]    <= cur_id;
            e_seq[free_idx]   <= cur_seq;
            e_beat[free_idx]  <= cur_beat;
            e_last[free_idx]  <= rx_tail;
            e_write[free_idx] <= 1'b0;
            e_data[free_idx]  <= rx_data;
            cur_beat          <= cur_beat + 1'b1;
            if (rx_tail) state <= R_IDLE;
          end
        end
        R_RELEASE: begin
          if (deliver) begin
            e_valid[rel_idx] <= 1'b0;
            cur_beat         <= cur_beat + 1'b1;
            if (e_last[rel_idx]) begin
              exp_seq[cur_id] <= exp_seq[cur_id] + 1'b1;
              state           <= R_IDLE;
            end
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  a_store_space: assert property (@(posedge clk) disable iff (!rst_n) stored_ev |-> free_found);
  a_no_overrun:  assert property (@(posedge clk) disable iff (!rst_n) reserved <= RW'(ROB_WORDS));
endmodule
