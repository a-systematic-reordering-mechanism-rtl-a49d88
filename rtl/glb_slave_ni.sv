// glb_slave_ni: slave-side (memory-side) network interface with the GLB adaptive scheduler.
//
// Request path: request flits arriving from the router's local port (VC 0) go into a small
// receive FIFO, whose pops return credits to the router. A packet assembler copies each
// request (header, address, up to MAX_BURST write words) into a free slot of the packet
// queue; the header's CS also updates the Quadrants Information Table. Complete requests wait
// in the packet queue, and glb_sched picks the one from the least congested quadrant (with
// waiting-time ageing) whenever the memory can take a request. The chosen request goes to the
// memory port as one transfer (address, write flag, length and the whole write burst), and
// its header is pushed into the header FIFO.
// Response path: the adapter pops the oldest header from the header FIFO and turns it into a
// response header (destination = requesting master, source = this node, read or write response
// type, same ID, sequence number and length, CS cleared). A read response is sent as that header
// followed by one flit per read beat returned by the memory, the last one marked tail; a write
// response is the header alone, sent when the memory acknowledges the write. Responses use
// VC 1 and credits from the router's local input.
// Memory port timing: mem_req_* is a valid/ready transfer; the memory answers each request in
// order on mem_rsp_* (valid/ready), len+1 beats for a read, one beat for a write.
// From the design description: the packet queue with scheduler, the header FIFO and the
// adapter/packetizer, the packet formats and the queue size of 8 words for the FIFOs. This
// design's own choices: the number of packet-queue slots, whole-packet slots, a CS of zero in
// responses and the memory port signalling.
module glb_slave_ni
  import glb_pkg::*;
#(
  parameter int unsigned X        = 1,
  parameter int unsigned Y        = 0,
  parameter int unsigned SLOTS    = 4,   // packet-queue slots, one request each
  parameter int unsigned HFIFO    = 8,   // header FIFO entries
  parameter int unsigned RX_DEPTH = 8,   // receive queue, at least the router's VC depth
  parameter int unsigned CREDITS  = 5    // router local input buffer depth
) (
  input  logic clk,
  input  logic rst_n,
  // router side
  input  flit_t              rx_flit,
  output logic [NUM_VC-1:0]  rx_credit,
  output flit_t              tx_flit,
  input  logic [NUM_VC-1:0]  tx_credit,
  // memory side
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_write,
  output logic [31:0]        mem_req_addr,
  output logic [LEN_W-1:0]   mem_req_len,
  output logic [31:0]        mem_req_wdata [MAX_BURST],
  input  logic               mem_rsp_valid,
  output logic               mem_rsp_ready,
  input  logic [31:0]        mem_rsp_data,
  input  logic               mem_rsp_last,
  // observation
  output logic [CS_W-1:0]    qit [4]
);
  localparam int unsigned SW_ = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned CRW = $clog2(CREDITS + 1);

  // ---------------------------------------------------------------- receive queue
  logic [FLIT_W+1:0] rxq_out;
  logic              rxq_empty, rxq_pop;
  glb_fifo #(.WIDTH(FLIT_W + 2), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n,
    .push   (rx_flit.valid && rx_flit.vc == 1'(VC_REQ)),
    .wr_data({rx_flit.head, rx_flit.tail, rx_flit.data}),
    .pop    (rxq_pop),
    .rd_data(rxq_out),
    .empty  (rxq_empty),
    .full   (),
    .count  ()
  );
  logic rx_head;
  logic rx_tail;
  assign rx_head = rxq_out[FLIT_W+1];
  assign rx_tail = rxq_out[FLIT_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_credit <= '0;
    else        rx_credit <= NUM_VC'(rxq_pop) << VC_REQ;
  end

  // ---------------------------------------------------------------- packet queue slots
  logic [SLOTS-1:0]  s_used, s_ready;
  hdr_t              s_hdr   [SLOTS];
  logic [31:0]       s_addr  [SLOTS];
  logic [31:0]       s_wdata [SLOTS][MAX_BURST];
  logic [COORD_W-1:0] s_sx [SLOTS], s_sy [SLOTS];

  // assembler state
  logic          asm_busy;
  logic [SW_-1:0] asm_slot;
  logic [3:0]    asm_word;   // 0: address, 1..: write data
  logic          free_found;
  logic [SW_-1:0] free_slot;

  always_comb begin
    free_found = 1'b0;
    free_slot  = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (!s_used[i]) begin
        free_found = 1'b1;
        free_slot  = SW_'(i);
      end
  end

  hdr_t rx_hdr;
  assign rx_hdr  = hdr_t'(rxq_out[FLIT_W-1:0]);
  assign rxq_pop = !rxq_empty && (asm_busy || (rx_head && free_found));

  logic [SLOTS-1:0] slot_fill;
  always_comb begin
    slot_fill = '0;
    if (rxq_pop && !asm_busy) slot_fill[free_slot] = 1'b1;
  end

  // ---------------------------------------------------------------- scheduler
  logic           sel_valid;
  logic [SW_-1:0] sel_idx;
  logic           hf_full, hf_empty;
  logic           take;

  for (genvar i = 0; i < SLOTS; i++) begin : g_src
    assign s_sx[i] = s_hdr[i].src_x;
    assign s_sy[i] = s_hdr[i].src_y;
  end

  glb_sched #(.SLOTS(SLOTS), .X(X), .Y(Y)) u_sched (
    .clk, .rst_n,
    .upd_valid (rxq_pop && !asm_busy),
    .upd_src_x (rx_hdr.src_x),
    .upd_src_y (rx_hdr.src_y),
    .upd_cs    (rx_hdr.cs),
    .slot_ready(s_ready),
    .slot_fill (slot_fill),
    .slot_src_x(s_sx),
    .slot_src_y(s_sy),
    .take      (take),
    .sel_valid (sel_valid),
    .sel_idx   (sel_idx),
    .qit       (qit)
  );

  assign mem_req_valid = sel_valid && !hf_full;
  assign take          = mem_req_valid && mem_req_ready;
  assign mem_req_write = (s_hdr[sel_idx].mtype == MT_WR_REQ);
  assign mem_req_addr  = s_addr[sel_idx];
  assign mem_req_len   = s_hdr[sel_idx].len;
  assign mem_req_wdata = s_wdata[sel_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_used   <= '0;
      s_ready  <= '0;
      asm_busy <= 1'b0;
      asm_slot <= '0;
      asm_word <= '0;
      for (int i = 0; i < SLOTS; i++) s_hdr[i] <= '0;
    end else begin
      if (rxq_pop) begin
        if (!asm_busy) begin
          // header flit: claim a slot
          s_used[free_slot] <= 1'b1;
          s_hdr[free_slot]  <= rx_hdr;
          asm_slot          <= free_slot;
          asm_word          <= '0;
          asm_busy          <= !rx_tail;
          if (rx_tail) s_ready[free_slot] <= 1'b1;
        end else begin
          if (asm_word == '0) s_addr[asm_slot] <= rxq_out[31:0];
          else                s_wdata[asm_slot][3'(asm_word - 1'b1)] <= rxq_out[31:0];
          asm_word <= asm_word + 1'b1;
          if (rx_tail) begin
            asm_busy          <= 1'b0;
            s_ready[asm_slot] <= 1'b1;
          end
        end
      end
      if (take) begin
        s_used[sel_idx]  <= 1'b0;
        s_ready[sel_idx] <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- header FIFO
  hdr_t hf_out;
  logic hf_pop;
  logic [FLIT_W-1:0] hf_rd;
  glb_fifo #(.WIDTH(FLIT_W), .DEPTH(HFIFO)) u_hfifo (
    .clk, .rst_n,
    .push   (take),
    .wr_data(FLIT_W'(s_hdr[sel_idx])),
    .pop    (hf_pop),
    .rd_data(hf_rd),
    .empty  (hf_empty),
    .full   (hf_full),
    .count  ()
  );
  assign hf_out = hdr_t'(hf_rd);

  // ---------------------------------------------------------------- adapter and packetizer
  typedef enum logic [1:0] {T_IDLE, T_DATA} tx_state_e;
  tx_state_e     tx_state;
  logic [CRW-1:0] cred;
  logic          send;
  flit_t         nxt;
  hdr_t          rsp_hdr;

  always_comb begin
    rsp_hdr       = hf_out;
    rsp_hdr.dst_x = hf_out.src_x;
    rsp_hdr.dst_y = hf_out.src_y;
    rsp_hdr.src_x = COORD_W'(X);
    rsp_hdr.src_y = COORD_W'(Y);
    rsp_hdr.cs    = '0;
    rsp_hdr.mtype = (hf_out.mtype == MT_WR_REQ) ? MT_WR_RSP : MT_RD_RSP;
  end

  always_comb begin
    send          = 1'b0;
    hf_pop        = 1'b0;
    mem_rsp_ready = 1'b0;
    nxt           = '0;
    nxt.vc        = 1'(VC_RSP);
    if (cred != '0) begin
      if (tx_state == T_IDLE) begin
        // start a response once the memory has something for it
        if (!hf_empty && mem_rsp_valid) begin
          send      = 1'b1;
          nxt.head  = 1'b1;
          nxt.data  = FLIT_W'(rsp_hdr);
          if (hf_out.mtype == MT_WR_REQ) begin
            nxt.tail      = 1'b1;
            hf_pop        = 1'b1;
            mem_rsp_ready = 1'b1;  // consume the write acknowledge
          end
        end
      end else if (mem_rsp_valid) begin
        send          = 1'b1;
        nxt.data      = mem_rsp_data;
        nxt.tail      = mem_rsp_last;
        mem_rsp_ready = 1'b1;
        hf_pop        = mem_rsp_last;
      end
    end
    nxt.valid = send;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= T_IDLE;
      tx_flit  <= '0;
      cred     <= CRW'(CREDITS);
    end else begin
      tx_flit <= nxt;
      cred    <= cred - CRW'(send) + CRW'(tx_credit[VC_RSP]);
      if (tx_state == T_IDLE && send && !nxt.tail) tx_state <= T_DATA;
      else if (tx_state == T_DATA && send && nxt.tail) tx_state <= T_IDLE;
    end
  end

  a_rsp_order: assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid && mem_rsp_ready |-> !hf_empty);
endmodule
