// glb_master_ni: master-side (processor-side) network interface.
//
// Forward path: the master's commands (read or write, AXI ID, address, burst length) enter the
// AXI queue. The packetizer takes the oldest command once the reorder unit admits it, stamps
// it with the ID's next sequence number and sends a request packet on VC 0: a header flit
// (destination memory, source node, CS = 0, type, ID, sequence number, length), an address
// flit and, for a write, one flit per write beat taken from the write-data channel. The
// destination memory is (addr >> MEM_SHIFT) mod the number of memories, and memory k sits on
// the k-th node of the mesh that is not a processor node.
// Reverse path: response flits (VC 1) from the router go into the packet queue, whose pops
// return credits, and then through the reorder unit (glb_reorder), which hands the master the
// responses of each ID in issue order on the response channel.
// Master port: cmd_* and wdata_* are valid/ready transfers as in AXI (the write beats of a
// command follow it on wdata_*, wlast marking the last); rsp_* carries read beats and write
// acknowledgements (rsp_write = 1, one beat). The first request flit leaves the NI the cycle
// after the command is at the head of the queue, admitted and a credit is available.
// From the design description: AXI queue, packetizer, packet queue, depacketizer and reorder
// unit, the packet formats and the 8-word queues. This design's own choices: the address map,
// the simplified AXI signalling and CS = 0 at injection.
module glb_master_ni
  import glb_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned MESH_X    = 6,
  parameter int unsigned MESH_Y    = 5,
  parameter int unsigned NUM_MEM   = 18,
  parameter int unsigned MEM_SHIFT = 24,
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned ROB_WORDS = 48,
  parameter int unsigned CREDITS   = 5,
  localparam int unsigned RW = $clog2(ROB_WORDS + 1)
) (
  input  logic clk,
  input  logic rst_n,
  // master (AXI-like) side
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [ID_W-1:0]   cmd_id,
  input  logic [31:0]       cmd_addr,
  input  logic [LEN_W-1:0]  cmd_len,
  input  logic              wdata_valid,
  output logic              wdata_ready,
  input  logic [31:0]       wdata,
  input  logic              wlast,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [ID_W-1:0]   rsp_id,
  output logic [31:0]       rsp_data,
  output logic              rsp_last,
  output logic              rsp_write,
  // router side
  output flit_t             tx_flit,
  input  logic [NUM_VC-1:0] tx_credit,
  input  flit_t             rx_flit,
  output logic [NUM_VC-1:0] rx_credit,
  // status
  output logic [RW-1:0]     rob_reserved,
  output logic              rob_stored,
  output logic              rob_released
);
  localparam int unsigned CMD_W = 1 + ID_W + 32 + LEN_W;
  localparam int unsigned CRW   = $clog2(CREDITS + 1);

  // ---------------------------------------------------------------- AXI queue
  logic [CMD_W-1:0] q_out;
  logic             q_empty, q_full, q_pop;
  glb_fifo #(.WIDTH(CMD_W), .DEPTH(QDEPTH)) u_axiq (
    .clk, .rst_n,
    .push   (cmd_valid && !q_full),
    .wr_data({cmd_write, cmd_id, cmd_addr, cmd_len}),
    .pop    (q_pop),
    .rd_data(q_out),
    .empty  (q_empty),
    .full   (q_full),
    .count  ()
  );
  assign cmd_ready = !q_full;

  logic             c_write;
  logic [ID_W-1:0]  c_id;
  logic [31:0]      c_addr;
  logic [LEN_W-1:0] c_len;
  assign {c_write, c_id, c_addr, c_len} = q_out;

  // destination memory
  logic [COORD_W-1:0] d_x, d_y;
  always_comb begin
    int unsigned k, n;
    k   = int'(c_addr >> MEM_SHIFT) % NUM_MEM;
    n   = slave_node(k, MESH_X * MESH_Y);
    d_x = COORD_W'(n % MESH_X);
    d_y = COORD_W'(n / MESH_X);
  end

  // ---------------------------------------------------------------- reorder unit
  logic             iss_ok, iss_fire;
  logic [SEQ_W-1:0] iss_seq;
  logic [FLIT_W+1:0] pq_out;
  logic             pq_empty, pq_pop;

  glb_reorder #(.ROB_WORDS(ROB_WORDS)) u_rob (
    .clk, .rst_n,
    .iss_id   (c_id),
    .iss_write(c_write),
    .iss_len  (c_len),
    .iss_ok   (iss_ok),
    .iss_seq  (iss_seq),
    .iss_fire (iss_fire),
    .rx_valid (!pq_empty),
    .rx_head  (pq_out[FLIT_W+1]),
    .rx_tail  (pq_out[FLIT_W]),
    .rx_data  (pq_out[FLIT_W-1:0]),
    .rx_pop   (pq_pop),
    .rsp_valid, .rsp_ready, .rsp_id, .rsp_data, .rsp_last, .rsp_write,
    .reserved   (rob_reserved),
    .stored_ev  (rob_stored),
    .released_ev(rob_released)
  );

  // ---------------------------------------------------------------- packetizer
  typedef enum logic [1:0] {P_HDR, P_ADDR, P_DATA} p_state_e;
  p_state_e       pstate;
  logic [CRW-1:0] cred;
  logic           send;
  flit_t          nxt;
  hdr_t           h;

  always_comb begin
    h       = '0;
    h.dst_x = d_x;
    h.dst_y = d_y;
    h.src_x = COORD_W'(X);
    h.src_y = COORD_W'(Y);
    h.cs    = '0;
    h.mtype = c_write ? MT_WR_REQ : MT_RD_REQ;
    h.id    = c_id;
    h.seq   = iss_seq;
    h.len   = c_len;
  end

  always_comb begin
    send        = 1'b0;
    iss_fire    = 1'b0;
    q_pop       = 1'b0;
    wdata_ready = 1'b0;
    nxt         = '0;
    nxt.vc      = 1'(VC_REQ);
    if (cred != '0) begin
      case (pstate)
        P_HDR: if (!q_empty && iss_ok) begin
          send     = 1'b1;
          iss_fire = 1'b1;
          nxt.head = 1'b1;
          nxt.data = FLIT_W'(h);
        end
        P_ADDR: begin
          send     = 1'b1;
          nxt.data = c_addr;
          nxt.tail = !c_write;
          q_pop    = !c_write;
        end
        P_DATA: if (wdata_valid) begin
          send        = 1'b1;
          wdata_ready = 1'b1;
          nxt.data    = wdata;
          nxt.tail    = wlast;
          q_pop       = wlast;
        end
        default: ;
      endcase
    end
    nxt.valid = send;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate  <= P_HDR;
      tx_flit <= '0;
      cred    <= CRW'(CREDITS);
    end else begin
      tx_flit <= nxt;
      cred    <= cred - CRW'(send) + CRW'(tx_credit[VC_REQ]);
      if (send) begin
        case (pstate)
          P_HDR:   pstate <= P_ADDR;
          P_ADDR:  pstate <= c_write ? P_DATA : P_HDR;
          P_DATA:  if (wlast) pstate <= P_HDR;
          default: pstate <= P_HDR;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- packet queue
  glb_fifo #(.WIDTH(FLIT_W + 2), .DEPTH(QDEPTH)) u_pq (
    .clk, .rst_n,
    .push   (rx_flit.valid && rx_flit.vc == 1'(VC_RSP)),
    .wr_data({rx_flit.head, rx_flit.tail, rx_flit.data}),
    .pop    (pq_pop),
    .rd_data(pq_out),
    .empty  (pq_empty),
    .full   (),
    .count  ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_credit <= '0;
    else        rx_credit <= NUM_VC'(pq_pop) << VC_RSP;
  end
endmodule
