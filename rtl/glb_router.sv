// glb_router: five-port wormhole router of the GLB network-on-chip.
//
// Ports are Local, East, West, North and South; each input port has NUM_VC virtual channels
// (VC 0 carries requests, VC 1 responses), each with a DEPTH-flit input buffer. Flow control
// is credit based per VC. Every cycle:
//   * the odd-even routing function with congestion-flag output selection (glb_route) picks an
//     output port for each buffered head flit; body flits follow the port locked by their head;
//   * a head flit may only bid for an output VC that no other packet holds (VC allocation; the
//     message class keeps its VC number) and every flit needs a credit for its output VC;
//   * switch allocation is separable: a round-robin choice between the VCs of each input port,
//     then, per output port, the GLB input-selection arbiter (glb_arbiter) grants the input with
//     the largest CS + waiting time;
//   * winners cross the crossbar into the output registers. A head flit leaves with its CS
//     field replaced by the average of the carried CS and this router's congestion value
//     {CC_local, CC_neighbours} from glb_cc.
// A flit that enters an input buffer at cycle t can leave the output register at t+2 at the
// earliest (one cycle through the buffer and allocation, one in the output register); credits
// return one cycle after the flit leaves the buffer. An input port is congested when its VCs
// together hold more than CONG_THRESH flits; the flag goes to the upstream neighbour (cong_out)
// and into this router's own congestion value.
// From the design description: 5 ports, 2 VCs, 5-flit buffers, wormhole switching, odd-even
// routing, congestion flags against a threshold, CS averaging and the CS+W arbitration.
// This design's own choices: the threshold value, the round-robin VC stage, the registered
// outputs and credits, and the X-first tie rule of the selection.
module glb_router
  import glb_pkg::*;
#(
  parameter int unsigned MESH_X      = 6,
  parameter int unsigned MESH_Y      = 5,
  parameter int unsigned X           = 0,
  parameter int unsigned Y           = 0,
  parameter int unsigned DEPTH       = 5,
  parameter int unsigned CONG_THRESH = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  flit_t  in_flit    [NUM_PORTS],
  output logic [NUM_VC-1:0] credit_out [NUM_PORTS],  // to upstream, one pulse per freed cell
  output logic   cong_out   [NUM_PORTS],             // this input port is congested
  output flit_t  out_flit   [NUM_PORTS],
  input  logic [NUM_VC-1:0] credit_in  [NUM_PORTS],  // from downstream
  input  logic   cong_in    [NUM_PORTS]              // downstream input port is congested
);
  localparam int unsigned NIV = NUM_PORTS * NUM_VC;
  localparam int unsigned CW  = $clog2(DEPTH + 1);
  localparam int unsigned BW  = FLIT_W + 2;  // head, tail, data

  localparam logic [COORD_W-1:0] CX = COORD_W'(X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(Y);

  // which ports lead somewhere
  logic [NUM_PORTS-1:0] port_exists;
  always_comb begin
    port_exists          = '0;
    port_exists[P_LOCAL] = 1'b1;
    port_exists[P_EAST]  = (X + 1 < MESH_X);
    port_exists[P_WEST]  = (X > 0);
    port_exists[P_NORTH] = (Y + 1 < MESH_Y);
    port_exists[P_SOUTH] = (Y > 0);
  end

  // ---------------------------------------------------------------- input buffers
  logic [BW-1:0] buf_out  [NIV];
  logic          buf_empty[NIV];
  logic          buf_full [NIV];
  logic [CW-1:0] buf_cnt  [NIV];
  logic          buf_push [NIV];
  logic          buf_pop  [NIV];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      localparam int unsigned I = p * NUM_VC + v;
      assign buf_push[I] = in_flit[p].valid && (in_flit[p].vc == 1'(v));
      glb_fifo #(.WIDTH(BW), .DEPTH(DEPTH)) u_buf (
        .clk, .rst_n,
        .push   (buf_push[I]),
        .wr_data({in_flit[p].head, in_flit[p].tail, in_flit[p].data}),
        .pop    (buf_pop[I]),
        .rd_data(buf_out[I]),
        .empty  (buf_empty[I]),
        .full   (buf_full[I]),
        .count  (buf_cnt[I])
      );
    end
  end

  // ---------------------------------------------------------------- congestion flags
  logic [NUM_PORTS-1:0] local_cong, nbr_cong;
  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      int unsigned occ;
      occ = 0;
      for (int v = 0; v < NUM_VC; v++) occ = occ + int'(buf_cnt[p*NUM_VC+v]);
      local_cong[p] = port_exists[p] && (occ > CONG_THRESH);
      nbr_cong[p]   = port_exists[p] && (p != P_LOCAL) && cong_in[p];
      cong_out[p]   = local_cong[p];
    end
  end

  // ---------------------------------------------------------------- per input VC state
  logic          active   [NIV];  // a packet's head has left; body flits follow route_q
  port_e         route_q  [NIV];
  logic [CS_W-1:0] cs_q   [NIV];

  logic          f_head [NIV], f_tail [NIV];
  hdr_t          f_hdr  [NIV];
  port_e         rc_sel [NIV];
  port_e         want   [NIV];
  logic [CS_W-1:0] cval [NIV];
  logic          elig   [NIV];

  // output VC state and credits
  logic          ovc_busy [NUM_PORTS][NUM_VC];
  logic [CW-1:0] cred     [NUM_PORTS][NUM_VC];

  for (genvar i = 0; i < NIV; i++) begin : g_rc
    logic [NUM_PORTS-1:0] adm;
    assign f_head[i] = buf_out[i][BW-1];
    assign f_tail[i] = buf_out[i][BW-2];
    assign f_hdr[i]  = hdr_t'(buf_out[i][FLIT_W-1:0]);
    glb_route u_rc (
      .cur_x(CX), .cur_y(CY),
      .src_x(f_hdr[i].src_x),
      .dst_x(f_hdr[i].dst_x), .dst_y(f_hdr[i].dst_y),
      .nbr_cong(nbr_cong),
      .admissible(adm),
      .sel(rc_sel[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NIV; i++) begin
      int unsigned v;
      v       = i % NUM_VC;
      want[i] = (f_head[i] && !active[i]) ? rc_sel[i] : route_q[i];
      cval[i] = (f_head[i] && !active[i]) ? f_hdr[i].cs : cs_q[i];
      elig[i] = !buf_empty[i] && (cred[want[i]][v] != '0) &&
                (!(f_head[i] && !active[i]) || !ovc_busy[want[i]][v]);
    end
  end

  // ---------------------------------------------------------------- switch allocation
  // stage 1: one VC per input port, round robin
  logic               s1_valid [NUM_PORTS];
  logic               s1_vc    [NUM_PORTS];
  port_e              s1_port  [NUM_PORTS];
  logic [CS_W-1:0]    s1_cval  [NUM_PORTS];
  logic [NUM_PORTS-1:0] rr_pref;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      logic e0, e1;
      e0 = elig[p*NUM_VC + 0];
      e1 = elig[p*NUM_VC + 1];
      s1_valid[p] = e0 || e1;
      s1_vc[p]    = (e0 && e1) ? rr_pref[p] : e1;
      s1_port[p]  = want[p*NUM_VC + int'(s1_vc[p])];
      s1_cval[p]  = cval[p*NUM_VC + int'(s1_vc[p])];
    end
  end

  // stage 2: GLB input selection per output port
  logic [NUM_PORTS-1:0] s2_req [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_gnt [NUM_PORTS];
  logic                 s2_any [NUM_PORTS];

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_sa
    always_comb begin
      for (int p = 0; p < NUM_PORTS; p++)
        s2_req[o][p] = s1_valid[p] && (s1_port[p] == port_e'(o));
    end
    glb_arbiter #(.N(NUM_PORTS), .C_W(CS_W), .W_W(CS_W + 1)) u_arb (
      .clk, .rst_n,
      .req      (s2_req[o]),
      .cval     (s1_cval),
      .advance  (s2_any[o]),
      .gnt      (s2_gnt[o]),
      .gnt_valid(s2_any[o])
    );
  end

  // which input port won, and where it goes
  logic               in_won  [NUM_PORTS];
  logic [2:0]         out_src [NUM_PORTS];  // winning input port per output
  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) in_won[p] = 1'b0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_src[o] = '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (s2_gnt[o][p]) begin
          in_won[p]  = 1'b1;
          out_src[o] = 3'(p);
        end
      end
    end
    for (int i = 0; i < NIV; i++)
      buf_pop[i] = in_won[i / NUM_VC] && (s1_vc[i / NUM_VC] == 1'(i % NUM_VC));
  end

  // ---------------------------------------------------------------- CS update (one per output)
  logic [3:0] cs_upd [NUM_PORTS];
  logic [3:0] rcv    [NUM_PORTS];
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_cc
    glb_cc #(.NPORT(NUM_PORTS)) u_cc (
      .port_exists(port_exists),
      .local_cong (local_cong),
      .nbr_cong   (nbr_cong),
      .cs_in      (f_hdr[int'(out_src[o]) * NUM_VC + int'(s1_vc[out_src[o]])].cs),
      .router_cv  (rcv[o]),
      .cs_new     (cs_upd[o])
    );
  end

  // ---------------------------------------------------------------- state update, crossbar
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NIV; i++) begin
        active[i]  <= 1'b0;
        route_q[i] <= P_LOCAL;
        cs_q[i]    <= '0;
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        out_flit[o]   <= '0;
        credit_out[o] <= '0;
        for (int v = 0; v < NUM_VC; v++) begin
          ovc_busy[o][v] <= 1'b0;
          cred[o][v]     <= CW'(DEPTH);
        end
      end
      rr_pref <= '0;
    end else begin
      // credits back to upstream
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NUM_VC; v++)
          credit_out[p][v] <= buf_pop[p*NUM_VC + v];

      for (int p = 0; p < NUM_PORTS; p++)
        if (in_won[p]) rr_pref[p] <= !s1_vc[p];

      for (int o = 0; o < NUM_PORTS; o++) begin
        automatic int unsigned p  = int'(out_src[o]);
        automatic int unsigned v  = int'(s1_vc[p]);
        automatic int unsigned i  = p * NUM_VC + v;
        automatic logic [NUM_VC-1:0] used = '0;
        if (s2_any[o]) begin
          hdr_t h;
          h = f_hdr[i];
          used[v] = 1'b1;
          out_flit[o].valid <= 1'b1;
          out_flit[o].vc    <= 1'(v);
          out_flit[o].head  <= f_head[i];
          out_flit[o].tail  <= f_tail[i];
          if (f_head[i] && !active[i]) begin
            h.cs = cs_upd[o];
            out_flit[o].data <= FLIT_W'(h);
            cs_q[i]    <= f_hdr[i].cs;
            route_q[i] <= port_e'(o);
            active[i]  <= !f_tail[i];
            ovc_busy[o][v] <= !f_tail[i];
          end else begin
            out_flit[o].data <= buf_out[i][FLIT_W-1:0];
            if (f_tail[i]) begin
              active[i]      <= 1'b0;
              ovc_busy[o][v] <= 1'b0;
            end
          end
        end else begin
          out_flit[o].valid <= 1'b0;
        end
        for (int vv = 0; vv < NUM_VC; vv++)
          cred[o][vv] <= cred[o][vv] - CW'(used[vv]) + CW'(credit_in[o][vv]);
      end
    end
  end

  // a flit is never sent without a credit
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    for (genvar v = 0; v < NUM_VC; v++) begin : g_v
      a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n) cred[o][v] <= CW'(DEPTH));
    end
  end
endmodule
