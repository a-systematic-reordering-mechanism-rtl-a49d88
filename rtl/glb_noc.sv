// glb_noc: the GLB network-on-chip, a MESH_X x MESH_Y mesh (6 x 5 by default) of glb_router
// instances with a master network interface on every processor node and a slave network
// interface on every memory node.
//
// Node n = y * MESH_X + x; a node is a processor node when n mod 5 is 0 or 2, which places
// 12 processors and 18 memories spread evenly over the 30 nodes. Neighbouring routers are
// joined by flit links, per-VC credit wires and the congestion flag of the receiving input
// port; unused edge ports are tied off. The processors and the memory controllers are outside
// this module: master m (the m-th processor node in node order) has its command, write-data
// and response channels on the m_* arrays, memory k has its request and response channels
// on the s_* arrays. Requests travel on VC 0 and responses on VC 1.
// Timing: every router hop costs two cycles (input buffer and output register) without
// contention; each network interface adds a cycle at injection and at ejection.
// From the design description: the 6 x 5 mesh, 12 processors and 18 memories, 5-port routers
// with 2 VCs, the master/slave interfaces. The placement of processors and memories and the
// address map are this design's own choices.
module glb_noc
  import glb_pkg::*;
#(
  parameter int unsigned MESH_X    = 6,
  parameter int unsigned MESH_Y    = 5,
  parameter int unsigned DEPTH     = 5,
  parameter int unsigned ROB_WORDS = 48,
  parameter int unsigned SLOTS     = 4,
  parameter int unsigned MEM_SHIFT = 24,
  localparam int unsigned NN  = MESH_X * MESH_Y,
  localparam int unsigned NM  = (NN / 5) * 2 + ((NN % 5) > 0 ? 1 : 0) + ((NN % 5) > 2 ? 1 : 0),
  localparam int unsigned NS  = NN - NM,
  localparam int unsigned RW  = $clog2(ROB_WORDS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // processors
  input  logic             m_cmd_valid   [NM],
  output logic             m_cmd_ready   [NM],
  input  logic             m_cmd_write   [NM],
  input  logic [ID_W-1:0]  m_cmd_id      [NM],
  input  logic [31:0]      m_cmd_addr    [NM],
  input  logic [LEN_W-1:0] m_cmd_len     [NM],
  input  logic             m_wdata_valid [NM],
  output logic             m_wdata_ready [NM],
  input  logic [31:0]      m_wdata       [NM],
  input  logic             m_wlast       [NM],
  output logic             m_rsp_valid   [NM],
  input  logic             m_rsp_ready   [NM],
  output logic [ID_W-1:0]  m_rsp_id      [NM],
  output logic [31:0]      m_rsp_data    [NM],
  output logic             m_rsp_last    [NM],
  output logic             m_rsp_write   [NM],
  output logic [RW-1:0]    m_rob_reserved[NM],
  output logic             m_rob_stored  [NM],
  output logic             m_rob_released[NM],
  // memories
  output logic             s_req_valid   [NS],
  input  logic             s_req_ready   [NS],
  output logic             s_req_write   [NS],
  output logic [31:0]      s_req_addr    [NS],
  output logic [LEN_W-1:0] s_req_len     [NS],
  output logic [31:0]      s_req_wdata   [NS][MAX_BURST],
  input  logic             s_rsp_valid   [NS],
  output logic             s_rsp_ready   [NS],
  input  logic [31:0]      s_rsp_data    [NS],
  input  logic             s_rsp_last    [NS],
  output logic [CS_W-1:0]  s_qit         [NS][4]
);
  flit_t             r_in   [NN][NUM_PORTS];
  flit_t             r_out  [NN][NUM_PORTS];
  logic [NUM_VC-1:0] c_in   [NN][NUM_PORTS];   // credits arriving at a router's outputs
  logic [NUM_VC-1:0] c_out  [NN][NUM_PORTS];   // credits leaving a router's inputs
  logic              g_in   [NN][NUM_PORTS];   // downstream congestion flags
  logic              g_out  [NN][NUM_PORTS];   // own input-port congestion flags

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int unsigned NX = n % MESH_X;
    localparam int unsigned NY = n / MESH_X;
    localparam int unsigned KI = kind_index(n);

    glb_router #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(NX), .Y(NY), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .in_flit   (r_in[n]),
      .credit_out(c_out[n]),
      .cong_out  (g_out[n]),
      .out_flit  (r_out[n]),
      .credit_in (c_in[n]),
      .cong_in   (g_in[n])
    );

    // mesh links
    if (NX + 1 < MESH_X) begin : g_e
      assign r_in[n][P_EAST] = r_out[n+1][P_WEST];
      assign c_in[n][P_EAST] = c_out[n+1][P_WEST];
      assign g_in[n][P_EAST] = g_out[n+1][P_WEST];
    end else begin : g_e0
      assign r_in[n][P_EAST] = '0;
      assign c_in[n][P_EAST] = '0;
      assign g_in[n][P_EAST] = 1'b0;
    end
    if (NX > 0) begin : g_w
      assign r_in[n][P_WEST] = r_out[n-1][P_EAST];
      assign c_in[n][P_WEST] = c_out[n-1][P_EAST];
      assign g_in[n][P_WEST] = g_out[n-1][P_EAST];
    end else begin : g_w0
      assign r_in[n][P_WEST] = '0;
      assign c_in[n][P_WEST] = '0;
      assign g_in[n][P_WEST] = 1'b0;
    end
    if (NY + 1 < MESH_Y) begin : g_n
      assign r_in[n][P_NORTH] = r_out[n+MESH_X][P_SOUTH];
      assign c_in[n][P_NORTH] = c_out[n+MESH_X][P_SOUTH];
      assign g_in[n][P_NORTH] = g_out[n+MESH_X][P_SOUTH];
    end else begin : g_n0
      assign r_in[n][P_NORTH] = '0;
      assign c_in[n][P_NORTH] = '0;
      assign g_in[n][P_NORTH] = 1'b0;
    end
    if (NY > 0) begin : g_s
      assign r_in[n][P_SOUTH] = r_out[n-MESH_X][P_NORTH];
      assign c_in[n][P_SOUTH] = c_out[n-MESH_X][P_NORTH];
      assign g_in[n][P_SOUTH] = g_out[n-MESH_X][P_NORTH];
    end else begin : g_s0
      assign r_in[n][P_SOUTH] = '0;
      assign c_in[n][P_SOUTH] = '0;
      assign g_in[n][P_SOUTH] = 1'b0;
    end
    assign g_in[n][P_LOCAL] = 1'b0;

    if (is_master_node(n)) begin : g_m
      glb_master_ni #(
        .X(NX), .Y(NY), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .NUM_MEM(NS),
        .MEM_SHIFT(MEM_SHIFT), .ROB_WORDS(ROB_WORDS), .CREDITS(DEPTH)
      ) u_mni (
        .clk, .rst_n,
        .cmd_valid  (m_cmd_valid[KI]),
        .cmd_ready  (m_cmd_ready[KI]),
        .cmd_write  (m_cmd_write[KI]),
        .cmd_id     (m_cmd_id[KI]),
        .cmd_addr   (m_cmd_addr[KI]),
        .cmd_len    (m_cmd_len[KI]),
        .wdata_valid(m_wdata_valid[KI]),
        .wdata_ready(m_wdata_ready[KI]),
        .wdata      (m_wdata[KI]),
        .wlast      (m_wlast[KI]),
        .rsp_valid  (m_rsp_valid[KI]),
        .rsp_ready  (m_rsp_ready[KI]),
        .rsp_id     (m_rsp_id[KI]),
        .rsp_data   (m_rsp_data[KI]),
        .rsp_last   (m_rsp_last[KI]),
        .rsp_write  (m_rsp_write[KI]),
        .tx_flit    (r_in[n][P_LOCAL]),
        .tx_credit  (c_out[n][P_LOCAL]),
        .rx_flit    (r_out[n][P_LOCAL]),
        .rx_credit  (c_in[n][P_LOCAL]),
        .rob_reserved(m_rob_reserved[KI]),
        .rob_stored  (m_rob_stored[KI]),
        .rob_released(m_rob_released[KI])
      );
    end else begin : g_sl
      glb_slave_ni #(.X(NX), .Y(NY), .SLOTS(SLOTS), .CREDITS(DEPTH)) u_sni (
        .clk, .rst_n,
        .rx_flit      (r_out[n][P_LOCAL]),
        .rx_credit    (c_in[n][P_LOCAL]),
        .tx_flit      (r_in[n][P_LOCAL]),
        .tx_credit    (c_out[n][P_LOCAL]),
        .mem_req_valid(s_req_valid[KI]),
        .mem_req_ready(s_req_ready[KI]),
        .mem_req_write(s_req_write[KI]),
        .mem_req_addr (s_req_addr[KI]),
        .mem_req_len  (s_req_len[KI]),
        .mem_req_wdata(s_req_wdata[KI]),
        .mem_rsp_valid(s_rsp_valid[KI]),
        .mem_rsp_ready(s_rsp_ready[KI]),
        .mem_rsp_data (s_rsp_data[KI]),
        .mem_rsp_last (s_rsp_last[KI]),
        .qit          (s_qit[KI])
      );
    end
  end
endmodule
