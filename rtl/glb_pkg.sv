// glb_pkg: types and constants shared by the Global Load Balancing (GLB) network-on-chip.
//
// A link carries one 32-bit flit per cycle together with a virtual-channel number and
// head/tail markers. Request packets (master -> memory) travel on VC 0 and response packets
// (memory -> master) on VC 1, which keeps the two message classes from blocking each other.
// The first flit of every packet is a header (hdr_t) that holds the 4-bit Congestion Status
// (CS) field; routers rewrite it on the way so that it summarises the congestion seen along the
// path. The 32-bit flit, the 2 VCs per port, the 5-flit VC buffers and the 4-bit CS width follow
// the design description; the exact bit layout of the header is this design's own choice.
package glb_pkg;

  localparam int unsigned FLIT_W   = 32;  // link / flit width
  localparam int unsigned NUM_VC   = 2;   // virtual channels per port
  localparam int unsigned VC_REQ   = 0;   // request message class
  localparam int unsigned VC_RSP   = 1;   // response message class
  localparam int unsigned COORD_W  = 3;   // mesh coordinate width (up to 8x8)
  localparam int unsigned CS_W     = 4;   // congestion status field width
  localparam int unsigned ID_W     = 4;   // AXI transaction ID width
  localparam int unsigned SEQ_W    = 6;   // sequence number width
  localparam int unsigned LEN_W    = 3;   // burst length - 1 (bursts of 1..8 beats)
  localparam int unsigned MAX_BURST = 8;

  // router ports
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,
    P_WEST  = 3'd2,
    P_NORTH = 3'd3,
    P_SOUTH = 3'd4
  } port_e;
  localparam int unsigned NUM_PORTS = 5;

  typedef enum logic [1:0] {
    MT_RD_REQ = 2'd0,
    MT_WR_REQ = 2'd1,
    MT_RD_RSP = 2'd2,
    MT_WR_RSP = 2'd3
  } mtype_e;

  // header flit layout (32 bits)
  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [CS_W-1:0]    cs;
    mtype_e             mtype;
    logic [ID_W-1:0]    id;
    logic [SEQ_W-1:0]   seq;
    logic [LEN_W-1:0]   len;
    logic               rsvd;
  } hdr_t;

  // one link transfer
  typedef struct packed {
    logic              valid;
    logic              vc;
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // quadrants of the Quadrants Information Table
  typedef enum logic [1:0] {
    Q_SW = 2'd0,
    Q_SE = 2'd1,
    Q_NW = 2'd2,
    Q_NE = 2'd3
  } quad_e;

  // Node placement of the 6x5 mesh: node n = y*MESH_X + x is a master (processor) when
  // n mod 5 is 0 or 2, giving 12 masters and 18 memories.
  function automatic logic is_master_node(input int unsigned n);
    return (n % 5 == 0) || (n % 5 == 2);
  endfunction

  // Node number of the k-th memory (k counts the non-master nodes in node order).
  function automatic int unsigned slave_node(input int unsigned k, input int unsigned nodes);
    int unsigned seen;
    slave_node = 0;
    seen = 0;
    for (int unsigned n = 0; n < 64; n++) begin
      if (n < nodes && !is_master_node(n)) begin
        if (seen == k) slave_node = n;
        seen = seen + 1;
      end
    end
  endfunction

  // Index of node n among the masters (or among the memories): nodes of its kind before it.
  function automatic int unsigned kind_index(input int unsigned n);
    kind_index = 0;
    for (int unsigned i = 0; i < 64; i++)
      if (i < n && is_master_node(i) == is_master_node(n)) kind_index = kind_index + 1;
  endfunction

endpackage
