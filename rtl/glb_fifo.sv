// glb_fifo: synchronous first-in first-out buffer, used as the router's per-VC input buffer
// and as the queues of the network interfaces.
//
// An array of DEPTH words with read and write pointers and an occupancy counter. A push with
// full set or a pop with empty set is a protocol error (checked by assertions); the caller
// uses credits or the full/empty flags to avoid them. The head word is visible on rd_data
// while empty is low (first-word fall-through), a pop removes it at the clock edge. Push and
// pop may happen in the same cycle. count is the number of occupied cells, which the router
// compares with a threshold to raise the input port's congestion flag. The default depth of 5
// flits is the VC buffer depth of the design description; reset empties the buffer.
module glb_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 5,
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rp, wp;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
