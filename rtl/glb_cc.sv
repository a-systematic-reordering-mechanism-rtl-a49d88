// glb_cc: congestion-condition unit of a GLB router.
//
// Counts the router's congested input ports (x = congested / existing input ports) and the
// congested input ports of its neighbours that face this router's outputs (y = congested /
// existing neighbours), and maps each fraction to a 2-bit Congestion Condition (CC):
// (0,1/4] -> 00, (1/4,1/2] -> 01, (1/2,3/4] -> 10, (3/4,1] -> 11. A fraction of 0 maps to 00.
// The router's 4-bit congestion value is {CC_local, CC_neighbours}. The comparisons use
// integers (4k <= n, 2k <= n, 4k <= 3n), so no division is needed. cs_new is the floor of the
// average of the router's value and the CS carried in the header, which is what the router
// writes back into the header. Purely combinational. The mapping, the concatenation and the
// averaging follow the design description; treating a fraction of zero as 00 and using the
// number of existing ports at the edge of the mesh as the denominator are this design's choices.
module glb_cc #(
  parameter int unsigned NPORT = 5
) (
  input  logic [NPORT-1:0] port_exists,  // input port / neighbour present
  input  logic [NPORT-1:0] local_cong,   // this router's input ports above threshold
  input  logic [NPORT-1:0] nbr_cong,     // neighbours' facing input ports above threshold
  input  logic [3:0]       cs_in,        // CS of the packet passing through
  output logic [3:0]       router_cv,    // {CC_local, CC_neighbours}
  output logic [3:0]       cs_new
);
  function automatic logic [1:0] cc_map(input int unsigned k, input int unsigned n);
    if (n == 0 || 4 * k <= n)  return 2'b00;
    else if (2 * k <= n)       return 2'b01;
    else if (4 * k <= 3 * n)   return 2'b10;
    else                       return 2'b11;
  endfunction

  always_comb begin
    int unsigned kx, nx, ky, ny;
    kx = 0; nx = 0; ky = 0; ny = 0;
    for (int i = 0; i < NPORT; i++) begin
      if (port_exists[i]) begin
        nx = nx + 1;
        if (local_cong[i]) kx = kx + 1;
        // the local port (index 0) has no neighbouring router
        if (i != 0) begin
          ny = ny + 1;
          if (nbr_cong[i]) ky = ky + 1;
        end
      end
    end
    router_cv = {cc_map(kx, nx), cc_map(ky, ny)};
    cs_new    = 4'(({1'b0, router_cv} + {1'b0, cs_in}) >> 1);
  end
endmodule
