// glb_arbiter: GLB adaptive input-selection arbiter.
//
// Each requester i presents a congestion value C(i) (the CS carried by its packet). The
// arbiter keeps a waiting counter W(i) per requester and grants the requester whose
// C(i) + W(i) is largest; on a tie the lowest index wins. After each decision the counters of
// the requesters that lost are incremented (saturating), which prevents starvation, and the
// counter of the winner restarts at zero, so the next flit it presents starts as newly
// arrived. A requester that is idle keeps its count. The grant is combinational in the same
// cycle as the requests; counters update at the clock edge when advance is high (the caller
// sets it when the grant is actually used). The selection rule and the anti-starvation
// increment follow the design description; the saturating W_W-bit counter (one bit wider than C, so that a waiting requester always
// overtakes eventually), the reset on a win
// and the tie rule are this design's choices.
module glb_arbiter #(
  parameter int unsigned N   = 5,
  parameter int unsigned C_W = 4,
  parameter int unsigned W_W = C_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     req,
  input  logic [C_W-1:0]   cval  [N],
  input  logic             advance,  // a grant was used this cycle
  output logic [N-1:0]     gnt,
  output logic             gnt_valid
);
  localparam int unsigned P_W = ((C_W > W_W) ? C_W : W_W) + 1;

  logic [W_W-1:0] w [N];
  logic [P_W-1:0] prio [N];

  always_comb begin
    logic [P_W-1:0] best;
    gnt       = '0;
    gnt_valid = 1'b0;
    best      = '0;
    for (int i = 0; i < N; i++) begin
      prio[i] = P_W'(cval[i]) + P_W'(w[i]);
      if (req[i] && (!gnt_valid || prio[i] > best)) begin
        best      = prio[i];
        gnt       = '0;
        gnt[i]    = 1'b1;
        gnt_valid = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) w[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (gnt[i] && advance) begin
          w[i] <= '0;
        end else if (req[i] && advance && !gnt[i] && w[i] != '1) begin
          w[i] <= w[i] + 1'b1;
        end
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
