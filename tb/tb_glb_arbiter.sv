// tb_glb_arbiter: random test of the GLB input-selection arbiter (5 requesters). A model
// keeps its own waiting counters (reset on a win, +1 on a loss, saturating at 31, one more than the largest C) and
// predicts the grant as the requester with the largest C + W, lowest index on ties. A
// directed part checks that a low-priority requester that keeps losing wins within 16
// decisions, i.e. no starvation.
module tb_glb_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt;
  logic [3:0] cval [N];
  logic advance, gnt_valid;
  int checks = 0, failures = 0;
  int w [N];

  glb_arbiter dut (.*);
  assign advance = gnt_valid;

  task automatic check_and_step();
    int best, bi;
    best = -1; bi = -1;
    for (int i = 0; i < N; i++)
      if (req[i] && int'(cval[i]) + w[i] > best) begin best = int'(cval[i]) + w[i]; bi = i; end
    #1;
    checks++;
    if ((bi < 0 && gnt_valid) || (bi >= 0 && (gnt != 5'(1 << bi) || !gnt_valid))) begin
      failures++;
      $display("FAIL req=%b gnt=%b want %0d", req, gnt, bi);
    end
    @(posedge clk);
    if (bi >= 0)
      for (int i = 0; i < N; i++)
        if (i == bi) w[i] = 0;
        else if (req[i] && w[i] < 31) w[i]++;
    @(negedge clk);
  endtask

  initial begin
    int wins;
    req = '0;
    for (int i = 0; i < N; i++) begin cval[i] = '0; w[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 3000; c++) begin
      req = 5'($urandom);
      for (int i = 0; i < N; i++) cval[i] = 4'($urandom);
      check_and_step();
    end
    // starvation: requester 4 with C = 0 against requester 0 with C = 15 every cycle
    wins = 0;
    for (int c = 0; c < 17; c++) begin
      req = 5'b10001; cval[0] = 4'd15; cval[4] = 4'd0;
      #1;
      if (gnt[4]) wins++;
      check_and_step();
    end
    checks++;
    if (wins == 0) begin failures++; $display("FAIL: requester 4 starved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
