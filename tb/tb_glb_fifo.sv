// tb_glb_fifo: random push/pop test of glb_fifo at its default depth (5) against a queue
// model; checks data order, occupancy count and the empty/full flags every cycle.
module tb_glb_fifo;
  localparam int unsigned W = 34, D = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  glb_fifo #(.WIDTH(W)) dut (.*);

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      checks++;
      if (count != 3'(model.size()) || empty != (model.size() == 0) || full != (model.size() == D) ||
          (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        $display("FAIL cycle %0d: count %0d/%0d rd %h", c, count, model.size(), rd_data);
      end
      pop     = !empty && ($urandom_range(2) != 0);
      push    = (!full || pop) && ($urandom_range(c % 3) != 0 || c > 3000);
      wr_data = {$urandom, 2'($urandom)};
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
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
