// tb_glb_cc: exhaustive test of the congestion-condition unit. For every set of existing
// ports, congested local ports, congested neighbours and carried CS it computes the two
// fractions as real numbers, maps them with the interval table (0,1/4] -> 00 ... (3/4,1] -> 11
// (zero -> 00), and checks the 4-bit router value and the averaged CS.
module tb_glb_cc;
  logic [4:0] port_exists, local_cong, nbr_cong;
  logic [3:0] cs_in, router_cv, cs_new;
  int checks = 0, failures = 0;

  glb_cc dut (.*);

  function automatic logic [1:0] table_map(input real f);
    if (f <= 0.25) return 2'b00;
    if (f <= 0.5)  return 2'b01;
    if (f <= 0.75) return 2'b10;
    return 2'b11;
  endfunction

  initial begin
    for (int pe = 0; pe < 32; pe++) begin
      if (pe[0] == 0) continue;  // the local port always exists
      for (int lc = 0; lc < 32; lc++)
        for (int nc = 0; nc < 32; nc++) begin
          int kx, nx, ky, ny;
          logic [1:0] ccx, ccy;
          port_exists = 5'(pe); local_cong = 5'(lc); nbr_cong = 5'(nc);
          cs_in = 4'($urandom_range(15));
          kx = 0; nx = 0; ky = 0; ny = 0;
          for (int i = 0; i < 5; i++) if (pe[i]) begin
            nx++; if (lc[i]) kx++;
            if (i > 0) begin ny++; if (nc[i]) ky++; end
          end
          ccx = table_map(real'(kx) / real'(nx));
          ccy = (ny == 0) ? 2'b00 : table_map(real'(ky) / real'(ny));
          #1;
          checks++;
          if (router_cv != {ccx, ccy} || cs_new != 4'((int'({ccx, ccy}) + int'(cs_in)) / 2)) begin
            failures++;
            if (failures < 10)
              $display("FAIL pe=%b lc=%b nc=%b: cv=%b want %b%b cs %0d", pe[4:0], lc[4:0], nc[4:0],
                       router_cv, ccx, ccy, cs_new);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
