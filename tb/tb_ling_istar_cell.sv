// tb_ling_istar_cell: exhaustive self-checking testbench for ling_istar_cell.
// Every input combination (16 of them) is applied. The expected outputs
// come from truth tables indexed by the input vector {p_bm2, p_bm1, g_bm1, g_b}, written
// out from the cell equations independently of the RTL.
module tb_ling_istar_cell;
  logic g_b;
  logic g_bm1;
  logic p_bm1;
  logic p_bm2;
  logic gstar;
  logic pstar;
  int checks = 0;
  int failures = 0;
  logic [3:0] vec;
  localparam logic [15:0] TT_GSTAR = 16'b1110111011101110;
  localparam logic [15:0] TT_PSTAR = 16'b1111000000000000;

  ling_istar_cell dut (.g_b(g_b), .g_bm1(g_bm1), .p_bm1(p_bm1), .p_bm2(p_bm2), .gstar(gstar), .pstar(pstar));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL ling_istar_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      vec = 4'(i);
      g_b = vec[0];
      g_bm1 = vec[1];
      p_bm1 = vec[2];
      p_bm2 = vec[3];
      #1;
      checks++;
      if (gstar !== TT_GSTAR[vec]) begin
        failures++;
        $display("FAIL ling_istar_cell: inputs=%b gstar=%b expected %b", vec, gstar, TT_GSTAR[vec]);
      end
      checks++;
      if (pstar !== TT_PSTAR[vec]) begin
        failures++;
        $display("FAIL ling_istar_cell: inputs=%b pstar=%b expected %b", vec, pstar, TT_PSTAR[vec]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
