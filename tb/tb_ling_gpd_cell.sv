// tb_ling_gpd_cell: exhaustive self-checking testbench for ling_gpd_cell.
// Every input combination (4 of them) is applied. The expected outputs
// come from truth tables indexed by the input vector {v, u}, written
// out from the cell equations independently of the RTL.
module tb_ling_gpd_cell;
  logic u;
  logic v;
  logic g;
  logic p;
  logic d;
  int checks = 0;
  int failures = 0;
  logic [1:0] vec;
  localparam logic [3:0] TT_G = 4'b1000;
  localparam logic [3:0] TT_P = 4'b1110;
  localparam logic [3:0] TT_D = 4'b0110;

  ling_gpd_cell dut (.u(u), .v(v), .g(g), .p(p), .d(d));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL ling_gpd_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      vec = 2'(i);
      u = vec[0];
      v = vec[1];
      #1;
      checks++;
      if (g !== TT_G[vec]) begin
        failures++;
        $display("FAIL ling_gpd_cell: inputs=%b g=%b expected %b", vec, g, TT_G[vec]);
      end
      checks++;
      if (p !== TT_P[vec]) begin
        failures++;
        $display("FAIL ling_gpd_cell: inputs=%b p=%b expected %b", vec, p, TT_P[vec]);
      end
      checks++;
      if (d !== TT_D[vec]) begin
        failures++;
        $display("FAIL ling_gpd_cell: inputs=%b d=%b expected %b", vec, d, TT_D[vec]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
