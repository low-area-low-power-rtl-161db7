// tb_ling_black_cell: exhaustive self-checking testbench for ling_black_cell.
// Every input combination (16 of them) is applied. The expected outputs
// come from truth tables indexed by the input vector {p_lo, g_lo, p_hi, g_hi}, written
// out from the cell equations independently of the RTL.
module tb_ling_black_cell;
  logic g_hi;
  logic p_hi;
  logic g_lo;
  logic p_lo;
  logic g_out;
  logic p_out;
  int checks = 0;
  int failures = 0;
  logic [3:0] vec;
  localparam logic [15:0] TT_G_OUT = 16'b1110101011101010;
  localparam logic [15:0] TT_P_OUT = 16'b1100110000000000;

  ling_black_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo), .g_out(g_out), .p_out(p_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL ling_black_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      vec = 4'(i);
      g_hi = vec[0];
      p_hi = vec[1];
      g_lo = vec[2];
      p_lo = vec[3];
      #1;
      checks++;
      if (g_out !== TT_G_OUT[vec]) begin
        failures++;
        $display("FAIL ling_black_cell: inputs=%b g_out=%b expected %b", vec, g_out, TT_G_OUT[vec]);
      end
      checks++;
      if (p_out !== TT_P_OUT[vec]) begin
        failures++;
        $display("FAIL ling_black_cell: inputs=%b p_out=%b expected %b", vec, p_out, TT_P_OUT[vec]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
