// tb_ling_grey_cell: exhaustive self-checking testbench for ling_grey_cell.
// Every input combination (8 of them) is applied. The expected outputs
// come from truth tables indexed by the input vector {g_lo, p_hi, g_hi}, written
// out from the cell equations independently of the RTL.
module tb_ling_grey_cell;
  logic g_hi;
  logic p_hi;
  logic g_lo;
  logic g_out;
  int checks = 0;
  int failures = 0;
  logic [2:0] vec;
  localparam logic [7:0] TT_G_OUT = 8'b11101010;

  ling_grey_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .g_out(g_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL ling_grey_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      vec = 3'(i);
      g_hi = vec[0];
      p_hi = vec[1];
      g_lo = vec[2];
      #1;
      checks++;
      if (g_out !== TT_G_OUT[vec]) begin
        failures++;
        $display("FAIL ling_grey_cell: inputs=%b g_out=%b expected %b", vec, g_out, TT_G_OUT[vec]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
