// tb_ling_hex_cell: exhaustive self-checking testbench for ling_hex_cell.
// Every input combination (16 of them) is applied. The expected outputs
// come from truth tables indexed by the input vector {p_b, h_lo, p_hi, g_hi}, written
// out from the cell equations independently of the RTL.
module tb_ling_hex_cell;
  logic g_hi;
  logic p_hi;
  logic h_lo;
  logic p_b;
  logic c;
  int checks = 0;
  int failures = 0;
  logic [3:0] vec;
  localparam logic [15:0] TT_C = 16'b1110101000000000;

  ling_hex_cell dut (.g_hi(g_hi), .p_hi(p_hi), .h_lo(h_lo), .p_b(p_b), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL ling_hex_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      vec = 4'(i);
      g_hi = vec[0];
      p_hi = vec[1];
      h_lo = vec[2];
      p_b = vec[3];
      #1;
      checks++;
      if (c !== TT_C[vec]) begin
        failures++;
        $display("FAIL ling_hex_cell: inputs=%b c=%b expected %b", vec, c, TT_C[vec]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
