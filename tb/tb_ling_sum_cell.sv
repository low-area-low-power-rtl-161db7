// tb_ling_sum_cell: exhaustive self-checking testbench for ling_sum_cell.
// Every input combination (4 of them) is applied. The expected outputs
// come from truth tables indexed by the input vector {c_bm1, d_b}, written
// out from the cell equations independently of the RTL.
module tb_ling_sum_cell;
  logic d_b;
  logic c_bm1;
  logic s;
  int checks = 0;
  int failures = 0;
  logic [1:0] vec;
  localparam logic [3:0] TT_S = 4'b0110;

  ling_sum_cell dut (.d_b(d_b), .c_bm1(c_bm1), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL ling_sum_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      vec = 2'(i);
      d_b = vec[0];
      c_bm1 = vec[1];
      #1;
      checks++;
      if (s !== TT_S[vec]) begin
        failures++;
        $display("FAIL ling_sum_cell: inputs=%b s=%b expected %b", vec, s, TT_S[vec]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
