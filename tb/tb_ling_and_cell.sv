// tb_ling_and_cell: exhaustive self-checking testbench for ling_and_cell.
// Every input combination (4 of them) is applied. The expected outputs
// come from truth tables indexed by the input vector {p_b, h_b}, written
// out from the cell equations independently of the RTL.
module tb_ling_and_cell;
  logic h_b;
  logic p_b;
  logic c;
  int checks = 0;
  int failures = 0;
  logic [1:0] vec;
  localparam logic [3:0] TT_C = 4'b1000;

  ling_and_cell dut (.h_b(h_b), .p_b(p_b), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL ling_and_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      vec = 2'(i);
      h_b = vec[0];
      p_b = vec[1];
      #1;
      checks++;
      if (c !== TT_C[vec]) begin
        failures++;
        $display("FAIL ling_and_cell: inputs=%b c=%b expected %b", vec, c, TT_C[vec]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
