// ling_sum_cell: post-processing sum node (circle marked S).
// s_b = d_b XOR c_{b-1}, with the real carry of the bit below. Because the
// adder forms real carries, no multiplexer on the pseudo carry is needed here.
// Purely combinational.
module ling_sum_cell (
  input  logic d_b,    // half sum of this bit
  input  logic c_bm1,  // real carry out of bit b-1
  output logic s       // sum bit s_b
);
  assign s = d_b ^ c_bm1;
endmodule
