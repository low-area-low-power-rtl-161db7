// ling_hex_cell: real-carry prefix cell (black hexagon). It completes the
// pseudo carry of its column and converts it to the true carry in one cell:
// c_b = (G_{i:k} OR (P_{i-1:k-1} AND G_{k-1:j+1})) AND p_b.
// The lower operand G_{k-1:j+1} is an already complete pseudo carry of the same
// parity tree, so no group propagate is needed at the output. Combinational.
module ling_hex_cell (
  input  logic g_hi,  // G_{i:k}, upper span generate
  input  logic p_hi,  // P_{i-1:k-1}, upper span propagate
  input  logic h_lo,  // G_{k-1:j+1}, complete pseudo carry of the lower span
  input  logic p_b,   // bit propagate of this column
  output logic c      // real carry c_b
);
  assign c = (g_hi | (p_hi & h_lo)) & p_b;
endmodule
