// ling_black_cell: prefix operator cell (black circle). It joins the upper span
// (G_{i:k}, P_{i:k}) with the lower span (G_{m:j}, P_{m:j}) into
// G_{i:j} = G_{i:k} OR (P_{i:k} AND G_{m:j}) and P_{i:j} = P_{i:k} AND P_{m:j}.
// In the Ling trees the spans are intermediate (G*, P*) pairs of one parity,
// so the propagate that is paired with a generate is shifted down one bit.
// Purely combinational.
module ling_black_cell (
  input  logic g_hi,  // G_{i:k}
  input  logic p_hi,  // P_{i:k}
  input  logic g_lo,  // G_{m:j}
  input  logic p_lo,  // P_{m:j}
  output logic g_out, // G_{i:j}
  output logic p_out  // P_{i:j}
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
