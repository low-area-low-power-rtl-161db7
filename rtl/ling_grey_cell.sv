// ling_grey_cell: generate-only prefix cell (grey circle). Where the group
// propagate of a span is never used again, only
// G_{i:j} = G_{i:k} OR (P_{i:k} AND G_{m:j}) is formed, saving the propagate
// gate of the black cell. Purely combinational.
module ling_grey_cell (
  input  logic g_hi,  // G_{i:k}
  input  logic p_hi,  // P_{i:k}
  input  logic g_lo,  // G_{m:j}
  output logic g_out  // G_{i:j}
);
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
