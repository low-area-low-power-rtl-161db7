// ling_gpd_cell: per-bit pre-processing node (white square of the adder
// diagrams). From the operand bits u and v it forms the bit generate g = u AND v,
// the bit propagate p = u OR v (the inclusive-OR propagate used by Ling adders)
// and the half sum d = u XOR v. Purely combinational, no clock.
module ling_gpd_cell (
  input  logic u,  // operand bit u_b
  input  logic v,  // operand bit v_b
  output logic g,  // generate g_b
  output logic p,  // propagate p_b
  output logic d   // half sum d_b
);
  assign g = u & v;
  assign p = u | v;
  assign d = u ^ v;
endmodule
