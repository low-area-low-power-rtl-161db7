// ling_and_cell: real carry from a finished pseudo carry (circle marked A).
// A Ling pseudo carry H_b = g_b + c_{b-1} turns into the true carry with one
// gate: c_b = H_b AND p_b. Purely combinational.
module ling_and_cell (
  input  logic h_b,  // pseudo carry H_b
  input  logic p_b,  // bit propagate p_b
  output logic c     // real carry c_b
);
  assign c = h_b & p_b;
endmodule
