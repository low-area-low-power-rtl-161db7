// ling_istar_cell: intermediate generate/propagate node (black square of the
// adder diagrams). It regroups two bit positions for the modified Ling
// recurrence: G*_b = g_b OR g_{b-1} and P*_{b-1} = p_{b-1} AND p_{b-2}.
// At column 0 the adder uses no such node: G*_0 = g_0 and P*_{-1} = 0, and at
// column 1 it ties p_{-1} to 0 so that P*_0 = 0. Purely combinational.
module ling_istar_cell (
  input  logic g_b,     // generate of this bit
  input  logic g_bm1,   // generate of bit b-1
  input  logic p_bm1,   // propagate of bit b-1
  input  logic p_bm2,   // propagate of bit b-2 (0 below bit 0)
  output logic gstar,   // G*_b
  output logic pstar    // P*_{b-1}
);
  assign gstar = g_b | g_bm1;
  assign pstar = p_bm1 & p_bm2;
endmodule
