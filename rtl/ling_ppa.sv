// ling_ppa: WIDTH-bit parallel prefix adder built on modified Ling equations.
//
// Idea. A Ling pseudo carry H_b = g_b + c_{b-1} is cheaper to build than the
// real carry, and c_b = H_b AND p_b (p = inclusive-OR propagate). Rewriting H_b
// with the intermediate pairs G*_b = g_b + g_{b-1} and P*_{b-1} = p_{b-1} p_{b-2}
// gives
//     H_b = (G*_b, P*_{b-1}) o (G*_{b-2}, P*_{b-3}) o ... ,
// a prefix expression over columns of one parity only. The even columns and
// the odd columns therefore form two independent prefix trees of WIDTH/2
// elements each. Each tree is a Sklansky network of log2(WIDTH/2) levels.
// The cell that finishes a column emits the real carry directly, so the sum
// stage is a plain XOR and needs no multiplexer.
//
// Stages (all combinational):
//   1. ling_gpd_cell per bit: g, p, d.
//   2. ling_istar_cell per bit b >= 1: G*_b, P*_{b-1}. Column 0 passes g_0 and
//      uses P*_{-1} = 0; column 1 uses p_{-1} = 0, so P*_0 = 0.
//   3. Prefix levels 1..L. On level l, element e = b/2 that has bit l-1 set is
//      combined with element ((e >> (l-1)) << (l-1)) - 1 of the same parity.
//      Unfinished results use ling_black_cell. The cell that finishes a column
//      is either a ling_hex_cell, which yields c_b directly, or a black or grey
//      cell followed later by a ling_and_cell. The choice is made by STYLE;
//      see ling_pkg. Columns 0 and 1 are finished after stage 2 and go straight
//      to an AND cell.
//   4. ling_sum_cell per bit: s_b = d_b XOR c_{b-1}, with no carry into bit 0.
//
// The cell equations and the 8-, 16- and 32-bit cell placements follow the
// published design. The adder has no carry input because the design has none.
// Other choices are this design's own: no registers, the port names, the
// generalisation to any power-of-two WIDTH >= 4, and the white pass-through
// buffers of the drawings modelled as plain wires.
//
// Lint notes two unused signals: the last level's ps vector and the upper
// half of its gs vector. They stand by design. Columns finished by a hexagon
// carry no pseudo carry forward, and no cell reads a propagate after the last
// level.
//
// Interface: a, b  - operands; sum - a + b mod 2^WIDTH; cout - carry out of the
// top bit (c_{WIDTH-1}). Timing: combinational, result valid in the same cycle.
module ling_ppa
  import ling_pkg::*;
#(
  parameter int unsigned WIDTH = 32,                       // 8, 16 or 32 in the published design
  parameter cellstyle_e  STYLE = default_style(int'(WIDTH)) // cell placement, see ling_pkg
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int L = tree_levels(int'(WIDTH));

  if (WIDTH < 4 || (WIDTH & (WIDTH - 1)) != 0) begin : g_bad_width
    $error("ling_ppa: WIDTH must be a power of two of at least 4");
  end

  logic g [WIDTH];
  logic p [WIDTH];
  logic d [WIDTH];
  logic c [WIDTH];

  // Stage 1: pre-processing.
  for (genvar col = 0; col < WIDTH; col++) begin : g_pre
    ling_gpd_cell u_gpd (.u(a[col]), .v(b[col]), .g(g[col]), .p(p[col]), .d(d[col]));
  end

  // Stage 2 (level 0) and stage 3 (levels 1..L). g_lvl[l].gs[col] and
  // g_lvl[l].ps[col] are the generate and propagate of a column after level l;
  // level 0 holds the intermediate pairs (G*_b, P*_{b-1}).
  for (genvar lv = 0; lv <= L; lv++) begin : g_lvl
    logic [WIDTH-1:0] gs;
    logic [WIDTH-1:0] ps;
    for (genvar col = 0; col < WIDTH; col++) begin : g_col
      localparam int E  = col / 2;
      localparam int PC = (lv == 0) ? 0 : 2 * partner(E, lv) + (col % 2);
      if (lv == 0) begin : g_istar
        if (col == 0) begin : g_col0
          assign gs[col] = g[col];
          assign ps[col] = 1'b0;
        end else begin : g_coln
          ling_istar_cell u_istar (.g_b(g[col]), .g_bm1(g[col-1]), .p_bm1(p[col-1]),
                                   .p_bm2((col == 1) ? 1'b0 : p[(col < 2) ? 0 : col-2]),
                                   .gstar(gs[col]), .pstar(ps[col]));
        end
      end else if (!has_node(E, lv)) begin : g_wire
        assign gs[col] = g_lvl[lv-1].gs[col];
        assign ps[col] = g_lvl[lv-1].ps[col];
      end else if (lv != done_level(E)) begin : g_black
        ling_black_cell u_cell (.g_hi(g_lvl[lv-1].gs[col]), .p_hi(g_lvl[lv-1].ps[col]),
                                .g_lo(g_lvl[lv-1].gs[PC]),  .p_lo(g_lvl[lv-1].ps[PC]),
                                .g_out(gs[col]), .p_out(ps[col]));
      end else if (use_hex(E, L, STYLE)) begin : g_hex
        ling_hex_cell u_cell (.g_hi(g_lvl[lv-1].gs[col]), .p_hi(g_lvl[lv-1].ps[col]),
                              .h_lo(g_lvl[lv-1].gs[PC]), .p_b(p[col]), .c(c[col]));
        // The column is finished; nothing reads its pseudo carry.
        assign gs[col] = 1'b0;
        assign ps[col] = 1'b0;
      end else if (STYLE == CELLSTYLE_FIG_32) begin : g_grey
        ling_grey_cell u_cell (.g_hi(g_lvl[lv-1].gs[col]), .p_hi(g_lvl[lv-1].ps[col]),
                               .g_lo(g_lvl[lv-1].gs[PC]), .g_out(gs[col]));
        assign ps[col] = 1'b0;
      end else begin : g_black_fin
        logic p_unused;
        ling_black_cell u_cell (.g_hi(g_lvl[lv-1].gs[col]), .p_hi(g_lvl[lv-1].ps[col]),
                                .g_lo(g_lvl[lv-1].gs[PC]),  .p_lo(g_lvl[lv-1].ps[PC]),
                                .g_out(gs[col]), .p_out(p_unused));
        assign ps[col] = 1'b0;
      end
    end
  end

  // Real carries of columns finished by a pseudo carry (AND cells).
  for (genvar col = 0; col < WIDTH; col++) begin : g_carry
    if (!use_hex(col / 2, L, STYLE)) begin : g_and
      ling_and_cell u_and (.h_b(g_lvl[L].gs[col]), .p_b(p[col]), .c(c[col]));
    end
  end

  // Stage 4: sums.
  for (genvar col = 0; col < WIDTH; col++) begin : g_sum
    ling_sum_cell u_sum (.d_b(d[col]), .c_bm1((col == 0) ? 1'b0 : c[(col == 0) ? 0 : col-1]),
                         .s(sum[col]));
  end

  assign cout = c[WIDTH-1];

endmodule
