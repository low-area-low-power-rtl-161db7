// tb_ling_cell_placement: checks the cell placement rules of ling_pkg against
// the cell counts of the published 8-, 16- and 32-bit adder drawings.
// For each width it walks the same rules that ling_ppa uses to place cells and
// counts black cells, grey cells, real-carry hexagons and AND cells. Expected:
//    8 bit:  4 black,  0 grey,  4 hexagon,  4 AND
//   16 bit: 14 black,  0 grey, 10 hexagon,  6 AND
//   32 bit: 34 black, 14 grey, 16 hexagon, 16 AND
// It also checks that every combining cell takes a partner column of its own
// parity that lies below it. No time passes; the watchdog guards the loop.
module tb_ling_cell_placement;
  import ling_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic count_cells(input int width, input int exp_black, input int exp_grey,
                             input int exp_hex, input int exp_and);
    int levels = tree_levels(width);
    cellstyle_e st = default_style(width);
    int n_black = 0, n_grey = 0, n_hex = 0, n_and = 0;
    for (int col = 0; col < width; col++) begin
      int e = col / 2;
      for (int lv = 1; lv <= levels; lv++) begin
        if (has_node(e, lv)) begin
          int pc = 2 * partner(e, lv) + (col % 2);
          checks++;
          if (pc >= col || pc < 0 || (pc % 2) != (col % 2)) begin
            failures++;
            $display("FAIL %0d-bit: column %0d level %0d has partner column %0d", width, col, lv, pc);
          end
          if (lv != done_level(e)) n_black++;
          else if (use_hex(e, levels, st)) n_hex++;
          else if (st == CELLSTYLE_FIG_32) n_grey++;
          else n_black++;
        end
      end
      if (!use_hex(e, levels, st)) n_and++;
    end
    checks++;
    if (n_black != exp_black || n_grey != exp_grey || n_hex != exp_hex || n_and != exp_and) begin
      failures++;
      $display("FAIL %0d-bit: black %0d grey %0d hex %0d and %0d, expected %0d %0d %0d %0d",
               width, n_black, n_grey, n_hex, n_and, exp_black, exp_grey, exp_hex, exp_and);
    end else begin
      $display("%0d-bit: black %0d grey %0d hexagon %0d and %0d", width, n_black, n_grey, n_hex, n_and);
    end
  endtask

  initial begin : watchdog
    #1000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    count_cells(8, 4, 0, 4, 4);
    count_cells(16, 14, 0, 10, 6);
    count_cells(32, 34, 14, 16, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
