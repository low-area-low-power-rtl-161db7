// tb_ling_ppa: self-checking testbench for the modified-Ling prefix adder.
// It builds ling_ppa at widths 4, 8, 16, 32 and 64, each with both cell
// placements (CELLSTYLE_FIG_8_16 and CELLSTYLE_FIG_32), through
// ling_ppa_checker, which compares {cout, sum} with a + b. Widths up to 8 are
// checked exhaustively, wider ones with corner cases and random operands.
module tb_ling_ppa;
  import ling_pkg::*;

  localparam int NCFG = 10;
  localparam int CFG_W [NCFG] = '{4, 4, 8, 8, 16, 16, 32, 32, 64, 64};

  int cfg_checks [NCFG];
  int cfg_failures [NCFG];
  bit cfg_done [NCFG];
  int checks = 0;
  int failures = 0;

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    ling_ppa_checker #(
      .W (CFG_W[k]),
      .ST((k % 2 == 0) ? CELLSTYLE_FIG_8_16 : CELLSTYLE_FIG_32)
    ) u_chk (.checks(cfg_checks[k]), .failures(cfg_failures[k]), .done(cfg_done[k]));
  end

  initial begin : watchdog
    #5000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (cfg_done.and() == 1'b1);
    for (int k = 0; k < NCFG; k++) begin
      checks += cfg_checks[k];
      failures += cfg_failures[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
