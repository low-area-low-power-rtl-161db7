// ling_ppa_checker: stimulus and checking for one ling_ppa configuration, used
// by tb_ling_ppa. It compares {cout, sum} with a + b formed in WIDTH+1 bits.
// Widths up to 8 are checked exhaustively. Wider ones get directed corner
// cases (zero, all ones, carry chains of every length started at bit 0) and
// NRAND random operand pairs, half of them biased towards long propagate runs.
// Results are sampled 1 time unit after the operands change. When finished it
// raises done and holds its totals on checks and failures.
module ling_ppa_checker
  import ling_pkg::*;
#(
  parameter int         W     = 8,
  parameter cellstyle_e ST    = CELLSTYLE_FIG_8_16,
  parameter int         NRAND = 20000
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [W-1:0] a, b, sum;
  logic         cout;

  ling_ppa #(.WIDTH(W), .STYLE(ST)) dut (.a(a), .b(b), .sum(sum), .cout(cout));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r = '0;
    for (int i = 0; i < W; i += 32) r = W'({r, $urandom()});
    return r;
  endfunction

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] expect_v;
    a = x;
    b = y;
    #1;
    expect_v = {1'b0, x} + {1'b0, y};
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=%0d style=%0d: %h + %h gave cout=%b sum=%h, expected %h",
                 W, ST, x, y, cout, sum, expect_v);
    end
  endtask

  initial begin
    logic [W-1:0] x, m;
    checks = 0;
    failures = 0;
    done = 1'b0;
    if (W <= 8) begin
      for (int i = 0; i < (1 << W); i++)
        for (int j = 0; j < (1 << W); j++)
          apply(W'(i), W'(j));
    end else begin
      apply('0, '0);
      apply('1, '1);
      apply('1, W'(1));
      apply({(W/2){2'b01}}, {(W/2){2'b10}});
      for (int n = 0; n <= W; n++) begin
        x = (n == W) ? '1 : ((W'(1) << n) - W'(1));
        apply(x, W'(1));   // carry generated at bit 0 travels n bits
        apply(W'(1), x);
      end
      for (int i = 0; i < NRAND; i++) begin
        x = rnd();
        m = rnd() & rnd() & rnd();
        if (i % 2 == 0) apply(x, rnd());
        else            apply(x, ~x ^ m);  // mostly propagate, few generate/kill
      end
    end
    done = 1'b1;
  end
endmodule
