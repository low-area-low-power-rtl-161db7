// tb_ling_ppa_top: end-to-end testbench of ling_ppa_top at its default
// parameters. The 8-, 16- and 32-bit adders are driven at the same time with
// directed and random operands, and each {cout, sum} is compared with a + b.
// Besides the sums it tracks, per adder, how often each carry mechanism
// occurred and counts a failure for any that never did:
//   - carry out of the top bit,
//   - a carry generated at bit 0 that propagates through every bit to cout,
//   - a carry killed (a column with neither operand bit set stopping a carry),
//   - every column's real carry seen both 0 and 1, so each column's final
//     cell (real-carry hexagon or AND cell) is exercised in both directions.
// The adders are combinational: results are sampled 1 time unit after the
// operands change.
module tb_ling_ppa_top;
  localparam int NRAND = 30000;
  localparam int NADD = 3;
  localparam int ADD_W [NADD] = '{8, 16, 32};

  logic [7:0]  a8,  b8,  sum8;
  logic [15:0] a16, b16, sum16;
  logic [31:0] a32, b32, sum32;
  logic cout8, cout16, cout32;

  int checks = 0;
  int failures = 0;
  int n_cout [NADD];
  int n_full_chain [NADD];
  int n_kill [NADD];
  logic [31:0] seen_c1 [NADD];
  logic [31:0] seen_c0 [NADD];

  ling_ppa_top dut (
    .a8(a8),   .b8(b8),   .sum8(sum8),   .cout8(cout8),
    .a16(a16), .b16(b16), .sum16(sum16), .cout16(cout16),
    .a32(a32), .b32(b32), .sum32(sum32), .cout32(cout32)
  );

  // Check one adder. Operands and result are zero-extended to 32 bits.
  task automatic check(input int k, input logic [31:0] x, input logic [31:0] y,
                       input logic [31:0] s, input logic co);
    int w = ADD_W[k];
    logic [32:0] full = {1'b0, x} + {1'b0, y};
    logic [31:0] mask = (w == 32) ? '1 : ((32'd1 << w) - 32'd1);
    logic [31:0] sref = full[31:0] & mask;
    logic        coref = full[w];
    logic [31:0] carries;   // carries[i] = carry out of bit i
    logic [31:0] gen = x & y;
    logic [31:0] prop = x | y;
    checks++;
    if (s !== sref || co !== coref) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d-bit: %h + %h gave cout=%b sum=%h, expected cout=%b sum=%h",
                 w, x, y, co, s, coref, sref);
    end
    carries = ((x ^ y ^ full[31:0]) >> 1) & mask;
    carries[w-1] = coref;
    seen_c1[k] |= carries;
    seen_c0[k] |= ~carries & mask;
    if (coref) n_cout[k]++;
    if (gen[0] && ((prop & mask) == mask) && ((gen & mask) == 32'd1)) n_full_chain[k]++;
    if (((carries << 1) & ~prop & mask) != 0) n_kill[k]++;
  endtask

  task automatic drive(input logic [31:0] x, input logic [31:0] y);
    a8 = x[7:0];   b8 = y[7:0];
    a16 = x[15:0]; b16 = y[15:0];
    a32 = x;       b32 = y;
    #1;
    check(0, {24'd0, a8},  {24'd0, b8},  {24'd0, sum8},  cout8);
    check(1, {16'd0, a16}, {16'd0, b16}, {16'd0, sum16}, cout16);
    check(2, a32, b32, sum32, cout32);
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, m;
    for (int k = 0; k < NADD; k++) begin
      n_cout[k] = 0; n_full_chain[k] = 0; n_kill[k] = 0;
      seen_c1[k] = '0; seen_c0[k] = '0;
    end
    drive('0, '0);
    drive('1, '1);
    // Carry from bit 0 through n propagating bits, for every n.
    for (int n = 0; n <= 32; n++) begin
      x = (n == 32) ? '1 : ((32'd1 << n) - 32'd1);
      drive(x, 32'd1);
      drive(32'd1, x);
    end
    for (int i = 0; i < NRAND; i++) begin
      x = $urandom();
      m = $urandom() & $urandom() & $urandom();
      if (i % 2 == 0) drive(x, $urandom());
      else            drive(x, ~x ^ m);
    end
    for (int k = 0; k < NADD; k++) begin
      int w;
      logic [31:0] mask;
      w = ADD_W[k];
      mask = (w == 32) ? '1 : ((32'd1 << w) - 32'd1);
      $display("%0d-bit adder: carry out %0d times, full-width carry chain %0d times, carry killed %0d times",
               w, n_cout[k], n_full_chain[k], n_kill[k]);
      checks++;
      if (n_cout[k] == 0 || n_full_chain[k] == 0 || n_kill[k] == 0) begin
        failures++;
        $display("FAIL %0d-bit adder: a carry mechanism never occurred", w);
      end
      checks++;
      if (seen_c1[k] != mask || seen_c0[k] != mask) begin
        failures++;
        $display("FAIL %0d-bit adder: column carries seen as 1: %h, as 0: %h", w, seen_c1[k], seen_c0[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
