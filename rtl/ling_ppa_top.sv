// ling_ppa_top: the three modified-Ling parallel prefix adders of the design,
// 8, 16 and 32 bits wide, side by side with independent ports.
// Each adder is a ling_ppa with its own width and the cell placement drawn for
// that width (ling_pkg::default_style). The adders share nothing.
// Timing: all outputs are combinational functions of the inputs of the same
// adder; there is no clock.
module ling_ppa_top (
  input  logic [7:0]  a8,
  input  logic [7:0]  b8,
  output logic [7:0]  sum8,
  output logic        cout8,
  input  logic [15:0] a16,
  input  logic [15:0] b16,
  output logic [15:0] sum16,
  output logic        cout16,
  input  logic [31:0] a32,
  input  logic [31:0] b32,
  output logic [31:0] sum32,
  output logic        cout32
);
  ling_ppa #(.WIDTH(8))  u_add8  (.a(a8),  .b(b8),  .sum(sum8),  .cout(cout8));
  ling_ppa #(.WIDTH(16)) u_add16 (.a(a16), .b(b16), .sum(sum16), .cout(cout16));
  ling_ppa #(.WIDTH(32)) u_add32 (.a(a32), .b(b32), .sum(sum32), .cout(cout32));
endmodule
