// mult_top: the compressor-based multipliers side by side.
//
// - u_mult8: 8x8 multiplier reducing its partial products with four chained
//   8-2 adder compressors, then a final sum of half and full adders.
// - u_mult4: 4x4 multiplier with a stage of 4-2 adder compressors, then a
//   final sum of half and full adders.
// - u_mult8_c42: 8x8 multiplier reducing its eight partial-product rows with
//   a two-level tree of 4-2 compressor rows.
// The three are independent: each has its own operands and product.
//
// Interface: a8, b8 -> p8 = a8*b8 (16 bits); a4, b4 -> p4 = a4*b4 (8 bits);
// a8q, b8q -> p8q = a8q*b8q (16 bits); all unsigned.  METHOD8 picks the 8-2
// compressor structure of u_mult8 (mult_pkg::c82_method_e), METHOD4 the
// reduction arrangement of u_mult4 (3 or 1).
// Timing: purely combinational, no clock or reset.
module mult_top
  import mult_pkg::*;
#(
  parameter c82_method_e METHOD8 = C82_7_2_3_2,
  parameter int unsigned METHOD4 = 3
) (
  input  logic [7:0]  a8,
  input  logic [7:0]  b8,
  output logic [15:0] p8,
  input  logic [3:0]  a4,
  input  logic [3:0]  b4,
  output logic [7:0]  p4,
  input  logic [7:0]  a8q,
  input  logic [7:0]  b8q,
  output logic [15:0] p8q
);

  wallace_mult8_c82 #(.METHOD(METHOD8)) u_mult8 (.a(a8), .b(b8), .p(p8));
  wallace_mult4_c42 #(.METHOD(METHOD4)) u_mult4 (.a(a4), .b(b4), .p(p4));
  wallace_mult8_c42                     u_mult8_c42 (.a(a8q), .b(b8q), .p(p8q));

endmodule
