// compressor_5_2: 5-2 adder compressor with two carry-ins.
//
// Adds five bits of one column and two carries from the column below:
//   x[0]+...+x[4] + cin[0] + cin[1] = sum + 2*(cout[0] + cout[1] + carry).
// It is a cascade of three 3-2 compressors (mux-based full adders):
//   stage 1: x[0], x[1], x[2]      -> s1, cout[0]
//   stage 2: s1,   x[3], x[4]      -> s2, cout[1]
//   stage 3: s2,   cin[0], cin[1]  -> sum, carry
// Both carry-outs depend on x only, so chaining cout -> cin of the next
// column does not ripple.  The path through the three stages is six XOR
// gates long, as the design specifies for this compressor.
//
// Interface: x (5 bits of weight 1), cin (2 bits of weight 1), sum
// (weight 1), carry and cout (weight 2).  Combinational, no clock.
// The three-stage cascade is this implementation's choice; the design gives
// the input/output counts, the sum equation and the six-XOR delay.
module compressor_5_2 (
  input  logic [4:0] x,
  input  logic [1:0] cin,
  output logic       sum,
  output logic       carry,
  output logic [1:0] cout
);

  logic s1, s2;

  compressor_3_2 u_st1 (.a(x[0]), .b(x[1]),   .c(x[2]),   .sum(s1),  .carry(cout[0]));
  compressor_3_2 u_st2 (.a(s1),   .b(x[3]),   .c(x[4]),   .sum(s2),  .carry(cout[1]));
  compressor_3_2 u_st3 (.a(s2),   .b(cin[0]), .c(cin[1]), .sum(sum), .carry(carry));

endmodule
