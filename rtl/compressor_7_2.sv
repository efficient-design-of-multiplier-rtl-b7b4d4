// compressor_7_2: 7-2 adder compressor.
//
// Reduces seven bits of one column to one bit of the same weight and three
// bits of the next weight:
//   x[0]+...+x[6] = sum + 2*(cout[0] + cout[1] + carry).
// Seven bits need at most three bits of result (0..7), so the block has no
// carry-in; its two carry-outs are absorbed by the carry-ins of the 8-2
// compressor of the next column when it is used inside compressor_8_2.
// Structure: two 3-2 compressors on x[0..2] and x[3..5] in parallel give
// cout[0] and cout[1]; a third adds their sums to x[6] and gives sum and
// carry.  The critical path is two 3-2 stages (four XOR gates).
//
// Interface: x (7 bits of weight 1), sum (weight 1), carry and cout
// (weight 2).  Combinational, no clock.
// The output set and its sum equation follow the design; the internal
// structure is this implementation's choice.
module compressor_7_2 (
  input  logic [6:0] x,
  output logic       sum,
  output logic       carry,
  output logic [1:0] cout
);

  logic s1, s2;

  compressor_3_2 u_lo  (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s1),  .carry(cout[0]));
  compressor_3_2 u_hi  (.a(x[3]), .b(x[4]), .c(x[5]), .sum(s2),  .carry(cout[1]));
  compressor_3_2 u_out (.a(s1),   .b(s2),   .c(x[6]), .sum(sum), .carry(carry));

endmodule
