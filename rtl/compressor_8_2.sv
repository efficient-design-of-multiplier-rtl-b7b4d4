// compressor_8_2: 8-2 adder compressor, built from smaller compressors.
//
// Adds eight bits of one column and five carries from the column below:
//   x[0]+...+x[7] + cin[0]+...+cin[4]
//       = sum + 2*(cout[0]+...+cout[4] + carry).
// In a multiplier a row of these sits on neighbouring columns with
// cout[k] of column i wired to cin[k] of column i+1.  sum stays in column i,
// carry moves to column i+1 of the final-sum stage.
//
// METHOD selects one of the four structures (mult_pkg::c82_method_e):
//   C82_ONLY_4_2    : A=4-2(x0..x3,cin0), B=4-2(x4..x7,cin1),
//                     C=4-2(sA,sB,cin2,cin3 ; cin4)
//   C82_5_2_4_2_3_2 : 5-2(x0..x4 ; cin0,cin1), 4-2(x5,x6,x7,s5 ; cin2),
//                     3-2(s4,cin3,cin4)
//   C82_4_2_3_2     : A=4-2(x0..x3,cin0), B=4-2(x4..x7,cin1),
//                     3-2(sA,sB,cin2), 3-2(s,cin3,cin4)
//   C82_7_2_3_2     : 7-2(x0..x6), 3-2(s7,x7,cin0), 3-2(s,cin1,cin2),
//                     3-2(s,cin3,cin4)
// In every structure the carry-outs are numbered so that cout[k] depends on
// no cin[j] with j >= k.  As cin[j] of one column is cout[j] of the column
// below, carries never ripple along a chain: the depth of a chain of these
// compressors is bounded, whatever its length.
//
// Interface: x (8 bits, weight 1), cin (5 bits, weight 1), sum (weight 1),
// carry and cout (weight 2).  Combinational, no clock.
// The four building-block mixes and the sum equation follow the design; the
// way the blocks are wired together in each mix is this implementation's
// choice.
module compressor_8_2
  import mult_pkg::*;
#(
  parameter c82_method_e METHOD = C82_7_2_3_2
) (
  input  logic [7:0]            x,
  input  logic [C82_NCARRY-1:0] cin,
  output logic                  sum,
  output logic                  carry,
  output logic [C82_NCARRY-1:0] cout
);

  generate
    if (METHOD == C82_ONLY_4_2) begin : g_m1
      logic s_a, s_b;
      compressor_4_2 u_a (.x(x[3:0]), .cin(cin[0]), .sum(s_a), .carry(cout[2]), .cout(cout[0]));
      compressor_4_2 u_b (.x(x[7:4]), .cin(cin[1]), .sum(s_b), .carry(cout[3]), .cout(cout[1]));
      compressor_4_2 u_c (.x({cin[3], cin[2], s_b, s_a}), .cin(cin[4]),
                          .sum(sum), .carry(carry), .cout(cout[4]));
    end else if (METHOD == C82_5_2_4_2_3_2) begin : g_m2
      logic s5, s4;
      compressor_5_2 u_c52 (.x(x[4:0]), .cin(cin[1:0]), .sum(s5), .carry(cout[3]),
                            .cout(cout[1:0]));
      compressor_4_2 u_c42 (.x({s5, x[7:5]}), .cin(cin[2]), .sum(s4), .carry(cout[4]),
                            .cout(cout[2]));
      compressor_3_2 u_c32 (.a(s4), .b(cin[3]), .c(cin[4]), .sum(sum), .carry(carry));
    end else if (METHOD == C82_4_2_3_2) begin : g_m3
      logic s_a, s_b, s_m;
      compressor_4_2 u_a  (.x(x[3:0]), .cin(cin[0]), .sum(s_a), .carry(cout[2]), .cout(cout[0]));
      compressor_4_2 u_b  (.x(x[7:4]), .cin(cin[1]), .sum(s_b), .carry(cout[3]), .cout(cout[1]));
      compressor_3_2 u_m  (.a(s_a), .b(s_b), .c(cin[2]), .sum(s_m), .carry(cout[4]));
      compressor_3_2 u_o  (.a(s_m), .b(cin[3]), .c(cin[4]), .sum(sum), .carry(carry));
    end else begin : g_m4
      logic s7, s_a, s_b;
      compressor_7_2 u_c72 (.x(x[6:0]), .sum(s7), .carry(cout[2]), .cout(cout[1:0]));
      compressor_3_2 u_a   (.a(s7),  .b(x[7]),   .c(cin[0]), .sum(s_a), .carry(cout[3]));
      compressor_3_2 u_b   (.a(s_a), .b(cin[1]), .c(cin[2]), .sum(s_b), .carry(cout[4]));
      compressor_3_2 u_o   (.a(s_b), .b(cin[3]), .c(cin[4]), .sum(sum), .carry(carry));
    end
  endgenerate

endmodule
