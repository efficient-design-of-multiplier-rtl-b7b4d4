// csa_row_4_2: a row of 4-2 compressors that adds four W-bit operands in
// carry-save form, returning two W-bit operands with the same sum modulo
// 2^W: in0 + in1 + in2 + in3 = sum + carry (mod 2^W).
//
// Bit i holds one compressor_4_2 on in0[i]..in3[i].  Its cout feeds the cin
// of bit i+1 (bit 0 gets cin = 0); because a 4-2 compressor's cout does not
// depend on its cin, the row has no carry ripple.  sum[i] is the
// compressor's sum, carry[i+1] its carry output; carry[0] is 0.  Carries out
// of bit W-1 are dropped.
//
// Interface: in0..in3 (W bits each), sum, carry (W bits each).
// Combinational.  Used by the 8x8 tree of 4-2 compressors
// (wallace_mult8_c42); the row organisation is this implementation's choice.
module csa_row_4_2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W:0] link;
  logic [W:0] cy;

  assign link[0] = 1'b0;
  assign cy[0]   = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    compressor_4_2 u_c42 (
      .x    ({in3[i], in2[i], in1[i], in0[i]}),
      .cin  (link[i]),
      .sum  (sum[i]),
      .carry(cy[i+1]),
      .cout (link[i+1])
    );
  end

  assign carry = cy[W-1:0];

  // The carries leaving bit W-1 have weight 2^W and are dropped.
  logic unused_top;
  assign unused_top = link[W] ^ cy[W];

endmodule
