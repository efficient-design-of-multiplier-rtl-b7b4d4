// compressor_4_2: 4-2 adder compressor with a carry-in.
//
// Adds four bits of one column plus a carry-in from the column below:
//   x[0] + x[1] + x[2] + x[3] + cin = sum + 2*(cout + carry).
// cout depends only on x[0..2], never on cin, so a row of these compressors
// chained cout -> cin does not ripple: every cout is ready after one XOR and
// one multiplexer.  The sum uses three XOR levels ((x0^x1)^(x2^x3))^cin,
// which is the critical path.  Both carries are multiplexer outputs:
//   cout  = (x0^x1) ? x2  : x0
//   carry = (x0^x1^x2^x3) ? cin : x3
//
// Interface: x (4 bits of weight 1), cin (weight 1), sum (weight 1),
// carry and cout (weight 2).  Combinational, no clock.
// The five-input / three-output form, the cin-independent cout and the
// three-XOR critical path follow the design; the exact multiplexer equations
// are the standard mux-based form chosen here.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  logic p01, p23, p;

  always_comb begin
    p01   = x[0] ^ x[1];
    p23   = x[2] ^ x[3];
    p     = p01 ^ p23;
    sum   = p ^ cin;
    cout  = p01 ? x[2] : x[0];
    carry = p ? cin : x[3];
  end

endmodule
