// compressor_3_2: 3-2 adder compressor, also used as a mux-based full adder.
//
// Adds three bits of equal weight: a + b + c = sum + 2*carry.  The sum is
// formed with two XOR gates in series, which is the whole critical path; the
// carry is taken by a 2:1 multiplexer steered by a^b: when a and b differ the
// carry equals c, otherwise it equals a (= b).  When c is fed from a lower
// bit position the block behaves as an ordinary full adder.
//
// Interface: three single-bit inputs, sum (weight 1) and carry (weight 2).
// Timing: purely combinational, no clock.
// The XOR/multiplexer split follows the design's description of its
// compressors (XOR and MUX based, two XOR delays); the gate-level form is
// otherwise this implementation's choice.
module compressor_3_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic p;

  always_comb begin
    p     = a ^ b;
    sum   = p ^ c;
    carry = p ? c : a;
  end

endmodule
