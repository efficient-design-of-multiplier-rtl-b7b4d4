// full_adder: a + b + ci = sum + 2*co, in the usual AND/OR form (the
// "normal" full adder of the final-sum stage, as opposed to the mux-based
// compressor_3_2).  Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);

  always_comb begin
    sum = a ^ b ^ ci;
    co  = (a & b) | (ci & (a ^ b));
  end

endmodule
