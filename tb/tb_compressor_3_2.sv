// tb_compressor_3_2: exhaustive check of the 3-2 compressor.
// All 8 input patterns; sum must be the parity and carry the majority of the
// three inputs (so that a+b+c = sum + 2*carry).
module tb_compressor_3_2;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  compressor_3_2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> carry=%0d sum=%0d", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
