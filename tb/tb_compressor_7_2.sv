// tb_compressor_7_2: exhaustive check of the 7-2 compressor.
// For all 128 input patterns: x0+...+x6 = sum + 2*(cout0+cout1+carry).
module tb_compressor_7_2;
  logic [6:0] x;
  logic [1:0] cout;
  logic       sum, carry;
  int checks = 0, failures = 0;

  compressor_7_2 dut (.x(x), .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      x = 7'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * ($countones(cout) + int'(carry)) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b -> sum=%0d carry=%0d cout=%b", x, sum, carry, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
