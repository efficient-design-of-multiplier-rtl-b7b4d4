// tb_compressor_4_2: exhaustive check of the 4-2 compressor.
// For all 32 input patterns: x0+x1+x2+x3+cin = sum + 2*(cout+carry).
// Also checks the property the chaining relies on: cout does not change
// when only cin changes.
module tb_compressor_4_2;
  logic [3:0] x;
  logic       cin, sum, carry, cout, cout_cin0;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        x = 4'(v); cin = 1'(ci);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(cout) + int'(carry)) != $countones(x) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%0d carry=%0d cout=%0d", x, cin, sum, carry, cout);
        end
        if (ci == 0) cout_cin0 = cout;
        else begin
          checks++;
          if (cout != cout_cin0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
