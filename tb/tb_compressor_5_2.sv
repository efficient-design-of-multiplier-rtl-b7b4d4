// tb_compressor_5_2: exhaustive check of the 5-2 compressor.
// For all 128 input patterns: sum of inputs = sum + 2*(cout0+cout1+carry),
// and the carry-outs do not depend on the carry-ins.
module tb_compressor_5_2;
  logic [4:0] x;
  logic [1:0] cin, cout, cout_ref;
  logic       sum, carry;
  int checks = 0, failures = 0;

  compressor_5_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int ci = 0; ci < 4; ci++) begin
        x = 5'(v); cin = 2'(ci);
        #1;
        checks++;
        if (int'(sum) + 2 * ($countones(cout) + int'(carry)) != $countones(x) + $countones(cin)) begin
          failures++;
          $display("FAIL x=%b cin=%b -> sum=%0d carry=%0d cout=%b", x, cin, sum, carry, cout);
        end
        if (ci == 0) cout_ref = cout;
        else begin
          checks++;
          if (cout != cout_ref) begin
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
