// tb_wallace_mult4_c42: exhaustive check of the 4x4 multiplier in both
// reduction arrangements (METHOD 3, the default, and METHOD 1): all 256
// operand pairs compared with a*b.
module tb_wallace_mult4_c42;
  logic [3:0] a, b;
  logic [7:0] p, p1;
  int checks = 0, failures = 0;

  wallace_mult4_c42                dut    (.a(a), .b(b), .p(p));
  wallace_mult4_c42 #(.METHOD(1))  dut_m1 (.a(a), .b(b), .p(p1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL method 3: %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
        checks++;
        if (p1 != 8'(i * j)) begin
          failures++;
          $display("FAIL method 1: %0d * %0d = %0d, got %0d", i, j, i * j, p1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
