// tb_wallace_mult8_c42: exhaustive check of the 8x8 multiplier built as a
// tree of 4-2 compressor rows: all 65536 operand pairs compared with a*b.
module tb_wallace_mult8_c42;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  wallace_mult8_c42 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures < 20) $display("FAIL %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
