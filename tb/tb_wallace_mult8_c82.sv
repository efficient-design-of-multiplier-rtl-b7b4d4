// tb_wallace_mult8_c82: exhaustive check of the 8x8 multiplier, built once
// with each of the four 8-2 compressor structures.  All 65536 operand pairs
// are applied to the four copies and compared with a*b.
module tb_wallace_mult8_c82;
  import mult_pkg::*;

  localparam int NM = 4;
  localparam c82_method_e METHODS [NM] = '{C82_ONLY_4_2, C82_5_2_4_2_3_2,
                                          C82_4_2_3_2, C82_7_2_3_2};

  logic [7:0]  a, b;
  logic [15:0] p [NM];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < NM; m++) begin : g_dut
    wallace_mult8_c82 #(.METHOD(METHODS[m])) dut (.a(a), .b(b), .p(p[m]));
  end

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
        for (int m = 0; m < NM; m++) begin
          checks++;
          if (p[m] != 16'(i * j)) begin
            failures++;
            if (failures < 20)
              $display("FAIL method %0d: %0d * %0d = %0d, got %0d", m + 1, i, j, i * j, p[m]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
