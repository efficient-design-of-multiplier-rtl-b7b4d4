// tb_compressor_8_2: exhaustive check of all four 8-2 compressor structures.
// For every one of the 2^13 input patterns and each structure:
//   x0+...+x7 + cin0+...+cin4 = sum + 2*(cout0+...+cout4 + carry),
// and for each k, cout[k] must not change when only cin[k..4] change
// (the no-ripple property a chain of compressors relies on).
module tb_compressor_8_2;
  import mult_pkg::*;

  localparam int NM = 4;
  localparam c82_method_e METHODS [NM] = '{C82_ONLY_4_2, C82_5_2_4_2_3_2,
                                          C82_4_2_3_2, C82_7_2_3_2};

  logic [7:0]            x;
  logic [C82_NCARRY-1:0] cin;
  logic [NM-1:0]         sum, carry;
  logic [C82_NCARRY-1:0] cout [NM];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < NM; m++) begin : g_dut
    compressor_8_2 #(.METHOD(METHODS[m])) dut (
      .x(x), .cin(cin), .sum(sum[m]), .carry(carry[m]), .cout(cout[m]));
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [C82_NCARRY-1:0] ref_cout [NM];

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int ci = 0; ci < 32; ci++) begin
        x = 8'(v); cin = 5'(ci);
        #1;
        for (int m = 0; m < NM; m++) begin
          checks++;
          if (int'(sum[m]) + 2 * ($countones(cout[m]) + int'(carry[m])) !=
              $countones(x) + $countones(cin)) begin
            failures++;
            $display("FAIL method %0d x=%b cin=%b -> sum=%0d carry=%0d cout=%b",
                     m + 1, x, cin, sum[m], carry[m], cout[m]);
          end
        end
      end
      // no-ripple property: cout[k] with cin[k..4] swept, cin[k-1:0] fixed
      for (int k = 0; k < C82_NCARRY; k++) begin
        for (int lo = 0; lo < (1 << k); lo++) begin
          for (int hi = 0; hi < (1 << (C82_NCARRY - k)); hi++) begin
            x = 8'(v); cin = 5'((hi << k) | lo);
            #1;
            for (int m = 0; m < NM; m++) begin
              if (hi == 0) ref_cout[m] = cout[m];
              else begin
                checks++;
                if (cout[m][k] != ref_cout[m][k]) begin
                  failures++;
                  $display("FAIL method %0d: cout[%0d] depends on cin[%0d..4] (x=%b)",
                           m + 1, k, k, x);
                end
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
