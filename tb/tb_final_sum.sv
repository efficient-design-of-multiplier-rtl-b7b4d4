// tb_final_sum: random check of the final-sum stage in two shapes.
//  - dut_s: 8 columns of uneven heights (up to 5 bits), one tall column
//    that needs several Wallace rounds;
//  - dut_t: 16 columns of 13 bits each, a matrix whose total overflows 16
//    bits, so the result is checked modulo 2^16.
// Bits above a column's height are driven randomly and must be ignored.
// The reference adds the valid bits with integer arithmetic.
module tb_final_sum;
  localparam int unsigned WS = 8,  HS = 5;
  localparam int unsigned WT = 16, HT = 13;
  localparam int unsigned HEIGHTS_S [WS] = '{3, 5, 1, 4, 2, 5, 3, 1};
  localparam int unsigned HEIGHTS_T [WT] = '{default: 13};
  localparam int NVEC = 20000;

  logic [WS-1:0][HS-1:0] col_s;
  logic [WT-1:0][HT-1:0] col_t;
  logic [WS-1:0]         sum_s;
  logic [WT-1:0]         sum_t;
  int checks = 0, failures = 0;

  final_sum #(.W(WS), .MAXH(HS), .HEIGHTS(HEIGHTS_S)) dut_s (.col(col_s), .sum(sum_s));
  final_sum #(.W(WT), .MAXH(HT), .HEIGHTS(HEIGHTS_T)) dut_t (.col(col_t), .sum(sum_t));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_s, ref_t;

  initial begin
    for (int v = 0; v < NVEC; v++) begin
      for (int c = 0; c < WS; c++) col_s[c] = HS'($urandom);
      for (int c = 0; c < WT; c++) col_t[c] = HT'($urandom);
      if (v == 0) begin col_s = '1; col_t = '1; end
      if (v == 1) begin col_s = '0; col_t = '0; end
      #1;
      ref_s = 0;
      for (int c = 0; c < WS; c++)
        for (int k = 0; k < int'(HEIGHTS_S[c]); k++)
          ref_s += longint'(col_s[c][k]) << c;
      ref_t = 0;
      for (int c = 0; c < WT; c++)
        for (int k = 0; k < int'(HEIGHTS_T[c]); k++)
          ref_t += longint'(col_t[c][k]) << c;
      checks += 2;
      if (sum_s != WS'(ref_s)) begin
        failures++;
        $display("FAIL small: got %0d expected %0d", sum_s, WS'(ref_s));
      end
      if (sum_t != WT'(ref_t)) begin
        failures++;
        $display("FAIL tall: got %0d expected %0d", sum_t, WT'(ref_t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
