// tb_mult_top: end-to-end test of the top at its default parameters.
// Every 8x8 operand pair (65536) is applied to both 8-bit multipliers (the
// second one with the operands swapped) while the 4x4 multiplier runs
// through its 256 pairs alongside; all products are compared with a*b.
// It also counts how often the mechanisms of the compressor stages are
// exercised and fails if one never is:
//   - a carry-out of the last 8-2 compressor spills into column 10,
//   - a carry passes along the 8-2 chain (non-zero cin of columns 7..9),
//   - every cout bit of the 8-2 chain that can be 1 is seen at 1,
//   - the 4-2 chain passes a carry (non-zero cin of columns 3..5),
//   - the last 4-2 compressor's cout reaches column 6,
//   - the 4-2 rows of the 4-2 tree pass a carry from bit to bit,
//   - the product uses its top bit (p8[15], p4[7]).
module tb_mult_top;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8q, b8q;
  logic [15:0] p8q;
  int n_row = 0;
  int checks = 0, failures = 0;
  int n_spill8 = 0, n_chain8 = 0, n_spill4 = 0, n_chain4 = 0, n_top8 = 0, n_top4 = 0;
  logic [4:0] cout_seen [3:0];

  mult_top dut (.a8(a8), .b8(b8), .p8(p8), .a4(a4), .b4(b4), .p4(p4),
                .a8q(a8q), .b8q(b8q), .p8q(p8q));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) cout_seen[k] = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        a4 = 4'(i >> 4); b4 = 4'(j >> 4);
        a8q = 8'(j); b8q = 8'(i);
        #1;
        checks++;
        if (p8 != 16'(i * j)) begin
          failures++;
          if (failures < 20) $display("FAIL p8: %0d * %0d = %0d, got %0d", i, j, i * j, p8);
        end
        checks++;
        if (p4 != 8'(int'(a4) * int'(b4))) begin
          failures++;
          if (failures < 20) $display("FAIL p4: %0d * %0d, got %0d", a4, b4, p4);
        end
        checks++;
        if (p8q != 16'(i * j)) begin
          failures++;
          if (failures < 20) $display("FAIL p8q: %0d * %0d = %0d, got %0d", j, i, i * j, p8q);
        end
        if (dut.u_mult8_c42.u_l1a.link != '0 || dut.u_mult8_c42.u_l2.link != '0) n_row++;
        if (dut.u_mult8.chain[4] != '0) n_spill8++;
        if (dut.u_mult8.chain[1] != '0 || dut.u_mult8.chain[2] != '0 ||
            dut.u_mult8.chain[3] != '0) n_chain8++;
        for (int k = 0; k < 4; k++) cout_seen[k] |= dut.u_mult8.chain[k+1];
        if (dut.u_mult4.g_m3.chain[4]) n_spill4++;
        if (dut.u_mult4.g_m3.chain[3:1] != '0) n_chain4++;
        if (p8[15]) n_top8++;
        if (p4[7]) n_top4++;
      end
    end
    $display("8-2 chain carries: %0d, spills into column 10: %0d", n_chain8, n_spill8);
    $display("4-2 chain carries: %0d, spills into column 6: %0d", n_chain4, n_spill4);
    $display("4-2 tree row carries: %0d", n_row);
    $display("top product bit set: 8x8 %0d, 4x4 %0d", n_top8, n_top4);
    checks += 8;
    if (n_row == 0) begin failures++; $display("FAIL: 4-2 tree rows never carried"); end
    if (n_chain8 == 0) begin failures++; $display("FAIL: 8-2 chain never carried"); end
    if (n_spill8 == 0) begin failures++; $display("FAIL: 8-2 chain never spilled"); end
    // column 6 has seven bits and zero carry-ins, so its compressor can
    // only raise the carry-outs that do not depend on carry-ins (0..2)
    for (int k = 0; k < 4; k++)
      if ((k == 0 && cout_seen[k][2:0] != '1) || (k > 0 && cout_seen[k] != '1)) begin
        failures++;
        $display("FAIL: some cout of 8-2 compressor %0d never set (%b)", k, cout_seen[k]);
      end
    if (n_chain4 == 0) begin failures++; $display("FAIL: 4-2 chain never carried"); end
    if (n_spill4 == 0) begin failures++; $display("FAIL: 4-2 chain never spilled"); end
    if (n_top8 == 0)   begin failures++; $display("FAIL: p8[15] never set"); end
    if (n_top4 == 0)   begin failures++; $display("FAIL: p4[7] never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
