// tb_csa_row_4_2: random check of a 16-bit row of 4-2 compressors:
// in0+in1+in2+in3 must equal sum+carry modulo 2^16, carry[0] must be 0, and
// the row must also hold for the all-ones operands.
module tb_csa_row_4_2;
  localparam int unsigned W = 16;
  localparam int NVEC = 20000;

  logic [W-1:0] in0, in1, in2, in3, sum, carry;
  int checks = 0, failures = 0;

  csa_row_4_2 #(.W(W)) dut (.in0(in0), .in1(in1), .in2(in2), .in3(in3),
                            .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NVEC; v++) begin
      in0 = W'($urandom); in1 = W'($urandom); in2 = W'($urandom); in3 = W'($urandom);
      if (v == 0) {in0, in1, in2, in3} = '1;
      #1;
      checks++;
      if (W'(sum + carry) != W'(in0 + in1 + in2 + in3) || carry[0] != 1'b0) begin
        failures++;
        if (failures < 20)
          $display("FAIL %h+%h+%h+%h: sum=%h carry=%h", in0, in1, in2, in3, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
