// wallace_mult4_c42: 4x4 unsigned Wallace-tree multiplier whose reduction
// uses 4-2 adder compressors, followed by a final-sum stage.
//
// Partial products pp(i,j) = a[j] & b[i] land in column i+j; column
// heights are 1,2,3,4,3,2,1 (columns 0..6).  METHOD selects one of two
// reduction arrangements:
//
//   METHOD = 3 (default): a first stage of only 4-2 compressors.  One 4-2
//     compressor on each of columns 2..5 (unused inputs tied to 0), chained
//     cout -> cin from column 2 (cin = 0) to column 5, whose cout goes to
//     column 6.  Each leaves its sum in its own column and its carry in the
//     next.  Remaining heights: 1,2,1,2,2,2,3,0.
//   METHOD = 1: a mixed stage of full adders and one 4-2 compressor: a full
//     adder on the three bits of column 2, a 4-2 compressor (cin = 0) on
//     the four bits of column 3, a full adder on the three bits of column 4.
//     Remaining heights: 1,2,1,2,3,3,1,0.
//
// In both cases final_sum adds what is left with half and full adders
// (Wallace rounds, then a ripple-carry adder).
//
// Interface: a, b (4-bit unsigned operands), p (8-bit product).
// Timing: purely combinational, no clock or reset.
// The two arrangements (only 4-2 compressors in the first stage; half/full
// adders mixed with 4-2 compressors) and a final sum of normal adders follow
// the design; which columns get which block is this implementation's choice.
module wallace_mult4_c42 #(
  parameter int unsigned METHOD = 3
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  localparam int unsigned N       = 4;
  localparam int unsigned PCOLS   = 2 * N - 1;
  localparam int unsigned FS_MAXH = 3;

  logic [PCOLS-1:0][N-1:0] ppcol;

  always_comb begin
    ppcol = '0;
    for (int c = 0; c < PCOLS; c++) begin
      int unsigned n;
      n = 0;
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N) begin
          ppcol[c][n] = a[c-i] & b[i];
          n++;
        end
    end
  end

  logic [2*N-1:0][FS_MAXH-1:0] fs_col;

  if (METHOD == 1) begin : g_m1
    localparam int unsigned FS_H [2*N] = '{1, 2, 1, 2, 3, 3, 1, 0};
    logic s2, c2, s3, cy3, co3, s4, c4;

    compressor_3_2 u_fa2 (.a(ppcol[2][0]), .b(ppcol[2][1]), .c(ppcol[2][2]),
                          .sum(s2), .carry(c2));
    compressor_4_2 u_c42 (.x(ppcol[3]), .cin(1'b0), .sum(s3), .carry(cy3), .cout(co3));
    compressor_3_2 u_fa4 (.a(ppcol[4][0]), .b(ppcol[4][1]), .c(ppcol[4][2]),
                          .sum(s4), .carry(c4));

    always_comb begin
      fs_col = '0;
      fs_col[0][0]   = ppcol[0][0];
      fs_col[1][1:0] = ppcol[1][1:0];
      fs_col[2][0]   = s2;
      fs_col[3][1:0] = {c2, s3};
      fs_col[4][2:0] = {co3, cy3, s4};
      fs_col[5][2:0] = {c4, ppcol[5][1:0]};
      fs_col[6][0]   = ppcol[6][0];
    end

    final_sum #(.W(2*N), .MAXH(FS_MAXH), .HEIGHTS(FS_H)) u_fs (.col(fs_col), .sum(p));
  end else begin : g_m3
    localparam int unsigned FIRST = 2;
    localparam int unsigned NCOMP = 4;
    localparam int unsigned FS_H [2*N] = '{1, 2, 1, 2, 2, 2, 3, 0};
    logic [NCOMP:0]   chain;
    logic [NCOMP-1:0] c_sum, c_carry;

    assign chain[0] = 1'b0;

    for (genvar k = 0; k < NCOMP; k++) begin : g_c42
      compressor_4_2 u_c42 (
        .x    (ppcol[FIRST+k]),
        .cin  (chain[k]),
        .sum  (c_sum[k]),
        .carry(c_carry[k]),
        .cout (chain[k+1])
      );
    end

    always_comb begin
      fs_col = '0;
      fs_col[0][0]   = ppcol[0][0];
      fs_col[1][1:0] = ppcol[1][1:0];
      for (int k = 0; k < NCOMP; k++) begin
        fs_col[FIRST+k][0] = c_sum[k];
        if (k > 0) fs_col[FIRST+k][1] = c_carry[k-1];
      end
      fs_col[6][0] = ppcol[6][0];
      fs_col[6][1] = c_carry[NCOMP-1];
      fs_col[6][2] = chain[NCOMP];
    end

    final_sum #(.W(2*N), .MAXH(FS_MAXH), .HEIGHTS(FS_H)) u_fs (.col(fs_col), .sum(p));
  end

endmodule
