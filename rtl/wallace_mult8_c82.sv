// wallace_mult8_c82: 8x8 unsigned Wallace-tree multiplier whose reduction
// is done by four 8-2 adder compressors followed by a final-sum stage.
//
// 1. Partial products: pp(i,j) = a[j] & b[i] lands in column i+j, giving
//    column heights 1,2,3,4,5,6,7,8,7,6,5,4,3,2,1 (columns 0..14).
// 2. Compressor stage: the four tallest-central columns 6..9 (heights
//    7,8,7,6) each get one 8-2 compressor.  The compressors form a chain:
//    cout[k] of column c feeds cin[k] of column c+1; the carry-ins of
//    column 6 are zero.  Each compressor leaves its sum in its own column
//    and its carry in the next one.  The five carry-outs of column 9 move
//    into column 10.
// 3. Final sum: what is left (heights 1,2,3,4,5,6,1,2,2,2,11,4,3,2,1) is
//    added by final_sum (half and full adders).
//
// METHOD chooses the internal structure of the 8-2 compressors (all four
// use the same one); the default is the 7-2 + 3-2 structure, the fastest
// of the four in the design's own comparison.
//
// Interface: a, b (8-bit unsigned operands), p (16-bit product).
// Timing: purely combinational; p is valid one propagation delay after a
// and b change.  No clock or reset.
// Using four 8-2 compressors plus a half/full-adder final sum follows the
// design; which columns hold the compressors, and the final-sum circuit,
// are this implementation's choices.
module wallace_mult8_c82
  import mult_pkg::*;
#(
  parameter c82_method_e METHOD = C82_7_2_3_2
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  localparam int unsigned N        = 8;
  localparam int unsigned PCOLS    = 2 * N - 1;   // partial-product columns
  localparam int unsigned FIRST    = 6;           // first compressor column
  localparam int unsigned NCOMP    = 4;           // number of 8-2 compressors
  localparam int unsigned FS_MAXH  = 11;
  localparam int unsigned FS_H [2*N] = '{1, 2, 3, 4, 5, 6, 1, 2, 2, 2, 11, 4, 3, 2, 1, 0};

  // Partial products, gathered per column (bit k of column c = k-th product
  // in that column, counted from the lowest row b[i]).
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

  // Compressor chain on columns FIRST .. FIRST+NCOMP-1.
  logic [NCOMP:0][C82_NCARRY-1:0] chain;
  logic [NCOMP-1:0]               c_sum, c_carry;

  assign chain[0] = '0;

  for (genvar k = 0; k < NCOMP; k++) begin : g_c82
    compressor_8_2 #(.METHOD(METHOD)) u_c82 (
      .x    (ppcol[FIRST+k]),
      .cin  (chain[k]),
      .sum  (c_sum[k]),
      .carry(c_carry[k]),
      .cout (chain[k+1])
    );
  end

  // Bit matrix handed to the final-sum stage.
  logic [2*N-1:0][FS_MAXH-1:0] fs_col;

  always_comb begin
    fs_col = '0;
    for (int c = 0; c < PCOLS; c++)
      if (c < FIRST || c > FIRST + NCOMP - 1)
        fs_col[c][N-1:0] = ppcol[c];
    for (int k = 0; k < NCOMP; k++) begin
      fs_col[FIRST+k][0] = c_sum[k];
      if (k > 0) fs_col[FIRST+k][1] = c_carry[k-1];
    end
    // column 10: its 5 partial products, the last carry and 5 carry-outs
    fs_col[FIRST+NCOMP][5]    = c_carry[NCOMP-1];
    fs_col[FIRST+NCOMP][10:6] = chain[NCOMP];
  end

  final_sum #(.W(2*N), .MAXH(FS_MAXH), .HEIGHTS(FS_H)) u_fs (
    .col(fs_col),
    .sum(p)
  );

endmodule
