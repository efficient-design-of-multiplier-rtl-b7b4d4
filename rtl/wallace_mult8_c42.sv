// wallace_mult8_c42: 8x8 unsigned Wallace-tree multiplier whose partial
// products are reduced by a tree of 4-2 adder compressors.
//
// The eight partial-product rows (row i = (a & {8{b[i]}}) << i, 16 bits)
// are reduced in two levels of 4-2 compressor rows (csa_row_4_2):
//   level 1: rows 0..3 -> (s0, c0), rows 4..7 -> (s1, c1)
//   level 2: s0, c0, s1, c1 -> (s2, c2)
// and the last two rows are added by final_sum (a ripple-carry adder of
// half and full adders).  Every level halves the number of rows, so the
// reduction depth is two 4-2 compressor delays (six XOR levels) against four
// full-adder levels of a conventional Wallace tree for eight rows.
// The product is below 2^16, so carries dropped at bit 15 are always zero.
//
// Interface: a, b (8-bit unsigned operands), p (16-bit product).
// Timing: purely combinational, no clock or reset.
// Using 4-2 compressors in the reduction of an 8x8 tree follows the design;
// the row-wise tree organisation is this implementation's choice.
module wallace_mult8_c42 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  localparam int unsigned N = 8;
  localparam int unsigned W = 2 * N;
  localparam int unsigned FS_H [W] = '{default: 2};

  logic [N-1:0][W-1:0] pp;

  always_comb begin
    for (int i = 0; i < N; i++)
      pp[i] = W'(a & {N{b[i]}}) << i;
  end

  logic [W-1:0] s0, c0, s1, c1, s2, c2;

  csa_row_4_2 #(.W(W)) u_l1a (.in0(pp[0]), .in1(pp[1]), .in2(pp[2]), .in3(pp[3]),
                              .sum(s0), .carry(c0));
  csa_row_4_2 #(.W(W)) u_l1b (.in0(pp[4]), .in1(pp[5]), .in2(pp[6]), .in3(pp[7]),
                              .sum(s1), .carry(c1));
  csa_row_4_2 #(.W(W)) u_l2  (.in0(s0), .in1(c0), .in2(s1), .in3(c1),
                              .sum(s2), .carry(c2));

  logic [W-1:0][1:0] fs_col;

  always_comb begin
    for (int c = 0; c < W; c++) fs_col[c] = {c2[c], s2[c]};
  end

  final_sum #(.W(W), .MAXH(2), .HEIGHTS(FS_H)) u_fs (.col(fs_col), .sum(p));

endmodule
