// final_sum: final-sum stage of a compressor multiplier, made of ordinary
// half adders and full adders.
//
// Input is a bit matrix: column c (weight 2^c) holds HEIGHTS[c] valid bits
// in col[c][HEIGHTS[c]-1:0]; the bits above that are ignored.  The block
// returns the sum of all valid bits, modulo 2^W.
//
// How it works:
//   1. Wallace reduction.  In every round each column taller than two bits
//      is cut into groups of three, each fed to a full adder (sum stays,
//      carry moves one column up); a left-over pair goes to a half adder and
//      a single left-over bit passes through.  Columns of one or two bits
//      pass unchanged.  Rounds repeat until every column holds at most two
//      bits.  The column heights are parameters, so the whole network is
//      fixed at elaboration; the rounds that find nothing to do are wires.
//   2. Carry-propagate addition.  The two remaining rows are added by a
//      ripple-carry adder: a half adder in bit 0, full adders above it.
// Carries that would leave bit W-1 are dropped.  When the matrix holds a
// product that fits in W bits those carries are always zero.
//
// Interface: col (W columns of MAXH bits), sum (W bits).  Combinational.
// The design only says that the final sum is built from normal half and
// full adders; the Wallace rounds and the ripple-carry adder are this
// implementation's choice of the simplest such circuit.
module final_sum #(
  parameter int unsigned W       = 8,
  parameter int unsigned MAXH    = 3,
  parameter int unsigned HEIGHTS [W] = '{default: 2},
  parameter int unsigned ROUNDS  = 10
) (
  input  logic [W-1:0][MAXH-1:0] col,
  output logic [W-1:0]           sum
);

  // Internal columns are a little wider than MAXH: after a round a short
  // column can receive more carries than it lost bits.
  localparam int unsigned HW = MAXH + 4;

  logic [W-1:0][HW-1:0] m, nm;
  int unsigned          h  [W];
  int unsigned          nh [W];
  logic [W-1:0]         row0, row1;

  always_comb begin
    m  = '0;
    nm = '0;
    for (int c = 0; c < W; c++) begin
      h[c]  = HEIGHTS[c] > MAXH ? MAXH : HEIGHTS[c];
      nh[c] = 0;
      for (int k = 0; k < MAXH; k++)
        if (k < h[c]) m[c][k] = col[c][k];
    end

    for (int r = 0; r < ROUNDS; r++) begin
      nm = '0;
      for (int c = 0; c < W; c++) nh[c] = 0;
      for (int c = 0; c < W; c++) begin
        if (h[c] <= 2) begin
          for (int k = 0; k < 2; k++)
            if (k < h[c]) begin
              nm[c][nh[c]] = m[c][k];
              nh[c]++;
            end
        end else begin
          for (int k = 0; k + 2 < HW; k += 3) begin
            if (k + 2 < h[c]) begin
              // full adder
              nm[c][nh[c]] = m[c][k] ^ m[c][k+1] ^ m[c][k+2];
              nh[c]++;
              if (c + 1 < W) begin
                nm[c+1][nh[c+1]] = (m[c][k] & m[c][k+1]) |
                                   (m[c][k+2] & (m[c][k] ^ m[c][k+1]));
                nh[c+1]++;
              end
            end else if (k + 1 < h[c]) begin
              // half adder
              nm[c][nh[c]] = m[c][k] ^ m[c][k+1];
              nh[c]++;
              if (c + 1 < W) begin
                nm[c+1][nh[c+1]] = m[c][k] & m[c][k+1];
                nh[c+1]++;
              end
            end else if (k < h[c]) begin
              nm[c][nh[c]] = m[c][k];
              nh[c]++;
            end
          end
        end
      end
      m = nm;
      for (int c = 0; c < W; c++) h[c] = nh[c];
    end

    for (int c = 0; c < W; c++) begin
      row0[c] = h[c] >= 1 ? m[c][0] : 1'b0;
      row1[c] = h[c] >= 2 ? m[c][1] : 1'b0;
    end
  end

  // Ripple-carry adder of the two remaining rows.  The top bit needs no
  // carry-out, so it is only the sum half of a full adder.
  logic [W-1:1] rc;

  half_adder u_ha0 (.a(row0[0]), .b(row1[0]), .sum(sum[0]), .carry(rc[1]));

  for (genvar c = 1; c < W - 1; c++) begin : g_rca
    full_adder u_fa (.a(row0[c]), .b(row1[c]), .ci(rc[c]), .sum(sum[c]), .co(rc[c+1]));
  end

  assign sum[W-1] = row0[W-1] ^ row1[W-1] ^ rc[W-1];

endmodule
