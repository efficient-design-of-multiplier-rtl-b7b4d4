// mult_pkg: types and constants shared by the compressor-based multipliers.
//
// c82_method_e names the four ways an 8-2 adder compressor can be assembled
// from smaller compressors.  The numbering follows the four 8-bit multiplier
// variants ("methods") that are compared in the design's evaluation:
//   1: three 4-2 compressors
//   2: one 5-2, one 4-2 and one 3-2 compressor
//   3: two 4-2 and two 3-2 compressors
//   4: one 7-2 and three 3-2 compressors
// The internal wiring of each structure is this implementation's own choice
// (see compressor_8_2).
package mult_pkg;

  typedef enum logic [2:0] {
    C82_ONLY_4_2   = 3'd1,
    C82_5_2_4_2_3_2 = 3'd2,
    C82_4_2_3_2    = 3'd3,
    C82_7_2_3_2    = 3'd4
  } c82_method_e;

  // Number of carry-in / carry-out bits that link neighbouring 8-2
  // compressors in a column chain: 8 inputs + 5 carries in = 13 units of
  // weight 1 = sum + 2*(5 carries out + carry).
  localparam int unsigned C82_NCARRY = 5;

endpackage
