// tpg_pkg: constants shared by the transformed-pattern test pattern generator.
//
// A cube over n inputs is held as two n-bit vectors: a care mask (1 = the
// input appears as a literal, 0 = don't care 'X') and a value vector (the
// polarity of each literal; ignored where the mask is 0). Input a_1 / 'a' is
// the most significant bit, so a pattern written "abcde" reads as a binary
// literal 5'babcde.
//
// Contents:
//  * the C17 worked example: two cube mappings applied in order,
//    M1 = be' -> a'de and M2 = a'e' -> ab'c', which together take the
//    ten-pattern original set to one that covers all five test cubes of the
//    faults the original set misses;
//  * the LFSR configurations (stages, characteristic polynomial, seed) used
//    for the ISCAS benchmark experiments. A polynomial x^n + sum c_k x^k is
//    stored as the n-bit vector of its lower coefficients c_{n-1}..c_0 (the
//    x^n term is implied). Seeds are the listed hexadecimal groups
//    concatenated, with stage 0 in the least significant bit; that bit
//    assignment is this design's own choice.
package tpg_pkg;

  // ---------------------------------------------------------------- C17
  localparam int C17_N    = 5;
  localparam int C17_NMAP = 2;

  typedef logic [C17_N-1:0] c17_pattern_t;

  // Mapping 0: source b e'   -> image a' d e
  // Mapping 1: source a' e'  -> image a b' c'
  localparam logic [C17_NMAP-1:0][C17_N-1:0] C17_SRC_MASK = '{5'b10001, 5'b01001};
  localparam logic [C17_NMAP-1:0][C17_N-1:0] C17_SRC_VAL  = '{5'b00000, 5'b01000};
  localparam logic [C17_NMAP-1:0][C17_N-1:0] C17_IMG_MASK = '{5'b11100, 5'b10011};
  localparam logic [C17_NMAP-1:0][C17_N-1:0] C17_IMG_VAL  = '{5'b10000, 5'b00011};

  // A 5-stage primitive polynomial and a non-zero seed for running the C17
  // mapping logic behind an LFSR. The worked example's own pattern set is
  // hand-picked, not LFSR-generated, so these two values are a free choice.
  localparam logic [C17_N-1:0] C17_POLY = 5'b00101;   // x^5 + x^2 + 1
  localparam logic [C17_N-1:0] C17_SEED = 5'b00111;

  // ------------------------------------------- benchmark LFSR set-ups
  localparam int S420_N = 35;
  localparam logic [S420_N-1:0] S420_POLY = (35'd1 << 2) | 35'd1;            // x^35+x^2+1
  localparam logic [S420_N-1:0] S420_SEED = 35'h3_3ad1_dab3;

  localparam int S641_N = 54;
  localparam logic [S641_N-1:0] S641_POLY = (54'd1 << 37) | (54'd1 << 36) | (54'd1 << 1) | 54'd1;
  localparam logic [S641_N-1:0] S641_SEED = 54'h1a_9a83_c447_3c79;

  localparam int S713_N = 54;
  localparam logic [S713_N-1:0] S713_POLY = S641_POLY;                         // x^54+x^37+x^36+x+1
  localparam logic [S713_N-1:0] S713_SEED = 54'h0a_128c_b016_6b6d;

  localparam int S838_N = 67;
  localparam logic [S838_N-1:0] S838_POLY = (67'd1 << 10) | (67'd1 << 9) | (67'd1 << 1) | 67'd1;
  localparam logic [S838_N-1:0] S838_SEED = 67'h3_df4e_0de8_4455_0811;

  localparam int S1196_N = 32;
  localparam logic [S1196_N-1:0] S1196_POLY = (32'd1 << 22) | (32'd1 << 2) | (32'd1 << 1) | 32'd1;
  localparam logic [S1196_N-1:0] S1196_SEED = 32'h29fc_1f94;

  localparam int C2670_N = 233;
  localparam logic [C2670_N-1:0] C2670_POLY = (233'd1 << 74) | 233'd1;       // x^233+x^74+1
  localparam logic [C2670_N-1:0] C2670_SEED =
      233'h0f7_d383_7a11_1542_047a_70a1_36e8_d73f_7c5a_0882_fee6_ba86_a2a7_891b_2c05;

  localparam int C7552_N = 207;
  localparam logic [C7552_N-1:0] C7552_POLY = (207'd1 << 43) | 207'd1;       // x^207+x^43+1
  localparam logic [C7552_N-1:0] C7552_SEED =
      207'h2f25_0e9a_94fe_0fca_0a0a_b826_3cc6_5fb4_0458_13c6_1b48_01e4_02c3;

endpackage
