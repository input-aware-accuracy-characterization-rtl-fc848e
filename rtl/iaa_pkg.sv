// iaa_pkg: shared constants of the input-aware approximate FIR design.
//
// Number formats: samples and coefficients are signed Q1.7 (one integer/sign
// bit, seven fraction bits), products are signed Q2.14. The five coefficient
// codes below are the only values the low-pass filter's taps take; their
// binary codes are those of the reference filter. The tap order in
// DEFAULT_TAPS is this design's choice, since the filter length and tap order
// are not part of the reference description: a symmetric 9-tap arrangement
// 0,3,14,29,36,29,14,3,0 (in 1/128 units) that uses all five codes and sums
// to 128/128, i.e. unity gain at DC.
package iaa_pkg;

  localparam int unsigned DATA_W = 8;            // Q1.7 operand width
  localparam int unsigned FRAC_W = 7;            // fraction bits of Q1.7
  localparam int unsigned PROD_W = 2 * DATA_W;   // Q2.14 product width

  typedef logic signed [DATA_W-1:0] q1_7_t;
  typedef logic signed [PROD_W-1:0] q2_14_t;

  // The five distinct coefficient codes of the filter (Q1.7)
  localparam logic [DATA_W-1:0] COEF_0     = 8'b0000_0000;  // 0
  localparam logic [DATA_W-1:0] COEF_3     = 8'b0000_0011;  // 0.0234375
  localparam logic [DATA_W-1:0] COEF_14    = 8'b0000_1110;  // 0.109375
  localparam logic [DATA_W-1:0] COEF_29    = 8'b0001_1101;  // 0.2265625
  localparam logic [DATA_W-1:0] COEF_36    = 8'b0010_0100;  // 0.28125

  localparam int unsigned DEFAULT_NTAPS = 9;

  // Tap i of the filter is DEFAULT_TAPS[i] (b_0 .. b_8)
  localparam logic [DEFAULT_NTAPS-1:0][DATA_W-1:0] DEFAULT_TAPS =
    {COEF_0, COEF_3, COEF_14, COEF_29, COEF_36, COEF_29, COEF_14, COEF_3, COEF_0};

  // Cut configurations of the input-aware multiplier
  localparam int unsigned CUT_EXACT = 0;  // full Baugh-Wooley array
  localparam int unsigned CUT_AXC1  = 2;  // exact for every coefficient above
  localparam int unsigned CUT_AXC2  = 3;  // also drops bit 5 (set only in 0.28125)

endpackage
