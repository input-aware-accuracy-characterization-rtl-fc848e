// ia_bw_mult: input-aware Baugh-Wooley multiplier, signed Q1.7 x Q1.7 -> Q2.14.
//
// The multiplier is a Baugh-Wooley array: every bit b[j] of the coefficient
// gates one row of partial products x[i] & b[j], the row's sign-column term is
// inverted (NAND), and a constant folded into the sum restores the two's
// complement result. The input-aware idea is that a filter's coefficients are
// constants: when none of them ever sets the top CUT_MSB bits of b, the rows
// (the "columns of AND gates") for those bits can be removed. With CUT_MSB = 2
// the result is exact for every coefficient the filter uses; with CUT_MSB = 3
// bit 5 is dropped as well, which is wrong only for the coefficient 0.28125
// (the error is then x * 0.25). CUT_MSB = 0 keeps the full signed array.
//
// With CUT_MSB >= 1, b is read as the unsigned number b[WIDTH-CUT_MSB-1:0]
// and the result equals $signed(x) * b[WIDTH-CUT_MSB-1:0]. The correction
// constant of each kept row's inverted sign term is -2^(WIDTH-1+j); their sum
// is folded into one constant CORR (0xE080 for the default sizes). The choice
// of constant for the removed rows (the result is exact for the bits that
// remain, so a dropped bit costs exactly x * its weight) is this design's
// reading of how the rows are cut.
//
// Interface: x (sample) and b (coefficient), WIDTH bits each; p, 2*WIDTH bits.
// The top CUT_MSB bits of b are deliberately left unconnected (that is the
// saving), so lint reports them as unused.
// Timing: purely combinational, no clock.
module ia_bw_mult #(
  parameter int unsigned WIDTH   = iaa_pkg::DATA_W,
  parameter int unsigned CUT_MSB = iaa_pkg::CUT_AXC1
) (
  input  logic [WIDTH-1:0]          x,
  input  logic [WIDTH-1:0]          b,
  output logic signed [2*WIDTH-1:0] p
);

  localparam int unsigned PW   = 2 * WIDTH;
  localparam int unsigned ROWS = WIDTH - CUT_MSB;

  // Sum of the Baugh-Wooley correction terms, modulo 2^PW
  function automatic logic [PW-1:0] corr_const();
    logic [PW-1:0] c;
    c = '0;
    if (CUT_MSB == 0) begin
      // full signed array: +2^WIDTH + 2^(2*WIDTH-1)
      c = (PW'(1) << WIDTH) + (PW'(1) << (PW - 1));
    end else begin
      // one -2^(WIDTH-1+j) per kept row
      for (int unsigned j = 0; j < ROWS; j++) c = c - (PW'(1) << (WIDTH - 1 + j));
    end
    return c;
  endfunction

  localparam logic [PW-1:0] CORR = corr_const();

  if (CUT_MSB >= WIDTH) begin : g_bad_cut
    $error("ia_bw_mult: CUT_MSB must be below WIDTH");
  end

  // Partial-product rows: pp[j] is the row gated by b[j], before its shift
  logic [ROWS-1:0][WIDTH-1:0] pp;

  for (genvar j = 0; j < ROWS; j++) begin : g_row
    if (CUT_MSB == 0 && j == WIDTH - 1) begin : g_sign_row
      // coefficient sign row: inverted magnitude terms, plain sign x sign
      assign pp[j] = {x[WIDTH-1] & b[j], ~(x[WIDTH-2:0] & {(WIDTH-1){b[j]}})};
    end else begin : g_mag_row
      // magnitude row: plain terms, inverted sample sign term
      assign pp[j] = {~(x[WIDTH-1] & b[j]), x[WIDTH-2:0] & {(WIDTH-1){b[j]}}};
    end
  end

  // Partial-product tree: the rows, each shifted by its weight, plus CORR
  logic [PW-1:0] sum;
  always_comb begin
    sum = CORR;
    for (int unsigned j = 0; j < ROWS; j++) begin
      sum = sum + (PW'(pp[j]) << j);
    end
  end

  assign p = signed'(sum);

endmodule
