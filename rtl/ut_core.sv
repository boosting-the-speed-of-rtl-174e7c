// Urdhva Tiryakbhyam ("vertically and crosswise") multiplication of two
// digit vectors.
//
// All DIGITS x DIGITS digit products are formed at once, each by its own
// Booth digit multiplier. Result column k collects the products a[i]*b[j]
// with i + j = k: the first and last columns are a single vertical product,
// the columns between are crosswise sums. Each column also adds the carry of
// the column below; ut_unpack then splits the column into a result digit
// (z_lo[k]) and the carry for column k+1. The last column is not split:
// its whole value is z_top.
//
// For two digits per operand, with a = {a1, a0} and b = {b1, b0}:
//   column 0: a0*b0            -> z_lo[0], carry[0]   (z1, c1)
//   column 1: a1*b0 + a0*b1 + c1 -> z_lo[1], carry[1] (z2, c2)
//   column 2: a1*b1 + c2       -> z_top               (z3)
// so 88 x 88 gives z3 z2 z1 = 77, 4, 4, i.e. 7744. This column order and
// the widths (4-bit digits, 8-bit carry, 9-bit z_top) follow the published
// worked example; the generalisation to DIGITS digits is this design's.
//
// Interface: a, b digit vectors (index 0 least significant) in; z_lo
// (2*DIGITS-2 digits), z_top (TOP_W bits) and the column carries out.
// Purely combinational. DIGITS must be 2..16 and every input digit below
// RADIX.
module ut_core
  import bvm_pkg::*;
#(
  parameter int DIGITS = 2,
  parameter int RADIX  = 10,
  parameter int TOP_W  = 9
) (
  input  digit_t [DIGITS-1:0]     a,
  input  digit_t [DIGITS-1:0]     b,
  output digit_t [2*DIGITS-3:0]   z_lo,
  output logic   [TOP_W-1:0]      z_top,
  output carry_t [2*DIGITS-3:0]   carry
);

  localparam int NCOL = 2 * DIGITS - 1;

  if (DIGITS < 2 || DIGITS > MAX_DIGITS) begin : g_bad_digits
    $error("ut_core: DIGITS must be between 2 and %0d", MAX_DIGITS);
  end

  // Vertical and crosswise digit products, all in parallel.
  logic [2*DIGIT_W-1:0] prod [DIGITS][DIGITS];

  for (genvar i = 0; i < DIGITS; i++) begin : g_row
    for (genvar j = 0; j < DIGITS; j++) begin : g_col
      booth_mult #(.W(DIGIT_W)) u_booth (
        .md   (a[i]),
        .mr   (b[j]),
        .prod (prod[i][j])
      );
    end
  end

  // Column sums, each including the carry of the column below. Each column
  // keeps its own sum and carry so that the carry chain runs from block to
  // block without a signal that feeds itself.
  for (genvar k = 0; k < NCOL; k++) begin : g_sum
    colsum_t col;
    carry_t  cin;

    if (k == 0) begin : g_cin0
      assign cin = '0;
    end else begin : g_cin
      assign cin = g_sum[k-1].g_split.cout;
    end

    always_comb begin
      col = colsum_t'(cin);
      for (int i = 0; i < DIGITS; i++) begin
        if (k - i >= 0 && k - i < DIGITS) col = col + colsum_t'(prod[i][k - i]);
      end
    end

    if (k < NCOL - 1) begin : g_split
      carry_t cout;

      ut_unpack #(.IN_W(SUM_W), .CW(CARRY_W), .RADIX(RADIX)) u_unpack (
        .value (col),
        .digit (z_lo[k]),
        .carry (cout)
      );
      assign carry[k] = cout;
    end
  end

  assign z_top = TOP_W'(g_sum[NCOL-1].col);

  // Every result digit is a valid digit of the radix.
  always_comb begin
    for (int k = 0; k < NCOL - 1; k++) begin
      assert (32'(z_lo[k]) < RADIX) else $error("ut_core: digit %0d out of range", k);
    end
  end

endmodule
