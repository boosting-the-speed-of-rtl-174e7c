// 8x8 multiplier that works digit by digit: the two binary operands are
// unpacked into BCD digits, the digits are multiplied "vertically and
// crosswise" (Urdhva Tiryakbhyam) with one radix-2 Booth multiplier per digit
// pair, and each result column is split into a result digit and a carry for
// the next column.
//
// carries gives the carry out of each result column (c1, c2 at two digits).
//
// Data flow (no clock, no state):
//   x_bin1, x_bin2 -> bin2bcd (x2) -> ut_core (booth_mult per digit pair,
//   ut_unpack per column) -> result
//
// The result is given in the same digit form as the columns: at the default
// sizes result = {z3[8:0], z2[3:0], z1[3:0]}, where z1 and z2 are the units
// and tens digits of the product and z3 is the remaining value (hundreds and
// up) in binary. 88 x 88 = 7744 thus reads 001001101_0100_0100 (77, 4, 4).
// The product in decimal is z3*100 + z2*10 + z1.
//
// What follows the published method: the operand names, the BCD unpacking, the
// vertical-and-crosswise column order, Booth as the digit multiplier, the
// sum/carry split and the result format. This design's own choices: two
// decimal digits per operand cover operands 0..99 only, and the overflow
// output (raised when an operand does not fit into DIGITS digits; the result
// is then not the product) is added. RADIX = 16 turns the same structure
// into the binary nibble split P = AH*BH*256 + (AH*BL + AL*BH)*16 + AL*BL,
// exact for all 8-bit operands, with z3 then holding product bits [15:8].
module booth_vedic_mult
  import bvm_pkg::*;
#(
  parameter int IN_W   = 8,
  parameter int DIGITS = 2,
  parameter int RADIX  = 10,
  parameter int TOP_W  = 9,
  localparam int RES_W = TOP_W + DIGIT_W * (2 * DIGITS - 2)
) (
  input  logic [IN_W-1:0]  x_bin1,
  input  logic [IN_W-1:0]  x_bin2,
  output logic [RES_W-1:0] result,
  output carry_t [2*DIGITS-3:0] carries,
  output logic             overflow
);

  // Operand digits; at two digits, a/b of operand 1 and c/d of operand 2
  // in the published naming are dig1[1]/dig1[0] and dig2[1]/dig2[0].
  digit_t [DIGITS-1:0] dig1, dig2;
  logic                ovf1, ovf2;

  bin2bcd #(.IN_W(IN_W), .DIGITS(DIGITS), .RADIX(RADIX)) u_unpack1 (
    .bin      (x_bin1),
    .digits   (dig1),
    .overflow (ovf1)
  );

  bin2bcd #(.IN_W(IN_W), .DIGITS(DIGITS), .RADIX(RADIX)) u_unpack2 (
    .bin      (x_bin2),
    .digits   (dig2),
    .overflow (ovf2)
  );

  digit_t [2*DIGITS-3:0] z_lo;
  logic   [TOP_W-1:0]    z_top;

  ut_core #(.DIGITS(DIGITS), .RADIX(RADIX), .TOP_W(TOP_W)) u_core (
    .a     (dig1),
    .b     (dig2),
    .z_lo  (z_lo),
    .z_top (z_top),
    .carry (carries)
  );

  assign result   = {z_top, z_lo};
  assign overflow = ovf1 | ovf2;

endmodule
