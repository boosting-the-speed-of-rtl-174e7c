// Unpacks a binary operand into DIGITS digits of 4 bits, least significant
// digit first.
//
// For RADIX 10 the conversion is the combinational shift-and-add-3 method
// (double dabble): the binary bits are shifted, most significant first, into
// a row of BCD digits, and before each shift every digit of 5 or more gets 3
// added so that it carries correctly into the next digit. For RADIX 16 the
// digits are simply the 4-bit nibbles of the operand.
//
// The published method asks for a binary-to-BCD unpacking step and, in its
// worked example,
// shows two BCD digits per 8-bit operand. The conversion method and the
// overflow flag are this design's choices: an 8-bit value can need three
// decimal digits, and overflow is raised when any digit above DIGITS is
// non-zero, i.e. when the operand does not fit.
//
// Interface: bin (IN_W bits) in, digits[DIGITS] and overflow out; no clock.
// Bit 0 of the units digit is always bin[0] (an even number ends in an even
// digit), so synthesis reduces that output bit to a wire.
module bin2bcd
  import bvm_pkg::*;
#(
  parameter int IN_W   = 8,
  parameter int DIGITS = 2,
  parameter int RADIX  = 10
) (
  input  logic [IN_W-1:0]          bin,
  output digit_t [DIGITS-1:0]      digits,
  output logic                     overflow
);

  // Digits needed to hold every IN_W-bit value, and the width of the row
  // the conversion works in (at least DIGITS digits).
  localparam int NFULL = num_digits(IN_W, RADIX);
  localparam int NROW  = (NFULL > DIGITS) ? NFULL : DIGITS;

  if (RADIX != 10 && RADIX != 16) begin : g_bad_radix
    $error("bin2bcd: RADIX must be 10 or 16");
  end

  digit_t [NROW-1:0] row;

  always_comb begin
    row = '0;
    if (RADIX == 10) begin
      for (int i = IN_W - 1; i >= 0; i--) begin
        for (int d = 0; d < NROW; d++) begin
          if (row[d] >= 4'd5) row[d] = row[d] + 4'd3;
        end
        row = (DIGIT_W*NROW)'({row, bin[i]});  // shift left by one, bin[i] enters at bit 0
      end
    end else begin
      row = (DIGIT_W*NROW)'(bin);
    end
  end

  assign digits = row[DIGITS-1:0];

  always_comb begin
    overflow = 1'b0;
    for (int d = DIGITS; d < NROW; d++) begin
      if (row[d] != '0) overflow = 1'b1;
    end
  end

endmodule
