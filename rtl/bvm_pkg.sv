// Shared types and constants of the Booth/Vedic digit multiplier.
//
// Every operand is handled as a vector of 4-bit digits (BCD digits for
// radix 10, hexadecimal nibbles for radix 16). Column sums of the
// vertical-and-crosswise step are kept in SUM_W bits and the carry from one
// column to the next in CARRY_W bits; the 4-bit digit and the 8-bit carry
// follow the signal widths of the published worked example (digits [3:0],
// carry c2[7:0]). SUM_W is this design's choice, large enough for up to
// 16 digits per operand at radix 16.
package bvm_pkg;

  localparam int DIGIT_W = 4;
  localparam int CARRY_W = 8;
  localparam int SUM_W   = 12;
  localparam int MAX_DIGITS = 16;  // largest DIGITS that SUM_W and CARRY_W hold

  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [CARRY_W-1:0] carry_t;
  typedef logic [SUM_W-1:0]   colsum_t;

  // Number of radix-`radix` digits needed for any unsigned `in_w`-bit value.
  function automatic int num_digits(int in_w, int radix);
    longint v;
    int n;
    v = (longint'(1) << in_w) - 1;
    n = 0;
    while (v > 0) begin
      v = v / longint'(radix);
      n++;
    end
    return (n == 0) ? 1 : n;
  endfunction

endpackage
