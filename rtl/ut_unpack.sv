// Splits a column result of the vertical-and-crosswise multiplication into
// its sum digit and the carry for the next column.
//
// digit = value mod RADIX becomes one digit of the final result; carry =
// value div RADIX is added to the next column. For the decimal example
// 8x8 = 64 this gives digit 4 and carry 6. The rule is the published one; doing
// it with a constant division and remainder (left to synthesis) is this
// design's choice.
//
// Interface: value (IN_W bits) in; digit (4 bits) and carry (CW bits)
// out; combinational. The carry is truncated to CARRY_W bits, so IN_W and
// CW must satisfy (2**IN_W - 1) / RADIX < 2**CW for the
// values that occur; the column adder guarantees this.
module ut_unpack
  import bvm_pkg::*;
#(
  parameter int IN_W    = SUM_W,
  parameter int CW      = CARRY_W,
  parameter int RADIX   = 10
) (
  input  logic [IN_W-1:0]    value,
  output digit_t             digit,
  output logic [CW-1:0]      carry
);

  localparam logic [IN_W-1:0] R = IN_W'(RADIX);

  always_comb begin
    digit = DIGIT_W'(value % R);
    carry = CW'(value / R);
  end

endmodule
