// Radix-2 Booth multiplier for two unsigned W-bit digits, combinational.
//
// This is the digit multiplier called once for every digit pair of the
// vertical-and-crosswise step. It follows the classic Booth procedure on
// four registers: X (accumulator, starts at 0), Y (multiplicand), Z
// (multiplier) and E (the bit to the right of Z, starts at 0). In each of
// the N = W+1 steps the pair {Z[0], E} is examined: 01 adds Y to X, 10
// subtracts Y from X, 00 and 11 do nothing; then {X, Z, E} is shifted right
// by one with the sign bit of X kept (arithmetic shift). The product is
// {X, Z}. Booth multiplies signed two's complement numbers, so the unsigned
// digits are zero-extended by one bit to stay positive.
//
// The procedure is the published one. Unrolling it into N combinational stages
// instead of clocking the registers is this design's choice: there is no
// clock, and the product settles after the input changes.
//
// Interface: md, mr are the unsigned digits; prod = md * mr (2W bits).
module booth_mult #(
  parameter int W = 4
) (
  input  logic [W-1:0]   md,
  input  logic [W-1:0]   mr,
  output logic [2*W-1:0] prod
);

  localparam int N = W + 1;

  logic signed [N-1:0] x, y, sum;
  logic        [N-1:0] z;
  logic                e;

  always_comb begin
    y = signed'({1'b0, md});
    x = '0;
    z = {1'b0, mr};
    e = 1'b0;
    for (int i = 0; i < N; i++) begin
      unique case ({z[0], e})
        2'b01:   sum = x + y;
        2'b10:   sum = x - y;
        default: sum = x;
      endcase
      e = z[0];
      z = {sum[0], z[N-1:1]};
      x = sum >>> 1;
    end
    prod = (2*W)'({x, z});  // x never exceeds the product width
  end

endmodule
