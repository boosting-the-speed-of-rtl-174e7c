// Self-checking testbench for ut_core. It drives digit vectors directly:
// all 100 x 100 two-digit decimal pairs, random three- and four-digit
// decimal pairs, and all 256 x 256 two-nibble hexadecimal pairs. The
// expected result digits and top column are computed from the integer
// product: z_lo[k] is digit k of the product and z_top is the product
// divided by RADIX**(2*DIGITS-2). The carries of the 88 x 88 example
// (6 and 13) are checked too.
module tb_ut_core;
  import bvm_pkg::*;

  digit_t [1:0] a2, b2;
  digit_t [1:0] z2;
  carry_t [1:0] c2;
  logic   [8:0] t2;

  digit_t [2:0] a3, b3;
  digit_t [3:0] z3;
  carry_t [3:0] c3;
  logic   [8:0] t3;

  digit_t [3:0] a4, b4;
  digit_t [5:0] z4;
  carry_t [5:0] c4;
  logic   [8:0] t4;

  digit_t [1:0] ah, bh, zh;
  carry_t [1:0] ch;
  logic   [8:0] th;

  int checks = 0, failures = 0;

  ut_core #(.DIGITS(2), .RADIX(10), .TOP_W(9)) dut2 (.a(a2), .b(b2), .z_lo(z2), .z_top(t2), .carry(c2));
  ut_core #(.DIGITS(3), .RADIX(10), .TOP_W(9)) dut3 (.a(a3), .b(b3), .z_lo(z3), .z_top(t3), .carry(c3));
  ut_core #(.DIGITS(4), .RADIX(10), .TOP_W(9)) dut4 (.a(a4), .b(b4), .z_lo(z4), .z_top(t4), .carry(c4));
  ut_core #(.DIGITS(2), .RADIX(16), .TOP_W(9)) duth (.a(ah), .b(bh), .z_lo(zh), .z_top(th), .carry(ch));

  // Digit k of x in radix r.
  function automatic longint dig(longint x, int r, int k);
    for (int i = 0; i < k; i++) x = x / r;
    return x % r;
  endfunction

  function automatic longint rpow(int r, int n);
    longint p = 1;
    for (int i = 0; i < n; i++) p = p * r;
    return p;
  endfunction

  task automatic fail(input string what, input longint x, input longint y);
    failures++;
    $display("FAIL %s: %0d * %0d", what, x, y);
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, y, p;
    bit ok;
    a3 = '0; b3 = '0; a4 = '0; b4 = '0; ah = '0; bh = '0;

    // Two decimal digits: exhaustive.
    for (int i = 0; i < 100; i++) begin
      for (int j = 0; j < 100; j++) begin
        a2 = {4'(i / 10), 4'(i % 10)};
        b2 = {4'(j / 10), 4'(j % 10)};
        #1;
        p = i * j;
        checks++;
        if (longint'(z2[0]) != dig(p, 10, 0) || longint'(z2[1]) != dig(p, 10, 1) ||
            longint'(t2) != p / 100)
          fail("2-digit decimal", i, j);
      end
    end

    // The worked example 88 x 88: c1 = 6, c2 = 13, z3 = 77.
    a2 = {4'd8, 4'd8}; b2 = {4'd8, 4'd8}; #1;
    checks++;
    if (c2[0] != 8'd6 || c2[1] != 8'd13 || t2 != 9'd77 || z2 != {4'd4, 4'd4})
      fail("88 x 88 columns", 88, 88);

    // Three and four decimal digits: random, plus the largest operands.
    for (int n = 0; n < 3000; n++) begin
      x = (n == 0) ? 999 : longint'($urandom_range(999));
      y = (n == 0) ? 999 : longint'($urandom_range(999));
      for (int k = 0; k < 3; k++) begin
        a3[k] = 4'(dig(x, 10, k));
        b3[k] = 4'(dig(y, 10, k));
      end
      x = (n == 0) ? 9999 : longint'($urandom_range(9999));
      y = (n == 0) ? 9999 : longint'($urandom_range(9999));
      for (int k = 0; k < 4; k++) begin
        a4[k] = 4'(dig(x, 10, k));
        b4[k] = 4'(dig(y, 10, k));
      end
      #1;
      p = 0;
      for (int k = 2; k >= 0; k--) p = p * 10 + longint'(a3[k]);
      x = p;
      p = 0;
      for (int k = 2; k >= 0; k--) p = p * 10 + longint'(b3[k]);
      y = p;
      p = x * y;
      ok = (longint'(t3) == p / rpow(10, 4));
      for (int k = 0; k < 4; k++) ok &= (longint'(z3[k]) == dig(p, 10, k));
      checks++;
      if (!ok) fail("3-digit decimal", x, y);

      p = 0;
      for (int k = 3; k >= 0; k--) p = p * 10 + longint'(a4[k]);
      x = p;
      p = 0;
      for (int k = 3; k >= 0; k--) p = p * 10 + longint'(b4[k]);
      y = p;
      p = x * y;
      ok = (longint'(t4) == p / rpow(10, 6));
      for (int k = 0; k < 6; k++) ok &= (longint'(z4[k]) == dig(p, 10, k));
      checks++;
      if (!ok) fail("4-digit decimal", x, y);
    end

    // Two hexadecimal nibbles: exhaustive, the result is the binary product.
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        ah = {4'(i / 16), 4'(i % 16)};
        bh = {4'(j / 16), 4'(j % 16)};
        #1;
        checks++;
        if (int'({th[7:0], zh}) != i * j || th[8]) fail("2-nibble hex", i, j);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
