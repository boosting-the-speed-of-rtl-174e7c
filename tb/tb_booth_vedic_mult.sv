// End-to-end testbench for booth_vedic_mult.
//
// One instance at the default sizes (8-bit operands, two BCD digits) gets
// every 8-bit operand pair. For operands 0..99 the digit-form result must
// equal the product (z3*100 + z2*10 + z1, with z1, z2 below 10) and overflow
// must be low; for larger operands overflow must be high. The worked example
// 88 x 88 must give exactly 001001101_0100_0100 with column carries 6 and 13.
// A second instance with RADIX = 16 (the nibble split) must give the binary
// product for every pair, and a third with DIGITS = 3 (three BCD digits,
// result {z5[8:0], z4, z3, z2, z1}) must give the decimal product for every
// pair without overflow.
//
// Mechanisms counted, each must occur at least once: a carry out of the
// first column, a carry of two or more digits (>= 10) out of the second
// column, a result with a zero first-column carry, an operand overflow, and
// the nibble mode.
module tb_booth_vedic_mult;
  import bvm_pkg::*;

  logic [7:0]   x1, x2;
  logic [16:0]  res, resh;
  carry_t [1:0] cy, cyh;
  logic         ovf, ovfh;
  logic [24:0]  res3;
  carry_t [3:0] cy3;
  logic         ovf3;
  int checks = 0, failures = 0;
  int n_dec3 = 0;
  int n_carry1 = 0, n_carry2_wide = 0, n_nocarry = 0, n_overflow = 0, n_hex = 0;

  booth_vedic_mult dut (
    .x_bin1 (x1), .x_bin2 (x2), .result (res), .carries (cy), .overflow (ovf)
  );

  booth_vedic_mult #(.RADIX(16)) dut_hex (
    .x_bin1 (x1), .x_bin2 (x2), .result (resh), .carries (cyh), .overflow (ovfh)
  );

  booth_vedic_mult #(.DIGITS(3)) dut_dec3 (
    .x_bin1 (x1), .x_bin2 (x2), .result (res3), .carries (cy3), .overflow (ovf3)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int z1, z2, z3, p3;

    // Worked example.
    x1 = 8'd88; x2 = 8'd88; #1;
    checks++;
    if (res != 17'b00100110101000100 || cy[0] != 8'd6 || cy[1] != 8'd13 || ovf) begin
      failures++;
      $display("FAIL 88 x 88: result %b carries %0d %0d", res, cy[0], cy[1]);
    end

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x1 = 8'(i);
        x2 = 8'(j);
        #1;
        z1 = int'(res[3:0]);
        z2 = int'(res[7:4]);
        z3 = int'(res[16:8]);
        checks++;
        if (i < 100 && j < 100) begin
          if (ovf || z1 > 9 || z2 > 9 || z3 * 100 + z2 * 10 + z1 != i * j) begin
            failures++;
            $display("FAIL %0d x %0d: z3=%0d z2=%0d z1=%0d ovf=%b", i, j, z3, z2, z1, ovf);
          end
          if (cy[0] != 0) n_carry1++;
          else n_nocarry++;
          if (cy[1] >= 10) n_carry2_wide++;
        end else begin
          if (!ovf) begin
            failures++;
            $display("FAIL %0d x %0d: overflow not flagged", i, j);
          end
          n_overflow++;
        end
        checks++;
        if (int'(resh) != i * j || ovfh) begin
          failures++;
          $display("FAIL nibble mode %0d x %0d: %0d", i, j, resh);
        end
        n_hex++;
        checks++;
        p3 = int'(res3[24:16]) * 10000 + int'(res3[15:12]) * 1000 + int'(res3[11:8]) * 100 +
             int'(res3[7:4]) * 10 + int'(res3[3:0]);
        if (p3 != i * j || ovf3) begin
          failures++;
          $display("FAIL three-digit mode %0d x %0d: %0d", i, j, p3);
        end
        n_dec3++;
      end
    end

    need(n_carry1, "carry out of column 0");
    need(n_carry2_wide, "carry >= 10 out of column 1");
    need(n_nocarry, "zero carry out of column 0");
    need(n_overflow, "operand overflow");
    need(n_hex, "nibble mode");
    need(n_dec3, "three-digit decimal mode");
    $display("mechanisms: carry1=%0d carry2_wide=%0d nocarry=%0d overflow=%0d hex=%0d",
             n_carry1, n_carry2_wide, n_nocarry, n_overflow, n_hex);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
