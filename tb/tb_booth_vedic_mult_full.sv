// Full-size testbench for booth_vedic_mult at its default parameters
// (8-bit operands, two BCD digits per operand, radix 10).
//
// It first runs the worked example 88 x 88, which must give the digit-form
// result 001001101_0100_0100 (z3 = 77, z2 = 4, z1 = 4) with column carries
// 6 and 13, then every operand pair 0..99 x 0..99 against the integer
// product, and finally a sample of operands above 99, for which overflow
// must be raised.
module tb_booth_vedic_mult_full;
  import bvm_pkg::*;

  logic [7:0]   x1, x2;
  logic [16:0]  res;
  carry_t [1:0] cy;
  logic         ovf;
  int checks = 0, failures = 0;

  booth_vedic_mult dut (
    .x_bin1 (x1), .x_bin2 (x2), .result (res), .carries (cy), .overflow (ovf)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    x1 = 8'd88; x2 = 8'd88; #1;
    checks++;
    if (res != 17'b00100110101000100 || cy[0] != 8'd6 || cy[1] != 8'd13 || ovf) begin
      failures++;
      $display("FAIL 88 x 88: result %b carries %0d %0d", res, cy[0], cy[1]);
    end else begin
      $display("88 x 88 = %0d%0d%0d", res[16:8], res[7:4], res[3:0]);
    end

    for (int i = 0; i < 100; i++) begin
      for (int j = 0; j < 100; j++) begin
        x1 = 8'(i); x2 = 8'(j); #1;
        p = int'(res[16:8]) * 100 + int'(res[7:4]) * 10 + int'(res[3:0]);
        checks++;
        if (ovf || res[7:4] > 4'd9 || res[3:0] > 4'd9 || p != i * j) begin
          failures++;
          $display("FAIL %0d x %0d: got %0d", i, j, p);
        end
      end
    end

    for (int n = 0; n < 1000; n++) begin
      x1 = 8'($urandom_range(255, 100));
      x2 = 8'($urandom_range(255));
      if (n % 2 == 1) {x1, x2} = {x2, x1};
      #1;
      checks++;
      if (!ovf) begin
        failures++;
        $display("FAIL %0d x %0d: overflow not raised", x1, x2);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
