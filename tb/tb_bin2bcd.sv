// Self-checking testbench for bin2bcd. All 256 8-bit values are converted
// three ways: two decimal digits (the default, operands 0..99, overflow above
// that), three decimal digits (always fits) and two hexadecimal nibbles. The
// expected digits are worked out with integer division and remainder.
module tb_bin2bcd;
  import bvm_pkg::*;

  logic [7:0]        bin;
  digit_t [1:0]      d2;
  digit_t [2:0]      d3;
  digit_t [1:0]      h2;
  logic              ov2, ov3, ovh;
  int checks = 0, failures = 0;

  bin2bcd #(.IN_W(8), .DIGITS(2), .RADIX(10)) dut2 (.bin(bin), .digits(d2), .overflow(ov2));
  bin2bcd #(.IN_W(8), .DIGITS(3), .RADIX(10)) dut3 (.bin(bin), .digits(d3), .overflow(ov3));
  bin2bcd #(.IN_W(8), .DIGITS(2), .RADIX(16)) duth (.bin(bin), .digits(h2), .overflow(ovh));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL value %0d: %s", bin, what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bin = 8'(v);
      #1;
      check(int'(d2[0]) == v % 10 && int'(d2[1]) == (v / 10) % 10, "two BCD digits");
      check(ov2 == (v > 99), "two-digit overflow");
      check(int'(d3[0]) == v % 10 && int'(d3[1]) == (v / 10) % 10 &&
            int'(d3[2]) == v / 100, "three BCD digits");
      check(!ov3, "three-digit overflow");
      check(int'(h2[0]) == v % 16 && int'(h2[1]) == v / 16 && !ovh, "nibbles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
