// Self-checking testbench for ut_unpack: every 12-bit column value is split
// at radix 10 and at radix 16, and digit and carry are compared with integer
// remainder and quotient. Values whose quotient does not fit 8 bits are
// skipped for the carry check, as the column adder never produces them.
module tb_ut_unpack;
  import bvm_pkg::*;

  logic [11:0] value;
  digit_t      dd, dh;
  carry_t      cd, ch;
  int checks = 0, failures = 0;

  ut_unpack #(.IN_W(12), .CW(8), .RADIX(10)) dut_d (.value(value), .digit(dd), .carry(cd));
  ut_unpack #(.IN_W(12), .CW(8), .RADIX(16)) dut_h (.value(value), .digit(dh), .carry(ch));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      value = 12'(v);
      #1;
      checks++;
      if (int'(dd) != v % 10 || (v / 10 < 256 && int'(cd) != v / 10)) begin
        failures++;
        $display("FAIL radix 10 value %0d: digit %0d carry %0d", v, dd, cd);
      end
      checks++;
      if (int'(dh) != v % 16 || int'(ch) != v / 16) begin
        failures++;
        $display("FAIL radix 16 value %0d: digit %0d carry %0d", v, dh, ch);
      end
    end
    // The worked example: 64 -> digit 4, carry 6; 134 -> digit 4, carry 13.
    value = 12'd64;  #1; checks++; if (dd != 4'd4 || cd != 8'd6)  failures++;
    value = 12'd134; #1; checks++; if (dd != 4'd4 || cd != 8'd13) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
