// Self-checking testbench for booth_mult: every pair of 4-bit digits
// (0..15 x 0..15) is applied and the product is compared with the integer
// product. The Booth array is combinational, so each check is made a delay
// of 1 after the inputs change.
module tb_booth_mult;
  localparam int W = 4;

  logic [W-1:0]   md, mr;
  logic [2*W-1:0] prod;
  int checks = 0, failures = 0;

  booth_mult #(.W(W)) dut (.md(md), .mr(mr), .prod(prod));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**W; i++) begin
      for (int j = 0; j < 2**W; j++) begin
        md = W'(i);
        mr = W'(j);
        #1;
        checks++;
        if (int'(prod) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d", i, j, prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
