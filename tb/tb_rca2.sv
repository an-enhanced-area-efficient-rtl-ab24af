// tb_rca2: exhaustive check of the 2-bit ripple carry adder against
// integer addition (all 16 operand pairs).
module tb_rca2;
  logic [1:0] a, b, sum;
  logic       cout;
  int checks = 0, failures = 0;

  rca2 dut (.b(b), .a(a), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        b = 2'(x); a = 2'(y);
        #1;
        checks++;
        if ({cout, sum} != 3'(x + y)) begin
          failures++;
          $display("FAIL %0d + %0d -> carry %0b sum %0d", x, y, cout, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
