// tb_mod7_reduce: exhaustive check of x mod 7 at the default 10-bit width
// and at 16 bits.
module tb_mod7_reduce;
  logic [9:0]  x10; logic [2:0] r10;
  logic [15:0] x16; logic [2:0] r16;
  int checks = 0, failures = 0;

  mod7_reduce               u10 (.x(x10), .r(r10));
  mod7_reduce #(.WIDTH(16)) u16 (.x(x16), .r(r16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      x10 = 10'(v); x16 = 16'(v);
      #1;
      if (v < 1024) begin
        checks++;
        if (int'(r10) != v % 7) begin
          failures++;
          if (failures < 10) $display("FAIL width 10 x=%0d got %0d", v, r10);
        end
      end
      checks++;
      if (int'(r16) != v % 7) begin
        failures++;
        if (failures < 10) $display("FAIL width 16 x=%0d got %0d", v, r16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
