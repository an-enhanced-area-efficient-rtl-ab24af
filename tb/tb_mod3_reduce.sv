// tb_mod3_reduce: checks x mod 3 exhaustively at 6, 8 and 16 input bits
// (the row counter width and the two benchmarked widths) and at an odd
// width of 7 bits.
module tb_mod3_reduce;
  logic [5:0]  x6;   logic [1:0] r6;
  logic [6:0]  x7;   logic [1:0] r7;
  logic [7:0]  x8;   logic [1:0] r8;
  logic [15:0] x16;  logic [1:0] r16;
  int checks = 0, failures = 0;

  mod3_reduce #(.WIDTH(6))  u6  (.x(x6),  .r(r6));
  mod3_reduce #(.WIDTH(7))  u7  (.x(x7),  .r(r7));
  mod3_reduce #(.WIDTH(8))  u8  (.x(x8),  .r(r8));
  mod3_reduce               u16 (.x(x16), .r(r16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int w, int v, logic [1:0] got);
    checks++;
    if (int'(got) != v % 3) begin
      failures++;
      if (failures < 10) $display("FAIL width %0d x=%0d got %0d", w, v, got);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      x6 = 6'(v); x7 = 7'(v); x8 = 8'(v); x16 = 16'(v);
      #1;
      if (v < 64)  chk(6, v, r6);
      if (v < 128) chk(7, v, r7);
      if (v < 256) chk(8, v, r8);
      chk(16, v, r16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
