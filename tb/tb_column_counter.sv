// tb_column_counter: drives the column counter with a random enable and
// occasional clears and compares it with a software model every cycle:
// count value, wrap strobe, clear priority and the 16-cycle wrap period.
module tb_column_counter;
  import intlv_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [COL_W-1:0] col;
  logic wrap;
  int checks = 0, failures = 0, cycles = 0;
  int model = 0, wraps = 0, en_since_wrap = 0;

  column_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .col(col), .wrap(wrap));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 3) != 0);
      clear = (t > 1000 && $urandom_range(0, 99) == 0);
      #1;
      checks++;
      if (int'(col) != model || wrap != (en && model == D - 1)) begin
        failures++;
        $display("FAIL t=%0d col=%0d model=%0d wrap=%0b", t, col, model, wrap);
      end
      @(posedge clk);
      if (clear) begin
        model = 0; en_since_wrap = 0;
      end else if (en) begin
        en_since_wrap++;
        if (model == D - 1) begin
          model = 0; wraps++;
          // Without clears, a wrap comes after exactly d enabled cycles.
          if (t < 1000) begin
            checks++;
            if (en_since_wrap != D) begin
              failures++;
              $display("FAIL wrap after %0d enabled cycles", en_since_wrap);
            end
          end
          en_since_wrap = 0;
        end else model++;
      end
    end
    checks++;
    if (wraps < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
