// tb_row_counter: runs the row counter at every row count of the encoding
// table with a random step pattern and compares value and at_last with a
// software model every cycle; also checks a clear.
module tb_row_counter;
  import intlv_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [ROW_W:0]   nrows;
  logic [ROW_W-1:0] row;
  logic at_last;
  int checks = 0, failures = 0;
  int lens [9] = '{3, 6, 9, 12, 18, 24, 27, 30, 36};

  row_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear), .step(step),
                   .nrows(nrows), .row(row), .at_last(at_last));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, wraps;
    nrows = 7'd3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (lens[k]) begin
      @(negedge clk);
      nrows = 7'(lens[k]); clear = 1; step = 0;
      @(posedge clk);
      @(negedge clk);
      clear = 0; model = 0; wraps = 0;
      for (int t = 0; t < 4 * lens[k] + 20; t++) begin
        step = ($urandom_range(0, 2) != 0);
        #1;
        checks++;
        if (int'(row) != model || at_last != (model == lens[k] - 1)) begin
          failures++;
          $display("FAIL nrows=%0d row=%0d model=%0d at_last=%0b", lens[k], row, model, at_last);
        end
        @(posedge clk);
        if (step) begin
          if (model == lens[k] - 1) begin model = 0; wraps++; end
          else model++;
        end
        @(negedge clk);
      end
      checks++;
      if (wraps < 1) begin failures++; $display("FAIL no wrap at nrows=%0d", lens[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
