// tb_address_adder: checks k = nrows*i + row_sel for every row count of the
// encoding table, every column and every in-range row term.
module tb_address_adder;
  import intlv_pkg::*;
  logic [ROW_W:0]    nrows;
  logic [COL_W-1:0]  col;
  logic [ROW_W-1:0]  row_sel;
  logic [ADDR_W-1:0] addr;
  int checks = 0, failures = 0;
  int lens [9] = '{3, 6, 9, 12, 18, 24, 27, 30, 36};

  address_adder dut (.nrows(nrows), .col(col), .row_sel(row_sel), .addr(addr));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (lens[k])
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < lens[k]; j++) begin
          nrows = 7'(lens[k]); col = 4'(i); row_sel = 6'(j);
          #1;
          checks++;
          if (int'(addr) != lens[k] * i + j) begin
            failures++;
            if (failures < 10) $display("FAIL %0d*%0d+%0d got %0d", lens[k], i, j, addr);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
