// tb_block_size_decoder: every block-size code must decode to Ncbps/16 of
// its block (48 -> 3, 96 -> 6, ..., 576 -> 36); unlisted codes with bit 3
// set decode as the 48-bit block.
module tb_block_size_decoder;
  import intlv_pkg::*;
  block_size_e     bs;
  logic [ROW_W:0]  nrows;
  int checks = 0, failures = 0;
  int ncbps [8] = '{96, 144, 192, 288, 384, 432, 480, 576};

  block_size_decoder dut (.block_size(bs), .nrows(nrows));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int c = 0; c < 16; c++) begin
      bs = block_size_e'(c);
      #1;
      expv = (c >= 8) ? 48 / 16 : ncbps[c] / 16;
      checks++;
      if (int'(nrows) != expv) begin
        failures++;
        $display("FAIL code %4b got %0d exp %0d", c, nrows, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
