// tb_mod_column: exhaustive check of the column MOD circuit. For every
// column value 0..15 and every modulation code, the output must be i mod 3
// for BPSK / 64-QAM and i mod 2 for QPSK / 16-QAM.
module tb_mod_column;
  import intlv_pkg::*;
  logic [COL_W-1:0] col;
  mod_type_e        mt;
  logic [1:0]       mod_col;
  int checks = 0, failures = 0;

  mod_column dut (.col(col), .mod_type(mt), .mod_col(mod_col));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int m = 0; m < 4; m++)
      for (int c = 0; c < 16; c++) begin
        mt  = mod_type_e'(m);
        col = COL_W'(c);
        #1;
        expv = (m == 1 || m == 3) ? c % 2 : c % 3;
        checks++;
        if (int'(mod_col) != expv) begin
          failures++;
          $display("FAIL mod_type=%0d col=%0d got %0d exp %0d", m, c, mod_col, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
