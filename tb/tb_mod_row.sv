// tb_mod_row: exhaustive check of the row MOD circuit. For every 6-bit row
// value and every modulation code, the output must be j mod 3 for BPSK /
// 64-QAM and j mod 2 for QPSK / 16-QAM.
module tb_mod_row;
  import intlv_pkg::*;
  logic [ROW_W-1:0] row;
  mod_type_e        mt;
  logic [1:0]       mod_r;
  int checks = 0, failures = 0;

  mod_row dut (.row(row), .mod_type(mt), .mod_r(mod_r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int m = 0; m < 4; m++)
      for (int j = 0; j < 64; j++) begin
        mt  = mod_type_e'(m);
        row = ROW_W'(j);
        #1;
        expv = (m == 1 || m == 3) ? j % 2 : j % 3;
        checks++;
        if (int'(mod_r) != expv) begin
          failures++;
          $display("FAIL mod_type=%0d row=%0d got %0d exp %0d", m, j, mod_r, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
