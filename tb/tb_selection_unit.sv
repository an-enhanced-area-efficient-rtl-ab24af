// tb_selection_unit: for every modulation, every row j of the largest block
// (36 rows, Ncbps = 576) and every column residue, the selected row term
// must equal k - (Ncbps/d)*i, with k from the standard two-step permutation
// formula evaluated directly. The MOD inputs are computed with % here.
module tb_selection_unit;
  import intlv_pkg::*;
  logic [ROW_W-1:0] row, row_sel;
  mod_type_e        mt;
  logic [1:0]       mod_col, mod_r;
  int checks = 0, failures = 0;

  selection_unit dut (.row(row), .mod_type(mt), .mod_col(mod_col), .mod_r(mod_r), .row_sel(row_sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // k for index n of a block of ncbps bits, s bits per half-symbol.
  function automatic int ref_k(int n, int ncbps, int s);
    int m;
    m = (ncbps / 16) * (n % 16) + n / 16;
    return s * (m / s) + (m + ncbps - (16 * m) / ncbps) % s;
  endfunction

  initial begin
    int s, nr, k, expv;
    nr = 36;
    for (int m = 0; m < 4; m++) begin
      mt = mod_type_e'(m);
      s  = (m == 1) ? 2 : (m == 2) ? 3 : 1;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < nr; j++) begin
          k       = ref_k(16 * j + i, 16 * nr, s);
          expv    = k - nr * i;
          row     = ROW_W'(j);
          mod_col = 2'((m == 1 || m == 3) ? i % 2 : i % 3);
          mod_r   = 2'((m == 1 || m == 3) ? j % 2 : j % 3);
          #1;
          checks++;
          if (int'(row_sel) != expv) begin
            failures++;
            $display("FAIL mod=%0d i=%0d j=%0d got %0d exp %0d", m, i, j, row_sel, expv);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
