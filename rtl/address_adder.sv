// address_adder: multiplier and adder forming the interleaver address.
//
// k = (Ncbps/d) * i + row_sel, where i is the column counter, Ncbps/d the
// decoded rows per block and row_sel the row term chosen by the selection
// unit. A 7x4-bit multiply and a 10-bit add. Combinational.
module address_adder
  import intlv_pkg::*;
(
  input  logic [ROW_W:0]    nrows,    // Ncbps/d
  input  logic [COL_W-1:0]  col,      // column i
  input  logic [ROW_W-1:0]  row_sel,  // selected row term
  output logic [ADDR_W-1:0] addr      // interleaver address k
);

  assign addr = ADDR_W'(nrows * col) + ADDR_W'(row_sel);

endmodule
