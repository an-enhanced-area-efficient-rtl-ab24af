// row_counter: the interleaver's row counter j, 0..Ncbps/d-1.
//
// A variable-length counter: it advances when the column counter wraps and
// returns to 0 after nrows-1, where nrows = Ncbps/d comes from the
// block-size decoder. The block ends when the row counter is at its last
// value and the column counter wraps. clear (synchronous, higher priority
// than step) restarts it at 0. Reset is asynchronous, active low, to 0.
// Timing: row is the registered count; at_last is combinational from row.
module row_counter
  import intlv_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // restart at 0
  input  logic             step,      // advance one row (column wrap)
  input  logic [ROW_W:0]   nrows,     // count length Ncbps/d
  output logic [ROW_W-1:0] row,       // current row j
  output logic             at_last    // row == nrows-1
);

  assign at_last = ({1'b0, row} == nrows - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      row <= '0;
    else if (clear)  row <= '0;
    else if (step)   row <= at_last ? '0 : row + 1'b1;
  end

endmodule
