// column_counter: the interleaver's column counter i, 0..d-1.
//
// Advances by one on every enabled clock; its value is compared with d-1 to
// wrap back to 0, and that comparison is the wrap strobe that advances the
// row counter. clear (synchronous, higher priority than en) restarts it at 0.
// Reset is asynchronous, active low, to 0.
// Timing: col is the registered count; wrap is combinational from col and en.
module column_counter
  import intlv_pkg::*;
#(
  parameter int unsigned DEPTH = D   // number of columns d
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // restart at 0
  input  logic             en,        // advance one step
  output logic [COL_W-1:0] col,       // current column i
  output logic             wrap       // en and col == d-1: row advances
);

  logic at_end;

  assign at_end = (col == COL_W'(DEPTH - 1));
  assign wrap   = en & at_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      col <= '0;
    else if (clear)  col <= '0;
    else if (en)     col <= at_end ? '0 : col + 1'b1;
  end

endmodule
