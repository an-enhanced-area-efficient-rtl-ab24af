// mod_row: MOD2 / MOD3 of the 6-bit row counter.
//
// The row counter value j (0..35) is reduced mod 3 by the same digit-sum
// principle as the column circuit: its three base-4 digits are added with
// 2-bit ripple carry adders and end-around carries, and a final residue of
// 3 is folded to 0 (mod3_reduce with WIDTH = 6). The MOD2 value is j[0].
// mod_type[0] selects MOD3 (0: BPSK, 64-QAM) or MOD2 (1: QPSK, 16-QAM).
// The design names this circuit and its 6-bit input; the adder chain inside
// is this implementation's choice, extending the column circuit.
// Combinational.
module mod_row
  import intlv_pkg::*;
(
  input  logic [ROW_W-1:0] row,       // row counter value j
  input  mod_type_e        mod_type,  // modulation code
  output logic [1:0]       mod_r      // j mod 3 or {0, j mod 2}
);

  logic [1:0] m3;

  mod3_reduce #(.WIDTH(ROW_W)) u_mod3 (.x(row), .r(m3));

  assign mod_r = mod_type[0] ? {1'b0, row[0]} : m3;

endmodule
