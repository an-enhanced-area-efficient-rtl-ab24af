// mod_column: MOD2 / MOD3 of the 4-bit column counter.
//
// The column counter value C = {C3,C2,C1,C0} (0..15) is split into two
// base-4 digits. Because 4 = 1 (mod 3), C mod 3 equals the sum of the
// digits mod 3:
//   1. {s1,s0},c0 = {C1,C0} + {C3,C2}      (2-bit ripple carry adder)
//   2. {s3,s2}    = {s1,s0} + {0,c0}       (end-around carry; cannot overflow
//                                           because c0 = 1 implies s <= 2)
//   3. out1 = ({s3,s2} == 3) ? 0 : {s3,s2} (the value 3 is folded to 0 by
//                                           complementing both bits)
// The MOD2 value is C0. A final multiplexer picks MOD3 when mod_type[0] = 0
// (BPSK, 64-QAM) and MOD2 when mod_type[0] = 1 (QPSK, 16-QAM); only the
// 16-QAM and 64-QAM results are used by the address generator.
// These steps follow the design's MOD_column circuit. Combinational.
module mod_column
  import intlv_pkg::*;
(
  input  logic [COL_W-1:0] col,       // column counter value i
  input  mod_type_e        mod_type,  // modulation code
  output logic [1:0]       mod_col    // i mod 3 or {0, i mod 2}
);

  logic [1:0] s_lo;     // {s1,s0}
  logic       c_lo;     // carry of the first addition
  logic [1:0] s_hi;     // {s3,s2}
  logic       c_hi;     // carry of the second addition (always 0)
  logic [1:0] out1;     // MOD3 value

  rca2 u_add0 (.b(col[1:0]), .a(col[3:2]), .sum(s_lo), .cout(c_lo));
  rca2 u_add1 (.b(s_lo), .a({1'b0, c_lo}), .sum(s_hi), .cout(c_hi));

  always_comb begin
    out1    = (s_hi[1] & s_hi[0]) ? ~s_hi : s_hi;
    mod_col = mod_type[0] ? {1'b0, col[0]} : out1;
  end

  // The second addition never carries (see step 2 above).
  always_comb assert (c_hi == 1'b0) else $error("mod_column: unexpected carry");

endmodule
