// rca2: 2-bit ripple carry adder written as flat sum-of-products logic.
//
// Adds the 2-bit numbers {b1,b0} and {a1,a0}, giving a 2-bit sum and a
// carry out. The three output equations are the two-level Boolean forms of
// the 2-bit adder used by the design's MOD circuits, so each output maps to
// a single small LUT. Purely combinational; no clock.
module rca2 (
  input  logic [1:0] b,     // first operand {B1,B0}
  input  logic [1:0] a,     // second operand {A1,A0}
  output logic [1:0] sum,   // {Sum1,Sum0}
  output logic       cout   // carry out
);

  always_comb begin
    sum[1] = (~b[1] & ~b[0] &  a[1])
           | (~b[1] &  a[1] & ~a[0])
           | (~b[1] &  b[0] & ~a[1] &  a[0])
           | ( b[1] & ~b[0] & ~a[1])
           | ( b[1] & ~a[1] & ~a[0])
           | ( b[1] &  b[0] &  a[1] &  a[0]);
    sum[0] = (~b[0] & a[0]) | (b[0] & ~a[0]);
    cout   = (b[0] & a[1] & a[0]) | (b[1] & a[1]) | (b[1] & b[0] & a[0]);
  end

endmodule
