// mod3_reduce: x mod 3 for an input of any width.
//
// Generalises the MOD3 part of the column circuit: the input is cut into
// base-4 digits (2 bits each, the top digit zero-padded). A running 2-bit
// residue r starts at the lowest digit; each further digit is added with a
// 2-bit ripple carry adder and its carry is added back in at weight 1
// (end-around carry, since 4 = 1 mod 3). The second addition cannot carry
// because a carry from the first leaves a sum of at most 2. After the last
// digit the residue 3 is folded to 0 by complementing both bits.
// The chain has ceil(WIDTH/2)-1 stages of two adders each. Combinational.
module mod3_reduce #(
  parameter int unsigned WIDTH = 16   // input width in bits (>= 2)
) (
  input  logic [WIDTH-1:0] x,
  output logic [1:0]       r          // x mod 3
);

  localparam int unsigned NDIG = (WIDTH + 1) / 2;

  logic [2*NDIG-1:0] xp;
  logic [1:0]        acc  [NDIG];
  logic [1:0]        part [NDIG];
  logic              cry  [NDIG];
  logic              cry2 [NDIG];

  assign xp     = (2*NDIG)'(x);
  assign acc[0] = xp[1:0];
  assign part[0] = 2'b00;
  assign cry[0]  = 1'b0;
  assign cry2[0] = 1'b0;

  for (genvar g = 1; g < NDIG; g++) begin : g_stage
    rca2 u_add (.b(acc[g-1]), .a(xp[2*g+1:2*g]), .sum(part[g]), .cout(cry[g]));
    rca2 u_eac (.b(part[g]), .a({1'b0, cry[g]}), .sum(acc[g]), .cout(cry2[g]));
  end

  // The end-around addition never carries (see above).
  always_comb
    for (int g = 1; g < NDIG; g++)
      assert (cry2[g] == 1'b0) else $error("mod3_reduce: unexpected carry");

  assign r = (acc[NDIG-1][1] & acc[NDIG-1][0]) ? ~acc[NDIG-1] : acc[NDIG-1];

endmodule
