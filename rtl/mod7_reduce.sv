// mod7_reduce: x mod 7 by the same end-around-carry digit sum as the MOD3
// circuits.
//
// Since 8 = 1 (mod 7), x mod 7 equals the sum of its base-8 digits mod 7.
// The input is cut into 3-bit digits (top digit zero-padded); a running
// 3-bit residue is added to each further digit, and the carry out of that
// addition is added back at weight 1. The second addition cannot carry,
// because a carry leaves a sum of at most 6. At the end the residue 7 is
// folded to 0 by complementing all three bits.
// The default width of 10 bits is the configuration benchmarked for the
// MOD7 extension. Combinational.
module mod7_reduce #(
  parameter int unsigned WIDTH = 10   // input width in bits (>= 3)
) (
  input  logic [WIDTH-1:0] x,
  output logic [2:0]       r          // x mod 7
);

  localparam int unsigned NDIG = (WIDTH + 2) / 3;

  logic [3*NDIG-1:0] xp;
  logic [2:0]        acc [NDIG];

  assign xp     = (3*NDIG)'(x);
  assign acc[0] = xp[2:0];

  for (genvar g = 1; g < NDIG; g++) begin : g_stage
    logic [3:0] part;
    assign part   = {1'b0, acc[g-1]} + {1'b0, xp[3*g+2:3*g]};
    assign acc[g] = part[2:0] + {2'b00, part[3]};
  end

  assign r = (&acc[NDIG-1]) ? ~acc[NDIG-1] : acc[NDIG-1];

endmodule
