// block_size_decoder: block-size code to rows per block (Ncbps/d).
//
// Two multiplexers: an 8:1 multiplexer (M6) picks one of the eight block
// sizes 96..576 from code bits [2:0], and a 2:1 multiplexer (M7) overrides it
// with the 48-bit block when code bit 3 is set. The output is the number of
// rows Ncbps/d, which is both the row counter's count length and the
// column-to-column address increment. Codes 1001..1111, which the encoding
// table does not list, decode as the 48-bit block. Combinational.
module block_size_decoder
  import intlv_pkg::*;
(
  input  block_size_e      block_size,  // 4-bit block-size code
  output logic [ROW_W:0]   nrows        // Ncbps/d: 3, 6, 9, 12, 18, 24, 27, 30, 36
);

  logic [ROW_W:0] m6;

  always_comb begin
    unique case (block_size[2:0])
      3'b000: m6 = 7'd6;    //  96
      3'b001: m6 = 7'd9;    // 144
      3'b010: m6 = 7'd12;   // 192
      3'b011: m6 = 7'd18;   // 288
      3'b100: m6 = 7'd24;   // 384
      3'b101: m6 = 7'd27;   // 432
      3'b110: m6 = 7'd30;   // 480
      3'b111: m6 = 7'd36;   // 576
    endcase
    nrows = block_size[3] ? 7'd3 : m6;  // M7: 48
  end

endmodule
