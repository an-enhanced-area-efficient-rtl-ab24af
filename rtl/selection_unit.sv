// selection_unit: picks the row term of the interleaver address.
//
// For BPSK and QPSK the address is (Ncbps/d)*i + j; for 16-QAM and 64-QAM
// the row term is j shifted by -2..+2 depending on i mod s and j mod s
// (s = 2 for 16-QAM, 3 for 64-QAM). Instead of modulo and floor arithmetic,
// five multiplexers choose among j, j+1, j+2, j-1 and j-2:
//   M2: mod_type[0] ? j+1 : j+2           (16-QAM / 64-QAM)
//   M3: mod_row != 0 ? j-1 : M2           (used when i mod s = 1)
//   M4: mod_row[1]  ? j-2 : j+1           (used when i mod s = 2, 64-QAM)
//   M5: mod_col = 0 -> j, 1 -> M3, 2 -> M4
//   M1: ^mod_type   ? M5 : j              (BPSK/QPSK take j directly)
// All selects come from the modulation code and the two MOD circuits; no
// external control signals are needed. The structure follows the design's
// selection unit. Combinational.
module selection_unit
  import intlv_pkg::*;
(
  input  logic [ROW_W-1:0] row,       // row counter j
  input  mod_type_e        mod_type,
  input  logic [1:0]       mod_col,   // i mod s
  input  logic [1:0]       mod_r,     // j mod s
  output logic [ROW_W-1:0] row_sel    // row term of the address
);

  logic [ROW_W-1:0] inc1, inc2, dec1, dec2;
  logic [ROW_W-1:0] m2, m3, m4, m5;

  always_comb begin
    inc1 = row + ROW_W'(1);
    inc2 = row + ROW_W'(2);
    dec1 = row - ROW_W'(1);
    dec2 = row - ROW_W'(2);
    m2   = mod_type[0] ? inc1 : inc2;
    m3   = (|mod_r) ? dec1 : m2;
    m4   = mod_r[1] ? dec2 : inc1;
    unique case (mod_col)
      2'd1:    m5 = m3;
      2'd2:    m5 = m4;
      default: m5 = row;
    endcase
    row_sel = (^mod_type) ? m5 : row;
  end

endmodule
