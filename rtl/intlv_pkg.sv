// intlv_pkg: constants and types shared by the multimode interleaver
// address generator.
//
// The interleaver follows the IEEE 802.11a/g and 802.16e block interleaver
// with d = 16 columns. A block of Ncbps coded bits is viewed as a matrix of
// Ncbps/d rows (row counter j) by d columns (column counter i); the output
// address is k = (Ncbps/d)*i + j plus a small row correction for 16-QAM and
// 64-QAM. The modulation code and the block-size code are those of the
// encoding table of the design (mod_type: BPSK 00, QPSK 11, 16-QAM 01,
// 64-QAM 10). The bit widths are sized for the largest block, Ncbps = 576.
package intlv_pkg;

  // Number of interleaver columns, d.
  localparam int unsigned D = 16;
  // Column counter width: counts 0..d-1.
  localparam int unsigned COL_W = 4;
  // Row counter width: counts 0..Ncbps/d-1, at most 35.
  localparam int unsigned ROW_W = 6;
  // Address width: addresses 0..575.
  localparam int unsigned ADDR_W = 10;

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'b00,
    MOD_QAM16 = 2'b01,
    MOD_QAM64 = 2'b10,
    MOD_QPSK  = 2'b11
  } mod_type_e;

  // Block-size codes. Bit 3 set selects the 48-bit block; otherwise bits
  // [2:0] select one of eight block sizes.
  typedef enum logic [3:0] {
    BS_96  = 4'b0000,
    BS_144 = 4'b0001,
    BS_192 = 4'b0010,
    BS_288 = 4'b0011,
    BS_384 = 4'b0100,
    BS_432 = 4'b0101,
    BS_480 = 4'b0110,
    BS_576 = 4'b0111,
    BS_48  = 4'b1000
  } block_size_e;

  // Configuration latched at the start of a run.
  typedef struct packed {
    mod_type_e   mod_type;
    block_size_e block_size;
  } intlv_cfg_t;

  // True for the modulation / block-size pairs of the encoding table, the
  // pairs the address generator is specified for.
  function automatic logic cfg_supported(mod_type_e m, block_size_e b);
    unique case (m)
      MOD_BPSK:  return b inside {BS_48, BS_96, BS_192, BS_288};
      MOD_QPSK:  return !b[3];
      MOD_QAM16: return b inside {BS_192, BS_288, BS_384, BS_576};
      MOD_QAM64: return b inside {BS_288, BS_384, BS_432, BS_576};
    endcase
  endfunction

endpackage
