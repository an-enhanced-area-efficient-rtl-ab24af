// interleaver_addr_gen: reconfigurable multimode interleaver address
// generator for IEEE 802.11a/g and 802.16e (BPSK, QPSK, 16-QAM, 64-QAM,
// block sizes Ncbps = 48..576, d = 16 columns).
//
// The standard two-step permutation
//   m = (Ncbps/d)*(n mod d) + floor(n/d)
//   k = s*floor(m/s) + (m + Ncbps - floor(d*m/Ncbps)) mod s,  s = max(Nbpsc/2,1)
// is computed without division: n is split into a column counter i (fast,
// 0..d-1) and a row counter j (slow, 0..Ncbps/d-1), and
//   k = (Ncbps/d)*i + j + delta,  delta in {-2,-1,0,+1,+2},
// where delta depends only on i mod s and j mod s. The MOD_column and
// MOD_row circuits compute those residues with 2-bit adders, the selection
// unit picks j+delta with five multiplexers, and a multiplier and adder form
// k. Block size sets the row counter length and the multiplier operand
// through the block-size decoder (M6/M7).
//
// Interface and timing (this implementation's choices):
//   start     : latches mod_type and block_size and restarts both counters;
//               the first address (0) is on addr in the next cycle.
//   en        : when high (and start low), one address per clock; blocks
//               follow each other without a gap, Ncbps cycles per block.
//   addr      : address for the current counter state (combinational from
//               the counters and the latched configuration).
//   valid     : a configuration has been latched since reset.
//   first/last: addr is the first / last address of a block.
// Reset is asynchronous and active low. Only the modulation / block-size
// pairs of the encoding table are supported; an assertion flags others.
//
// Alongside the address generator, and independent of it, the top carries
// the 10-bit MOD7 unit built on the same end-around-carry principle as the
// MOD_row / MOD_column circuits (mod7_x -> mod7_r, combinational).
module interleaver_addr_gen
  import intlv_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              en,
  input  mod_type_e         mod_type,
  input  block_size_e       block_size,
  output logic [ADDR_W-1:0] addr,
  output logic              valid,
  output logic              first,
  output logic              last,
  input  logic [9:0]        mod7_x,
  output logic [2:0]        mod7_r
);

  intlv_cfg_t cfg_q;
  logic       run_q;

  logic [COL_W-1:0] col;
  logic [ROW_W-1:0] row, row_sel;
  logic [ROW_W:0]   nrows;
  logic [1:0]       mod_col, mod_r;
  logic             advance, col_wrap, row_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '{mod_type: MOD_BPSK, block_size: BS_48};
      run_q <= 1'b0;
    end else if (start) begin
      cfg_q <= '{mod_type: mod_type, block_size: block_size};
      run_q <= 1'b1;
    end
  end

  assign advance = run_q & en & ~start;

  block_size_decoder u_bsd (
    .block_size(cfg_q.block_size),
    .nrows     (nrows)
  );

  column_counter u_col (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(start),
    .en   (advance),
    .col  (col),
    .wrap (col_wrap)
  );

  row_counter u_row (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (start),
    .step   (col_wrap),
    .nrows  (nrows),
    .row    (row),
    .at_last(row_last)
  );

  mod_column u_modc (
    .col     (col),
    .mod_type(cfg_q.mod_type),
    .mod_col (mod_col)
  );

  mod_row u_modr (
    .row     (row),
    .mod_type(cfg_q.mod_type),
    .mod_r   (mod_r)
  );

  selection_unit u_sel (
    .row     (row),
    .mod_type(cfg_q.mod_type),
    .mod_col (mod_col),
    .mod_r   (mod_r),
    .row_sel (row_sel)
  );

  address_adder u_add (
    .nrows  (nrows),
    .col    (col),
    .row_sel(row_sel),
    .addr   (addr)
  );

  mod7_reduce #(.WIDTH(10)) u_mod7 (
    .x(mod7_x),
    .r(mod7_r)
  );

  assign valid = run_q;
  assign first = run_q & (col == '0) & (row == '0);
  assign last  = run_q & (col == COL_W'(D - 1)) & row_last;

  // Only the pairs of the encoding table are specified.
  always_ff @(posedge clk) begin
    if (start)
      assert (cfg_supported(mod_type, block_size))
        else $error("interleaver_addr_gen: unsupported mod_type/block_size pair");
  end

endmodule
