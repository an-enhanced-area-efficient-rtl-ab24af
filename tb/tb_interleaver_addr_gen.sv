// tb_interleaver_addr_gen: end-to-end test of the multimode interleaver
// address generator at its only (full) size.
//
// Reference: the standard two-step permutation, evaluated directly for the
// running bit index n of the block:
//   m = (Ncbps/16)*(n mod 16) + floor(n/16)
//   k = s*floor(m/s) + (m + Ncbps - floor(16*m/Ncbps)) mod s
// Every address, first and last flag is compared every cycle.
// Phases:
//   1. all 20 modulation / block-size pairs of the encoding table, two
//      back-to-back blocks each with en held high; each block must take
//      exactly Ncbps cycles and be a permutation of 0..Ncbps-1;
//   2. the first 32 addresses of the four published example sequences
//      (BPSK 48, QPSK 96, 16-QAM 192, 64-QAM 384) against literal values;
//   3. random stalls (en low) and mode switches (start in mid-block);
//   4. the separate 10-bit MOD7 unit, all inputs.
// Mechanisms counted, each must occur: every row correction -2..+2,
// stalls, mid-block mode switches, back-to-back block wraps, each
// modulation.
module tb_interleaver_addr_gen;
  import intlv_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, en = 0;
  mod_type_e   mt = MOD_BPSK;
  block_size_e bs = BS_48;
  logic [ADDR_W-1:0] addr;
  logic valid, first, last;
  logic [9:0] mod7_x = '0;
  logic [2:0] mod7_r;

  int checks = 0, failures = 0;

  interleaver_addr_gen dut (
    .clk(clk), .rst_n(rst_n), .start(start), .en(en),
    .mod_type(mt), .block_size(bs),
    .addr(addr), .valid(valid), .first(first), .last(last),
    .mod7_x(mod7_x), .mod7_r(mod7_r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { mod_type_e m; block_size_e b; } cfg_s;

  // First 32 addresses of the four published example sequences.
  int pub [4][32] = '{
    '{0, 3, 6, 9, 12, 15, 18, 21, 24, 27, 30, 33, 36, 39, 42, 45,
      1, 4, 7, 10, 13, 16, 19, 22, 25, 28, 31, 34, 37, 40, 43, 46},
    '{0, 6, 12, 18, 24, 30, 36, 42, 48, 54, 60, 66, 72, 78, 84, 90,
      1, 7, 13, 19, 25, 31, 37, 43, 49, 55, 61, 67, 73, 79, 85, 91},
    '{0, 13, 24, 37, 48, 61, 72, 85, 96, 109, 120, 133, 144, 157, 168, 181,
      1, 12, 25, 36, 49, 60, 73, 84, 97, 108, 121, 132, 145, 156, 169, 180},
    '{0, 26, 49, 72, 98, 121, 144, 170, 193, 216, 242, 265, 288, 314, 337, 360,
      1, 24, 50, 73, 96, 122, 145, 168, 194, 217, 240, 266, 289, 312, 338, 361}};
  cfg_s pub_cfg [4] = '{'{MOD_BPSK, BS_48}, '{MOD_QPSK, BS_96},
                        '{MOD_QAM16, BS_192}, '{MOD_QAM64, BS_384}};

  // ---- reference model state --------------------------------------------
  int m_ncbps, m_s, m_n;
  bit m_run = 0;
  int cnt_delta [5];          // row correction -2..+2, index delta+2
  int cnt_stall = 0, cnt_switch = 0, cnt_wrap = 0;
  int cnt_mod [4];
  bit seen [576];             // addresses produced in the current block
  int pub_sel = -1, pub_idx;  // published example being compared, if any

  function automatic int ncbps_of(block_size_e b);
    case (b)
      BS_48:  return 48;   BS_96:  return 96;   BS_144: return 144;
      BS_192: return 192;  BS_288: return 288;  BS_384: return 384;
      BS_432: return 432;  BS_480: return 480;  BS_576: return 576;
      default: return 48;
    endcase
  endfunction

  function automatic int s_of(mod_type_e m);
    return (m == MOD_QAM16) ? 2 : (m == MOD_QAM64) ? 3 : 1;
  endfunction

  function automatic int ref_k(int n, int ncbps, int s);
    int m;
    m = (ncbps / 16) * (n % 16) + n / 16;
    return s * (m / s) + (m + ncbps - (16 * m) / ncbps) % s;
  endfunction

  // Compare outputs with the model (call between clock edges).
  task automatic check_outputs();
    int k;
    checks++;
    if (valid != m_run) begin
      failures++; $display("FAIL valid=%0b exp %0b", valid, m_run);
    end
    if (!m_run) return;
    if (addr < 576) seen[addr] = 1;
    if (pub_sel >= 0 && pub_idx < 32) begin
      checks++;
      if (int'(addr) != pub[pub_sel][pub_idx]) begin
        failures++;
        $display("FAIL example %0d index %0d: addr=%0d published %0d",
                 pub_sel, pub_idx, addr, pub[pub_sel][pub_idx]);
      end
      pub_idx++;
    end
    k = ref_k(m_n, m_ncbps, m_s);
    cnt_delta[k - (m_ncbps / 16) * (m_n % 16) - m_n / 16 + 2]++;
    if (int'(addr) != k || first != (m_n == 0) || last != (m_n == m_ncbps - 1)) begin
      failures++;
      if (failures < 20)
        $display("FAIL Ncbps=%0d s=%0d n=%0d addr=%0d exp %0d first=%0b last=%0b",
                 m_ncbps, m_s, m_n, addr, k, first, last);
    end
  endtask

  // One clock: check, apply inputs, clock, update model.
  task automatic cycle(bit st, bit e, mod_type_e nm = mt, block_size_e nb = bs);
    @(negedge clk);
    #1;
    check_outputs();
    start = st; en = e;
    if (st) begin mt = nm; bs = nb; end
    @(posedge clk);
    if (st) begin
      if (m_run && m_n != 0) cnt_switch++;
      m_run = 1; m_n = 0;
      m_ncbps = ncbps_of(nb); m_s = s_of(nm);
      cnt_mod[nm]++;
    end else if (m_run && e) begin
      if (m_n == m_ncbps - 1) begin m_n = 0; cnt_wrap++; end
      else m_n++;
    end else if (m_run) cnt_stall++;
  endtask

  // ---- stimulus -----------------------------------------------------------
  cfg_s cfgs [20] = '{
    '{MOD_BPSK, BS_48},   '{MOD_BPSK, BS_96},   '{MOD_BPSK, BS_192},  '{MOD_BPSK, BS_288},
    '{MOD_QPSK, BS_96},   '{MOD_QPSK, BS_144},  '{MOD_QPSK, BS_192},  '{MOD_QPSK, BS_288},
    '{MOD_QPSK, BS_384},  '{MOD_QPSK, BS_432},  '{MOD_QPSK, BS_480},  '{MOD_QPSK, BS_576},
    '{MOD_QAM16, BS_192}, '{MOD_QAM16, BS_288}, '{MOD_QAM16, BS_384}, '{MOD_QAM16, BS_576},
    '{MOD_QAM64, BS_288}, '{MOD_QAM64, BS_384}, '{MOD_QAM64, BS_432}, '{MOD_QAM64, BS_576}};

  initial begin
    int cyc;

    repeat (3) @(posedge clk);
    // Before any start: valid low.
    @(negedge clk); checks++; if (valid) begin failures++; $display("FAIL valid before start"); end
    rst_n = 1;

    // Phase 1: every supported pair, two blocks back to back.
    foreach (cfgs[c]) begin
      cycle(1, 0, cfgs[c].m, cfgs[c].b);
      for (int blk = 0; blk < 2; blk++) begin
        foreach (seen[a]) seen[a] = 0;
        cyc = 0;
        do begin
          cycle(0, 1);
          cyc++;
        end while (m_n != 0);
        checks++;
        if (cyc != m_ncbps) begin
          failures++; $display("FAIL block took %0d cycles, exp %0d", cyc, m_ncbps);
        end
        for (int a = 0; a < m_ncbps; a++) begin
          checks++;
          if (!seen[a]) begin
            failures++;
            if (failures < 20) $display("FAIL address %0d missing (Ncbps=%0d)", a, m_ncbps);
          end
        end
      end
    end

    // Phase 2: published example sequences.
    foreach (pub_cfg[p]) begin
      cycle(1, 0, pub_cfg[p].m, pub_cfg[p].b);
      pub_sel = p; pub_idx = 0;
      for (int t = 0; t < 32; t++) cycle(0, 1);
      pub_sel = -1;
      checks++;
      if (pub_idx != 32) begin failures++; $display("FAIL example %0d compared %0d", p, pub_idx); end
    end

    // Phase 3: random stalls and mid-block mode switches.
    for (int t = 0; t < 20000; t++) begin
      if ($urandom_range(0, 299) == 0) begin
        int c;
        c = $urandom_range(0, 19);
        cycle(1, 1, cfgs[c].m, cfgs[c].b);
      end else
        cycle(0, $urandom_range(0, 3) != 0);
    end

    // Phase 4: the side-by-side MOD7 unit, all 1024 inputs.
    for (int v = 0; v < 1024; v++) begin
      mod7_x = 10'(v);
      #1;
      checks++;
      if (int'(mod7_r) != v % 7) begin
        failures++;
        if (failures < 20) $display("FAIL mod7 x=%0d got %0d", v, mod7_r);
      end
    end

    // Every mechanism must have happened.
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (cnt_delta[d] == 0) begin failures++; $display("FAIL row correction %0d never used", d - 2); end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (cnt_mod[m] == 0) begin failures++; $display("FAIL modulation %0d never run", m); end
    end
    checks++; if (cnt_stall  == 0) begin failures++; $display("FAIL no stall"); end
    checks++; if (cnt_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    checks++; if (cnt_wrap   == 0) begin failures++; $display("FAIL no block wrap"); end
    $display("corrections -2..+2: %0d %0d %0d %0d %0d; stalls %0d; mode switches %0d; block wraps %0d",
             cnt_delta[0], cnt_delta[1], cnt_delta[2], cnt_delta[3], cnt_delta[4],
             cnt_stall, cnt_switch, cnt_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
