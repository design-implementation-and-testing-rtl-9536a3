// tb_mldram_top: end-to-end test of the multilevel DRAM test chip.
//
// Acts as the external tester: it drives every control pin in the access
// sequences of the chip description (one transition every 30 ns) and checks
// D_OUT against values worked out here, independently of the design:
//   * a level k written into an N-level cell is sent as a thermometer code,
//     k ones first, one bit per used section;
//   * an even wordline reads back the same code; an odd wordline stores the
//     complement level and reads back the code reversed (k ones last);
//   * a column address c sits on physical bitline (c >> 5) + 8*(c & 31),
//     which picks the 5-by-5 block row used to restrict 4- and 3-level
//     addresses, and where the restored cell voltage is checked.
// Operating modes: 6 levels (sections A..E), 4 levels (B..D), 3 levels
// (B,C or C,D), 2 levels (conventional).  Mechanisms counted, each must
// occur: multilevel write/restore, reference generation, parallel sensing
// and serial read-out, odd-wordline reversed read-out, each of the five
// operating configurations, 2-level write and read, data bus 31 (two
// columns only), D_OUT idling high on precharged buses, and the functional
// test pattern (write target, write the neighbouring row, read target),
// and 4-/3-level reads whose signals are spread over full-length lines
// (all five sections / all five rows) just before sensing, with the cell
// signal checked against (Ccell*Vcell + 5*Csbl*VDD/2) / (Ccell + 5*Csbl).
// Runs the top with all parameters at their defaults.
module tb_mldram_top;
  import mldram_pkg::*;

  typedef enum int {M6, M4, M3BC, M3CD, M2} mode_e;

  localparam real VDD = 1.8;
  localparam real C_CELL = 50.0;  // cell capacitance, fF
  localparam real C_SBL  = 70.0;  // one sub-bitline, fF

  logic        clk = 0;
  logic [10:0] addr = '0;
  logic xdec_en = 0, ydec_en = 0, cnct = 1, sense = 0, eq_n = 0, gen = 0;
  logic write = 0, d_in = 0;
  logic swt0_all = 0, swt0_bc = 0, swt0_cd = 0, swt1_all = 0, swt1_bc = 0, swt1_cd = 0;
  logic ref0_all = 0, ref0_12 = 0, ref0_23 = 0, ref1_all = 0, ref1_12 = 0, ref1_23 = 0;
  logic rgx1 = 0, rgx2 = 0, rgx3 = 0;
  logic d_out;

  mldram_top dut (.*);

  int checks = 0, failures = 0;
  int n_mlwrite = 0, n_refgen = 0, n_mlread = 0, n_oddrev = 0, n_db31 = 0;
  int n_idle_high = 0, n_full = 0, n_w2 = 0, n_r2 = 0, n_pattern = 0;
  bit full_share = 0;  // 4-/3-level reads: share over full-length lines before sensing
  int n_mode [5] = '{0, 0, 0, 0, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step();
    #30;
  endtask

  function automatic int phys_of(int c);
    return (c >> 5) + (c & 31) * 8;
  endfunction

  function automatic int first_sec(mode_e m);
    case (m)
      M6:      return 0;
      M4:      return 1;
      M3BC:    return 1;
      M3CD:    return 2;
      default: return 0;
    endcase
  endfunction

  function automatic int nsec(mode_e m);
    case (m)
      M6:      return 5;
      M4:      return 3;
      default: return 2;
    endcase
  endfunction

  // horizontal switches of one polarity for the mode's sub-array
  task automatic set_h(mode_e m, bit pol, logic v);
    logic a, b, c;
    a = (m == M6 || m == M2) ? v : 1'b0;
    b = (m == M6 || m == M2 || m == M4 || m == M3BC) ? v : 1'b0;
    c = (m == M6 || m == M2 || m == M4 || m == M3CD) ? v : 1'b0;
    if (!pol) begin swt0_all = a; swt0_bc = b; swt0_cd = c; end
    else          begin swt1_all = a; swt1_bc = b; swt1_cd = c; end
  endtask

  task automatic set_v(mode_e m, bit pol, logic v);
    logic a, b, c;
    a = (m == M6 || m == M2) ? v : 1'b0;
    b = (m == M6 || m == M2 || m == M4 || m == M3BC) ? v : 1'b0;
    c = (m == M6 || m == M2 || m == M4 || m == M3CD) ? v : 1'b0;
    if (!pol) begin ref0_all = a; ref0_12 = b; ref0_23 = c; end
    else          begin ref1_all = a; ref1_12 = b; ref1_23 = c; end
  endtask

  task automatic latch_row(int sec, int wl);
    addr = {4'b0, 3'(sec), 4'(wl)};
    step();
    clk = 1; step();
    clk = 0;
  endtask

  task automatic col_addr(int sec, int c);
    addr = {3'(sec), 8'(c)};
  endtask

  // expected read-out bit i of level k in an n-section code
  function automatic logic exp_bit(int k, int n, int i, bit odd);
    return odd ? (i >= n - k) : (i < k);
  endfunction

  task automatic ml_write(mode_e m, int sec, int wl, int c, int k);
    int  n   = nsec(m);
    int  f   = first_sec(m);
    bit  odd = wl[0];
    int  p   = phys_of(c);
    real v;
    latch_row(sec, wl);
    xdec_en = 1; rgx1 = 1; step();
    eq_n = 1; step();
    sense = 1; step();
    for (int i = 0; i < n; i++) begin
      col_addr(f + i, c);
      d_in = (i < k); ydec_en = 1; write = 1; step();
      ydec_en = 0; write = 0; step();
    end
    cnct = 0; step();
    sense = 0; step();
    set_h(m, odd, 1); step();
    xdec_en = 0; step();
    set_h(m, odd, 0); rgx1 = 0; step();
    cnct = 1; eq_n = 0; step();
    // the trapped level: k/n of VDD, the complement level on an odd row
    v = dut.u_core.cell_v[sec][wl][p];
    check(v > VDD * real'(odd ? n - k : k) / real'(n) - 1e-6 &&
          v < VDD * real'(odd ? n - k : k) / real'(n) + 1e-6,
          $sformatf("mode %0d write: cell %0d/%0d/%0d holds %f for level %0d", m, sec, wl, p, v, k));
    n_mlwrite++;
    n_mode[m]++;
  endtask

  task automatic ml_read(mode_e m, int sec, int wl, int c, int k);
    int n   = nsec(m);
    int f   = first_sec(m);
    bit odd = wl[0];
    int p   = phys_of(c);
    latch_row(sec, wl);
    // reference generation
    cnct = 0; step();
    // every reference and generate wordline on: all three waveforms high
    rgx1 = 1; rgx2 = 1; rgx3 = 1; step();
    gen = 1; step();
    gen = 0; step();
    set_v(m, 0, 1); set_v(m, 1, 1); step();
    rgx1 = 0; rgx2 = 0; rgx3 = 0; step();
    for (int i = 0; i < n; i++) begin
      real r = dut.u_core.dum_c[f + i][(p / 5) * 5 + REF_ROW];
      real e = VDD * real'(2 * i + 1) / real'(2 * n);
      check(r > e - 1e-6 && r < e + 1e-6,
            $sformatf("mode %0d reference in section %0d is %f, expected %f", m, f + i, r, e));
    end
    n_refgen++;
    // precharge everything, then leave cell lines horizontal, references vertical
    set_h(m, 0, 1); set_h(m, 1, 1); step();
    cnct = 1; eq_n = 0; step();
    set_h(m, !odd, 0); set_v(m, odd, 0); step();
    eq_n = 1; step();
    xdec_en = 1; rgx2 = 1; step();
    if (full_share && m != M6) begin
      // spread both signals over full-length lines (all five sub-bitlines),
      // as a chip with 6-level line lengths would see them
      real vcell = VDD * real'(odd ? n - k : k) / real'(n);
      real vsig, e;
      set_h(M6, odd, 1); set_v(M6, !odd, 1); step();
      vsig = odd ? dut.u_core.vc[sec][p] : dut.u_core.vt[sec][p];
      e = (C_CELL * vcell + 5.0 * C_SBL * VDD / 2.0) / (C_CELL + 5.0 * C_SBL);
      check(vsig > e - 1e-6 && vsig < e + 1e-6,
            $sformatf("mode %0d full-length cell signal %f, expected %f", m, vsig, e));
      set_h(M6, odd, 0); set_v(M6, !odd, 0); step();
      n_full++;
    end
    set_h(m, odd, 0); set_v(m, !odd, 0); step();
    sense = 1; step();
    for (int i = 0; i < n; i++) begin
      col_addr(f + i, c);
      check(d_out == 1'b1, "D_OUT not high while data buses precharged");
      n_idle_high++;
      ydec_en = 1; step();
      check(d_out == exp_bit(k, n, i, odd),
            $sformatf("mode %0d read sec %0d wl %0d col %0d level %0d bit %0d: got %b",
                      m, sec, wl, c, k, i, d_out));
      ydec_en = 0; step();
    end
    n_mlread++;
    if (odd) n_oddrev++;
    if (p >= 248) n_db31++;
    // restore what was sensed
    rgx2 = 0; rgx1 = 1; step();
    cnct = 0; step();
    sense = 0; step();
    set_h(m, odd, 1); step();
    xdec_en = 0; step();
    set_h(m, odd, 0); rgx1 = 0; step();
    cnct = 1; eq_n = 0; step();
    begin
      real v = dut.u_core.cell_v[sec][wl][p];
      real e = VDD * real'(odd ? n - k : k) / real'(n);
      check(v > e - 1e-6 && v < e + 1e-6,
            $sformatf("mode %0d restore: cell holds %f, expected %f", m, v, e));
    end
  endtask

  // conventional one-bit access; rw = 1 writes d, rw = 0 reads and checks d
  task automatic bit_access(int sec, int wl, int c, logic d, bit rw);
    bit odd = wl[0];
    latch_row(sec, wl);
    set_h(M2, odd, 1); set_v(M2, !odd, 1); step();
    eq_n = 1; step();
    xdec_en = 1; step();
    set_h(M2, odd, 0); set_v(M2, !odd, 0); step();
    sense = 1; step();
    col_addr(sec, c);
    if (rw) begin
      d_in = d; ydec_en = 1; write = 1; step();
      ydec_en = 0; write = 0; step();
      n_w2++;
    end else begin
      ydec_en = 1; step();
      check(d_out == d, $sformatf("2-level read sec %0d wl %0d col %0d: got %b want %b",
                                  sec, wl, c, d_out, d));
      ydec_en = 0; step();
      n_r2++;
    end
    xdec_en = 0; step();
    sense = 0; step();
    eq_n = 0; step();
    n_mode[M2]++;
  endtask

  // a column address whose physical position lies in block rows lo..hi
  function automatic int pick_col(int lo, int hi);
    int c;
    do c = int'($urandom_range(255)); while (phys_of(c) >= 250 || phys_of(c) % 5 < lo || phys_of(c) % 5 > hi);
    return c;
  endfunction

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step(); step();
    // 6 levels per cell: every section, even and odd wordlines, all levels
    for (int s = 0; s < 5; s++)
      for (int k = 0; k < 6; k++) begin
        automatic int wl = (s * 5 + k) % 12;
        automatic int c = (k == 0) ? 31 : (k == 1 ? 63 : pick_col(0, 4));
        ml_write(M6, s, wl, c, k);
        ml_read(M6, s, wl, c, k);
      end
    // 4 levels per cell: sections B..D, block rows 1..3
    for (int s = 1; s < 4; s++)
      for (int k = 0; k < 4; k++) begin
        automatic int wl = (s + 3 * k) % 12;
        automatic int c = pick_col(1, 3);
        ml_write(M4, s, wl, c, k);
        full_share = k[0];
        ml_read(M4, s, wl, c, k);
        full_share = 0;
      end
    // 3 levels per cell on both 2-by-2 arrays
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < 2; j++) begin
        automatic int c = pick_col(1, 2);
        ml_write(M3BC, 1 + j, 2 * k + j, c, k);
        full_share = j[0];
        ml_read(M3BC, 1 + j, 2 * k + j, c, k);
        full_share = 0;
        c = pick_col(2, 3);
        ml_write(M3CD, 2 + j, 11 - 2 * k - j, c, k);
        full_share = !j[0];
        ml_read(M3CD, 2 + j, 11 - 2 * k - j, c, k);
        full_share = 0;
      end
    // 2 levels per cell
    for (int s = 0; s < 5; s++)
      for (int b = 0; b < 2; b++) begin
        automatic int wl = (2 * s + b + 5) % 12;
        automatic int c = pick_col(0, 4);
        bit_access(s, wl, c, b[0] ^ wl[1], 1'b1);
        bit_access(s, wl, c, b[0] ^ wl[1], 1'b0);
      end
    // functional test pattern: target, neighbouring row, target again
    for (int lev = 0; lev < 6; lev++) begin
      automatic int x = $urandom_range(11);
      automatic int c = pick_col(0, 4);
      ml_write(M6, 0, x, c, lev);
      ml_write(M6, 0, (x + 1) % 12, c, (lev + 1) % 6);
      ml_read(M6, 0, x, c, lev);
      n_pattern++;
    end

    check(n_mlwrite > 0, "no multilevel write");
    check(n_refgen > 0,  "no reference generation");
    check(n_mlread > 0,  "no multilevel read");
    check(n_oddrev > 0,  "no odd-wordline read");
    check(n_db31 > 0,    "no access on data bus 31");
    check(n_idle_high > 0, "no idle D_OUT check");
    check(n_w2 > 0 && n_r2 > 0, "no 2-level access");
    check(n_pattern > 0,   "no functional test pattern");
    check(n_full > 0,    "no full-length sharing read");
    for (int m = 0; m < 5; m++) check(n_mode[m] > 0, $sformatf("mode %0d never ran", m));
    $display("mechanisms: mlwrite=%0d refgen=%0d mlread=%0d oddrev=%0d db31=%0d idle=%0d w2=%0d r2=%0d pattern=%0d fullshare=%0d modes=%0d/%0d/%0d/%0d/%0d",
             n_mlwrite, n_refgen, n_mlread, n_oddrev, n_db31, n_idle_high, n_w2, n_r2, n_pattern, n_full,
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
