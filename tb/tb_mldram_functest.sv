// tb_mldram_functest: the basic cell-by-cell functional test of the chip,
// run on the full-size design.
//
// For every cell of one section and every one of the six physical cell
// levels it writes the level into the target cell, writes the next level
// (mod 6) into the cell of the following row in the same column, and reads
// the target back.  The second write makes sure the read value comes from
// the cell and not from charge left on the bitlines.  The level is the
// physical one: on an odd row, where the cell sits on the complement line,
// the thermometer code sent is the one for level 5 - k, and the expected
// read-out is that code reversed.  Each read checks all five D_OUT bits and
// the restored cell voltage (k/5 VDD).
//
// Passes:
//   1. 6 levels, section A, forward order: column 0..249 outer, row 0..11
//      inner.  3000 cells x 6 levels.
//   2. 6 levels, section E, reverse order: column 249..0, row 11..0.
//   3. 2 levels, section C, forward order: write 0/1, write the complement
//      to the next row, read back.
// The row after row 11 is taken as row 0 of the same section (this
// testbench's choice).  Columns are walked in physical order; the column
// address of physical column p is 32*(p mod 8) + p/8, the inverse of the
// chip's column scrambling.  A per-level count of good cells is printed, in
// the way the chip's test results are summarised.
module tb_mldram_functest;
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

  // column address that lands on physical column p
  function automatic int col_of(int p);
    return 32 * (p % 8) + p / 8;
  endfunction

  int good [6] = '{0, 0, 0, 0, 0, 0};
  int tried [6] = '{0, 0, 0, 0, 0, 0};

  // write, disturb, read one cell at one physical level
  task automatic cell_test6(int sec, int wl, int p, int lev);
    automatic int  c    = col_of(p);
    automatic int  nxt  = (wl + 1) % 12;
    automatic int  k    = wl[0] ? 5 - lev : lev;
    automatic int  lev2 = (lev + 1) % 6;
    automatic int  f0   = failures;
    check(phys_of(c) == p, $sformatf("column address %0d does not map to %0d", c, p));
    ml_write(M6, sec, wl, c, k);
    ml_write(M6, sec, nxt, c, nxt[0] ? 5 - lev2 : lev2);
    ml_read(M6, sec, wl, c, k);
    tried[lev]++;
    if (failures == f0) good[lev]++;
    n_pattern++;
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n2 = 0;

  initial begin
    step(); step();
    // pass 1: section A, forward
    for (int p = 0; p < 250; p++)
      for (int wl = 0; wl < 12; wl++)
        for (int lev = 0; lev < 6; lev++)
          cell_test6(0, wl, p, lev);
    // pass 2: section E, reverse
    for (int p = 249; p >= 0; p--)
      for (int wl = 11; wl >= 0; wl--)
        for (int lev = 0; lev < 6; lev++)
          cell_test6(4, wl, p, lev);
    // pass 3: 2 levels, section C, forward
    for (int p = 0; p < 250; p++)
      for (int wl = 0; wl < 12; wl++)
        for (int b = 0; b < 2; b++) begin
          bit_access(2, wl, col_of(p), b[0], 1'b1);
          bit_access(2, (wl + 1) % 12, col_of(p), !b[0], 1'b1);
          bit_access(2, wl, col_of(p), b[0], 1'b0);
          n2++;
        end
    for (int lev = 5; lev >= 0; lev--)
      $display("level %0d: %0d of %0d cell tests good", lev, good[lev], tried[lev]);
    check(n_pattern == 2 * 3000 * 6, "6-level functional test incomplete");
    check(n2 == 3000 * 2, "2-level functional test incomplete");
    check(n_oddrev > 0 && n_mode[M2] > 0, "odd rows or 2-level accesses missing");
    $display("cell tests: 6-level %0d, 2-level %0d", n_pattern, n2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
