// tb_mldram_core: checks the behavioural memory core on its own ports.
//   1. precharge: every sub-bitline at VDD/2;
//   2. charge sharing with a data cell: (70*V_bl + 50*V_cell) / 120 fF;
//   3. reference generation: VDC sources (typed in here from the chip's
//      configuration table), then vertical sharing over 5 rows (1/10..9/10
//      VDD), over rows 1..3 of B..D (1/6, 1/2, 5/6) and over rows 1,2 of B,C
//      (1/4, 3/4);
//   4. the horizontal switch map: SWT_BC alone joins rows 1..3 of B and C;
//   5. sense amplifiers, data bus writes and data bus read-back.
module tb_mldram_core;
  import mldram_pkg::*;

  localparam real VDD = 1.8;

  logic [4:0][11:0] wl = '0;
  refgen_wl_t       rgwl = '0;
  hswitch_t         swt0 = '0, swt1 = '0;
  vswitch_t         ref0 = '0, ref1 = '0;
  logic             cnct = 1, sense = 0, gen = 0, eq_n = 0;
  logic [4:0][7:0]  csel = '0;
  logic [31:0]      db_we = '0, db_rdata;
  logic             db_wdata = 0, db_pre = 1;
  int checks = 0, failures = 0;

  // VDC source in units of VDD/2, [row][section]
  int vdc [5][5] = '{'{0, 0, 1, 0, 2}, '{0, 0, 2, 2, 2}, '{1, 1, 1, 1, 1},
                     '{0, 0, 0, 2, 2}, '{0, 2, 1, 2, 2}};

  mldram_core dut (.wl(wl), .rgwl(rgwl), .swt0(swt0), .swt1(swt1), .ref0(ref0), .ref1(ref1),
                   .cnct(cnct), .sense(sense), .gen(gen), .eq_n(eq_n), .csel(csel),
                   .db_we(db_we), .db_wdata(db_wdata), .db_precharge(db_pre), .db_rdata(db_rdata));

  task automatic near(real got, real want, string what);
    checks++;
    if (got < want - 1e-6 || got > want + 1e-6) begin
      failures++;
      $display("FAIL: %s got %f want %f", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    // 1. precharge
    for (int s = 0; s < 5; s++)
      for (int c = 0; c < 250; c += 37) begin
        near(dut.vt[s][c], VDD / 2, "precharge true");
        near(dut.vc[s][c], VDD / 2, "precharge complement");
      end
    // 2. a data cell (initially empty) shares with its sub-bitline
    cnct = 0; #10;
    wl[3][4] = 1; #10;
    for (int c = 0; c < 250; c += 13) begin
      near(dut.vt[3][c], (70.0 * VDD / 2) / 120.0, "cell sharing, true");
      near(dut.vc[3][c], VDD / 2, "complement untouched");
    end
    wl[3][4] = 0; #10;
    near(dut.cell_v[3][4][7], (70.0 * VDD / 2) / 120.0, "cell keeps shared level");
    // 3. reference generation, 5 rows
    rgwl = '1; gen = 1; #10;
    for (int s = 0; s < 5; s++)
      for (int r = 0; r < 5; r++) near(dut.vt[s][10 + r], VDD * vdc[r][s] / 2.0, "VDC preset");
    gen = 0; #10;
    ref0 = '1; ref1 = '1; #10;
    for (int s = 0; s < 5; s++)
      for (int g = 0; g < 50; g += 7)
        for (int r = 0; r < 5; r++) begin
          near(dut.vt[s][5 * g + r], VDD * (2 * s + 1) / 10.0, "6-level reference, true");
          near(dut.vc[s][5 * g + r], VDD * (2 * s + 1) / 10.0, "6-level reference, complement");
        end
    rgwl = '0; ref0 = '0; ref1 = '0; #10;
    near(dut.dum_c[4][REF_ROW], VDD * 0.9, "reference trapped in dummy cell");
    // rows 1..3 of B..D
    rgwl = '1; gen = 1; #10; gen = 0; #10;
    ref0.r12 = 1; ref0.r23 = 1; #10;
    near(dut.vt[1][6], VDD / 6.0, "4-level reference B");
    near(dut.vt[2][7], VDD / 2.0, "4-level reference C");
    near(dut.vt[3][8], VDD * 5.0 / 6.0, "4-level reference D");
    near(dut.vt[1][5], 0.0, "row 0 not joined");
    near(dut.vt[0][6], 0.0, "section A not joined");
    ref0 = '0; #10;
    // rows 1,2 of B,C
    gen = 1; #10; gen = 0; #10;
    ref0.r12 = 1; #10;
    near(dut.vt[1][11], VDD / 4.0, "3-level reference B");
    near(dut.vt[2][12], VDD * 3.0 / 4.0, "3-level reference C");
    near(dut.vt[2][13], 0.0, "row 3 not joined");
    ref0 = '0; #10;
    // 4. horizontal switch map
    gen = 1; #10; gen = 0; rgwl = '0; #10;
    swt0.bc = 1; #10;
    for (int r = 0; r < 5; r++) begin
      automatic real want_b = (r >= 1 && r <= 3) ? VDD * (vdc[r][1] + vdc[r][2]) / 4.0 : VDD * vdc[r][1] / 2.0;
      near(dut.vt[1][20 + r], want_b, $sformatf("SWT_BC row %0d", r));
      near(dut.vt[0][20 + r], VDD * vdc[r][0] / 2.0, "SWT_BC leaves A alone");
    end
    swt0 = '0; #10;
    // 5. sense amplifiers, write and read through the data buses
    cnct = 1; eq_n = 0; #10;
    eq_n = 1; #10;
    sense = 1; #10;                    // equal inputs resolve to 0
    csel[2][3] = 1; db_we[5] = 1; db_wdata = 1; #10;
    db_we = '0; #10;
    near(dut.vt[2][5 * 8 + 3], VDD, "written true rail");
    near(dut.vc[2][5 * 8 + 3], 0.0, "written complement rail");
    db_pre = 0; #10;
    checks++;
    if (db_rdata[5] !== 1'b1 || db_rdata[6] !== 1'b0) begin
      failures++; $display("FAIL: read-back %b %b", db_rdata[5], db_rdata[6]);
    end
    csel = '0; #10;
    checks++;
    if (db_rdata !== '1) begin failures++; $display("FAIL: unconnected buses not high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
