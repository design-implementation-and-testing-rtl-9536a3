// mldram_core: behavioural model of the multilevel DRAM memory core.
//
// BEHAVIOURAL MODEL, not synthesizable.  The real core is a full-custom
// analog block (cells, sense amplifiers, NMOS switches, boosted drivers);
// this model reproduces its charge-sharing behaviour with real-valued node
// voltages so that the digital periphery can be simulated end to end.
//
// Organisation.  Five sections A..E, each with 12 data wordlines and 250
// folded sub-bitline pairs.  Even wordlines own cells on the true
// sub-bitline, odd wordlines on the complement.  Columns form 50 blocks of
// five adjacent pairs ("rows" 0..4 of a block); with the five sections a
// block is the 5-by-5 array of sub-bitline pairs.  Horizontal switches SWT0
// (true) / SWT1 (complement) join the same row in neighbouring sections;
// vertical switches REF0 / REF1 join neighbouring rows inside a section.
// Each switch polarity comes in three groups (all, BC/12, CD/23) placed as
// in the chip's switch map, so the 5x5, 3x3 (sections B..D, rows 1..3) and
// two 2x2 (B,C rows 1,2 / C,D rows 2,3) arrays can be formed.
//
// Every sub-bitline carries one dummy cell: a reference cell (RW0/RW1) in
// row 2 of a block, a generate cell (GW0/GW1) in the other rows.  While GEN
// is high each sub-bitline is forced to its VDC source, set per row and
// section so that vertical charge sharing yields equally spaced references
// (1/10..9/10 VDD over 5 rows, 1/6..5/6 over rows 1..3, 1/4 and 3/4 over
// two rows).
//
// Each pair has a latch-type sense amplifier behind an isolation switch
// (CNCT).  With CNCT high and EqIn low the precharge devices hold the pair
// at VDD/2.  On the rising edge of SENSE (with CNCT high) each amplifier
// compares true against complement and then drives both to the rails for as
// long as SENSE and CNCT stay high.  CSEL of a section connects eight
// amplifiers to eight data buses; db_we writes db_wdata into the selected
// amplifier (and, through it, onto the sub-bitline if CNCT is high).
// db_rdata reports each bus: the selected amplifier's true value, or 1 while
// the buses are precharged or nothing is connected.
//
// Evaluation.  On every input change the model (1) fires the sense
// amplifiers on a SENSE rising edge, (2) applies data bus writes, (3) finds
// the groups of sub-bitlines joined by closed switches, and (4) for each
// group either takes the voltage of its drivers (sense amplifier, GEN
// source, precharge) or shares charge among the group's sub-bitlines and
// every cell whose wordline is on:  V = sum(C*V) / sum(C).  Cells on a
// driven group take the driven voltage.  Changes settle in zero time; the
// chip's timing rules (one control transition at a time, 30 ns apart in its
// reference sequence) are the caller's to keep.
//
// Capacitances follow the chip: 50 fF cells and an estimated 70 fF per
// section of sub-bitline.  Not modelled: leakage and retention, charge
// injection from switches and wordlines, sense amplifier offset, the
// friendly cells at the array edges, and boost voltages (a wordline or
// switch is simply on or off).  The reference-row position (row 2) and the
// zero-delay evaluation are this model's choices.
module mldram_core
  import mldram_pkg::*;
#(
  parameter int unsigned COLS      = NUM_COLS,
  parameter real         C_CELL_FF = 50.0,
  parameter real         C_SBL_FF  = 70.0,
  parameter real         VDD       = 1.8
) (
  input  logic [NUM_SECTIONS-1:0][WL_PER_SECTION-1:0] wl,
  input  refgen_wl_t                                  rgwl,
  input  hswitch_t                                    swt0,
  input  hswitch_t                                    swt1,
  input  vswitch_t                                    ref0,
  input  vswitch_t                                    ref1,
  input  logic                                        cnct,
  input  logic                                        sense,
  input  logic                                        gen,
  input  logic                                        eq_n,
  input  logic [NUM_SECTIONS-1:0][COLS_PER_DB-1:0]    csel,
  input  logic [NUM_DB-1:0]                           db_we,
  input  logic                                        db_wdata,
  input  logic                                        db_precharge,
  output logic [NUM_DB-1:0]                           db_rdata
);

  localparam int unsigned GROUPS = COLS / GROUP_ROWS;
  localparam int unsigned NODES  = 2 * NUM_SECTIONS * GROUP_ROWS;

  // VDC source per block row (outer index) and section (inner index):
  // 0 = VSS, 1 = VDD/2, 2 = VDD.
  localparam logic [1:0] VDC [GROUP_ROWS][NUM_SECTIONS] = '{
    '{2'd0, 2'd0, 2'd1, 2'd0, 2'd2},
    '{2'd0, 2'd0, 2'd2, 2'd2, 2'd2},
    '{2'd1, 2'd1, 2'd1, 2'd1, 2'd1},
    '{2'd0, 2'd0, 2'd0, 2'd2, 2'd2},
    '{2'd0, 2'd2, 2'd1, 2'd2, 2'd2}
  };

  // Node state.  Index order: section, (wordline,) physical column.
  real  vt     [NUM_SECTIONS][COLS];                 // true sub-bitline
  real  vc     [NUM_SECTIONS][COLS];                 // complement sub-bitline
  real  cell_v [NUM_SECTIONS][WL_PER_SECTION][COLS]; // data cells
  real  dum_t  [NUM_SECTIONS][COLS];                 // dummy cell on true
  real  dum_c  [NUM_SECTIONS][COLS];                 // dummy cell on complement
  logic sa_val [NUM_SECTIONS][COLS];                 // sense amp true side
  logic sa_on;

  function automatic int unsigned node_id(int unsigned pol, int unsigned s, int unsigned r);
    return pol * NUM_SECTIONS * GROUP_ROWS + s * GROUP_ROWS + r;
  endfunction

  // Horizontal switch between section s and s+1 in block row r.
  function automatic logic h_on(hswitch_t sw, int unsigned s, int unsigned r);
    if (r >= 1 && r <= 3 && s == 1) return sw.bc;
    if (r >= 1 && r <= 3 && s == 2) return sw.cd;
    return sw.all;
  endfunction

  // Vertical switch between block rows r and r+1 in section s.
  function automatic logic v_on(vswitch_t sw, int unsigned s, int unsigned r);
    if (s >= 1 && s <= 3 && r == 1) return sw.r12;
    if (s >= 1 && s <= 3 && r == 2) return sw.r23;
    return sw.all;
  endfunction

  function automatic logic dummy_on(int unsigned pol, int unsigned s, int unsigned r);
    if (r == REF_ROW) return pol == 0 ? rgwl.rw0[s] : rgwl.rw1[s];
    return pol == 0 ? rgwl.gw0[s] : rgwl.gw1[s];
  endfunction

  function automatic real vdc_volts(int unsigned s, int unsigned r);
    return real'(VDC[r][s]) * VDD / 2.0;
  endfunction

  initial begin
    for (int unsigned s = 0; s < NUM_SECTIONS; s++) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        vt[s][c]     = VDD / 2.0;
        vc[s][c]     = VDD / 2.0;
        dum_t[s][c]  = VDD / 2.0;
        dum_c[s][c]  = VDD / 2.0;
        sa_val[s][c] = 1'b0;
        for (int unsigned w = 0; w < WL_PER_SECTION; w++) cell_v[s][w][c] = 0.0;
      end
    end
    sa_on = 1'b0;
  end

  task automatic settle();
    int unsigned parent [NODES];
    int unsigned root   [NODES];
    logic        wr     [NUM_SECTIONS][COLS];
    real         q      [NODES];
    real         cap    [NODES];
    real         dsum   [NODES];
    int unsigned dcnt   [NODES];

    // (1) sense amplifiers fire on the rising edge of SENSE
    if (!sense) begin
      sa_on = 1'b0;
    end else if (!sa_on && cnct) begin
      for (int unsigned s = 0; s < NUM_SECTIONS; s++)
        for (int unsigned c = 0; c < COLS; c++)
          sa_val[s][c] = vt[s][c] > vc[s][c];
      sa_on = 1'b1;
    end

    // (2) data bus writes into the selected amplifiers
    for (int unsigned s = 0; s < NUM_SECTIONS; s++)
      for (int unsigned c = 0; c < COLS; c++) wr[s][c] = 1'b0;
    for (int unsigned s = 0; s < NUM_SECTIONS; s++)
      for (int unsigned k = 0; k < COLS_PER_DB; k++)
        if (csel[s][k])
          for (int unsigned d = 0; d < NUM_DB; d++) begin
            automatic int unsigned c = d * COLS_PER_DB + k;
            if (db_we[d] && c < COLS) begin
              sa_val[s][c] = db_wdata;
              wr[s][c]     = 1'b1;
            end
          end

    // (3) switch connectivity, identical for every block
    for (int unsigned n = 0; n < NODES; n++) parent[n] = n;
    for (int unsigned pol = 0; pol < 2; pol++) begin
      for (int unsigned r = 0; r < GROUP_ROWS; r++)
        for (int unsigned s = 0; s + 1 < NUM_SECTIONS; s++)
          if (h_on(pol == 0 ? swt0 : swt1, s, r)) begin
            automatic int unsigned a = node_id(pol, s, r);
            automatic int unsigned b = node_id(pol, s + 1, r);
            while (parent[a] != a) a = parent[a];
            while (parent[b] != b) b = parent[b];
            if (a != b) parent[b] = a;
          end
      for (int unsigned s = 0; s < NUM_SECTIONS; s++)
        for (int unsigned r = 0; r + 1 < GROUP_ROWS; r++)
          if (v_on(pol == 0 ? ref0 : ref1, s, r)) begin
            automatic int unsigned a = node_id(pol, s, r);
            automatic int unsigned b = node_id(pol, s, r + 1);
            while (parent[a] != a) a = parent[a];
            while (parent[b] != b) b = parent[b];
            if (a != b) parent[b] = a;
          end
    end
    for (int unsigned n = 0; n < NODES; n++) begin
      automatic int unsigned a = n;
      while (parent[a] != a) a = parent[a];
      root[n] = a;
    end

    // (4) drive or share charge, block by block
    for (int unsigned g = 0; g < GROUPS; g++) begin
      for (int unsigned n = 0; n < NODES; n++) begin
        q[n] = 0.0; cap[n] = 0.0; dsum[n] = 0.0; dcnt[n] = 0;
      end
      for (int unsigned pol = 0; pol < 2; pol++)
        for (int unsigned s = 0; s < NUM_SECTIONS; s++)
          for (int unsigned r = 0; r < GROUP_ROWS; r++) begin
            automatic int unsigned c  = g * GROUP_ROWS + r;
            automatic int unsigned rt = root[node_id(pol, s, r)];
            automatic real         v  = (pol == 0) ? vt[s][c] : vc[s][c];
            cap[rt] += C_SBL_FF;
            q[rt]   += C_SBL_FF * v;
            for (int unsigned w = pol; w < WL_PER_SECTION; w += 2)
              if (wl[s][w]) begin
                cap[rt] += C_CELL_FF;
                q[rt]   += C_CELL_FF * cell_v[s][w][c];
              end
            if (dummy_on(pol, s, r)) begin
              cap[rt] += C_CELL_FF;
              q[rt]   += C_CELL_FF * ((pol == 0) ? dum_t[s][c] : dum_c[s][c]);
            end
            if (cnct && (sa_on || wr[s][c])) begin
              dsum[rt] += ((pol == 0) ? sa_val[s][c] : !sa_val[s][c]) ? VDD : 0.0;
              dcnt[rt] += 1;
            end else if (gen) begin
              dsum[rt] += vdc_volts(s, r);
              dcnt[rt] += 1;
            end else if (cnct && !eq_n) begin
              dsum[rt] += VDD / 2.0;
              dcnt[rt] += 1;
            end
          end
      for (int unsigned pol = 0; pol < 2; pol++)
        for (int unsigned s = 0; s < NUM_SECTIONS; s++)
          for (int unsigned r = 0; r < GROUP_ROWS; r++) begin
            automatic int unsigned c  = g * GROUP_ROWS + r;
            automatic int unsigned rt = root[node_id(pol, s, r)];
            automatic real         v  = (dcnt[rt] != 0) ? dsum[rt] / real'(dcnt[rt])
                                                        : q[rt] / cap[rt];
            if (pol == 0) vt[s][c] = v; else vc[s][c] = v;
            for (int unsigned w = pol; w < WL_PER_SECTION; w += 2)
              if (wl[s][w]) cell_v[s][w][c] = v;
            if (dummy_on(pol, s, r)) begin
              if (pol == 0) dum_t[s][c] = v; else dum_c[s][c] = v;
            end
          end
    end

    // (5) data bus read-back
    for (int unsigned d = 0; d < NUM_DB; d++) begin
      db_rdata[d] = 1'b1;
      if (!db_precharge)
        for (int unsigned s = 0; s < NUM_SECTIONS; s++)
          for (int unsigned k = 0; k < COLS_PER_DB; k++) begin
            automatic int unsigned c = d * COLS_PER_DB + k;
            if (csel[s][k] && c < COLS)
              db_rdata[d] = sa_on ? sa_val[s][c] : (vt[s][c] > VDD / 2.0);
          end
    end
  endtask

  always @(wl, rgwl, swt0, swt1, ref0, ref1, cnct, sense, gen, eq_n,
           csel, db_we, db_wdata, db_precharge) begin
    settle();
  end

endmodule
