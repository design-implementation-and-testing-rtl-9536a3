// mldram_top: multilevel DRAM test chip with adjustable cell capacity.
//
// One 15,000-cell array stores 2, 3, 4 or 6 voltage levels per cell (1, 1.5,
// 2 or 2.5 bits per cell when cells are paired).  A cell value travels as a
// thermometer code, one bit per array section: the bits are written serially
// into the sense amplifiers of up to five sections, then the true
// sub-bitlines of those sections are shorted together so the cell receives
// the average, k/(N-1) VDD for k ones.  For reading, each section first
// builds its own reference by charge sharing preset dummy cells vertically,
// then the cell is shared horizontally across the sections and every
// section's sense amplifier compares it against its reference at once,
// reproducing the thermometer code.
//
// The chip has no sequencer: every control line is a pin, and the external
// tester drives the access sequence.  This top wires the standard-cell
// periphery to the core model:
//   x_addr_reg -> x_enable_dec, x_pre_dec -> 5 x x_dec   (data wordlines)
//   x_addr_reg -> ref_gen_dec                            (RW/GW wordlines)
//   y_enable_dec -> 5 x column_y_dec -> CSEL             (column select)
//   block_io                                             (data buses, D_in/D_out)
//   mldram_core                                          (array, behavioural)
//
// Pins (named after the chip pads):
//   clk        latches Addr<6:0> as the row address on its rising edge
//   addr[10:0] row address (6..0) or column address (10..8 section, 7..0 column)
//   xdec_en    wordline timing;  ydec_en  column/data bus timing
//   cnct       connects sense amplifiers to the sub-bitlines
//   sense      fires the sense amplifiers;  eq_n  precharge, active low
//   gen        presets sub-bitlines to their reference-generation source
//   write      enables the selected data bus write driver;  d_in, d_out data
//   swt{0,1}_{all,bc,cd}  horizontal switches (0 true, 1 complement)
//   ref{0,1}_{all,12,23}  vertical switches
//   rgx1..rgx3 reference/generate wordline waveforms
// The supply and bias pads (VCP, VBB, VBLP, VPP, core and ring supplies) and
// the output buffer have no logic function and are not modelled.
// SECTION_C_DECODE_ERROR = 1 reproduces the row-section decode error of the
// fabricated chip; the default is the intended decode.
module mldram_top
  import mldram_pkg::*;
#(
  parameter bit SECTION_C_DECODE_ERROR = 1'b0
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              xdec_en,
  input  logic              ydec_en,
  input  logic              cnct,
  input  logic              sense,
  input  logic              eq_n,
  input  logic              gen,
  input  logic              write,
  input  logic              d_in,
  input  logic              swt0_all,
  input  logic              swt0_bc,
  input  logic              swt0_cd,
  input  logic              swt1_all,
  input  logic              swt1_bc,
  input  logic              swt1_cd,
  input  logic              ref0_all,
  input  logic              ref0_12,
  input  logic              ref0_23,
  input  logic              ref1_all,
  input  logic              ref1_12,
  input  logic              ref1_23,
  input  logic              rgx1,
  input  logic              rgx2,
  input  logic              rgx3,
  output logic              d_out
);

  logic [ROW_ADDR_W-1:0]                       row_addr;
  logic [NUM_SECTIONS-1:0]                     xsec_en;
  logic [NUM_SECTIONS-1:0]                     ysec_en;
  logic [3:0]                                  pa, pb;
  logic [NUM_SECTIONS-1:0][WL_PER_SECTION-1:0] wl;
  logic [NUM_SECTIONS-1:0][COLS_PER_DB-1:0]    csel;
  refgen_wl_t                                  rgwl;
  logic [NUM_DB-1:0]                           db_we, db_rdata;
  logic                                        db_wdata, db_precharge;

  x_addr_reg u_x_addr_reg (
    .clk         (clk),
    .row_addr_in (addr[ROW_ADDR_W-1:0]),
    .row_addr    (row_addr)
  );

  x_enable_dec #(.SECTION_C_DECODE_ERROR(SECTION_C_DECODE_ERROR)) u_x_enable_dec (
    .sec_addr (row_addr[6:4]),
    .xdec_en  (xdec_en),
    .sec_en   (xsec_en)
  );

  x_pre_dec u_x_pre_dec (
    .row_lsb (row_addr[3:0]),
    .pa      (pa),
    .pb      (pb)
  );

  ref_gen_dec u_ref_gen_dec (
    .sec_addr (row_addr[6:4]),
    .odd      (row_addr[0]),
    .rgx1     (rgx1),
    .rgx2     (rgx2),
    .rgx3     (rgx3),
    .rgwl     (rgwl)
  );

  y_enable_dec u_y_enable_dec (
    .sec_addr (addr[10:8]),
    .ydec_en  (ydec_en),
    .sec_en   (ysec_en)
  );

  for (genvar s = 0; s < NUM_SECTIONS; s++) begin : g_section
    x_dec u_x_dec (
      .en (xsec_en[s]),
      .pa (pa),
      .pb (pb),
      .wl (wl[s])
    );
    column_y_dec u_column_y_dec (
      .en     (ysec_en[s]),
      .col_hi (addr[7:5]),
      .csel   (csel[s])
    );
  end

  block_io u_block_io (
    .col_lo       (addr[4:0]),
    .ydec_en      (ydec_en),
    .write        (write),
    .d_in         (d_in),
    .db_rdata     (db_rdata),
    .db_we        (db_we),
    .db_wdata     (db_wdata),
    .db_precharge (db_precharge),
    .d_out        (d_out)
  );

  mldram_core u_core (
    .wl           (wl),
    .rgwl         (rgwl),
    .swt0         ('{all: swt0_all, bc: swt0_bc, cd: swt0_cd}),
    .swt1         ('{all: swt1_all, bc: swt1_bc, cd: swt1_cd}),
    .ref0         ('{all: ref0_all, r12: ref0_12, r23: ref0_23}),
    .ref1         ('{all: ref1_all, r12: ref1_12, r23: ref1_23}),
    .cnct         (cnct),
    .sense        (sense),
    .gen          (gen),
    .eq_n         (eq_n),
    .csel         (csel),
    .db_we        (db_we),
    .db_wdata     (db_wdata),
    .db_precharge (db_precharge),
    .db_rdata     (db_rdata)
  );

endmodule
