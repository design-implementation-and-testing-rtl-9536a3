// mldram_pkg: sizes, section codes and signal bundles shared by the
// multilevel DRAM test chip.
//
// The chip has five identical memory array sections A..E.  Each section
// holds 12 data wordlines, four reference/generate wordlines and 250
// folded bitline pairs.  Columns are grouped in blocks of five adjacent
// sub-bitline pairs; together with the five sections such a block forms the
// 5-by-5 array of sub-bitline pairs in which references are generated and
// cell levels are formed by charge sharing.  The 250 columns of a section
// reach the periphery through 32 shared data buses (eight columns per bus).
//
// Section codes are plain binary on address bits 6..4 (rows) and 10..8
// (columns): A=0, B=1, C=2, D=3, E=4.  The binary code for C follows the
// decode the chip was meant to have (A6'.A5.A4'); codes 5..7 select nothing
// (this design's choice).
package mldram_pkg;

  localparam int unsigned NUM_SECTIONS   = 5;
  localparam int unsigned WL_PER_SECTION = 12;
  localparam int unsigned NUM_COLS       = 250;
  localparam int unsigned NUM_DB         = 32;
  localparam int unsigned COLS_PER_DB    = 8;
  localparam int unsigned GROUP_ROWS     = 5;   // sub-bitline pairs per 5-by-5 block
  localparam int unsigned REF_ROW        = 2;   // row of the block holding reference cells
  localparam int unsigned ROW_ADDR_W     = 7;
  localparam int unsigned ADDR_W         = 11;

  typedef enum logic [2:0] {
    SEC_A = 3'd0,
    SEC_B = 3'd1,
    SEC_C = 3'd2,
    SEC_D = 3'd3,
    SEC_E = 3'd4
  } section_e;

  // The three reference/generate wordline waveforms (pins Rgx1..Rgx3).
  typedef enum logic [1:0] {
    RGX_1 = 2'd1,
    RGX_2 = 2'd2,
    RGX_3 = 2'd3
  } rgx_e;

  // The 20 reference (RW) and generate (GW) wordlines, one bit per section
  // (bit 0 = section A).  "0" lines reach the true sub-bitlines, "1" lines
  // the complement sub-bitlines.
  typedef struct packed {
    logic [NUM_SECTIONS-1:0] rw0;
    logic [NUM_SECTIONS-1:0] rw1;
    logic [NUM_SECTIONS-1:0] gw0;
    logic [NUM_SECTIONS-1:0] gw1;
  } refgen_wl_t;

  // One polarity of the horizontal (section-to-section) switch set.
  typedef struct packed {
    logic all;   // A-B and D-E everywhere, B-C and C-D in rows 0 and 4
    logic bc;    // B-C in rows 1..3
    logic cd;    // C-D in rows 1..3
  } hswitch_t;

  // One polarity of the vertical (row-to-row) switch set.
  typedef struct packed {
    logic all;   // rows 0-1 and 3-4 everywhere, rows 1-2 and 2-3 in A and E
    logic r12;   // rows 1-2 in sections B..D
    logic r23;   // rows 2-3 in sections B..D
  } vswitch_t;

  // Column address (Y bits 7..0) to physical bitline position within a
  // section: bits 4..0 pick the data bus (eight adjacent columns each),
  // bits 7..5 the column select line within that group.
  function automatic int unsigned col_addr_to_phys(logic [7:0] c);
    return int'(c[7:5]) + int'(c[4:0]) * COLS_PER_DB;
  endfunction

endpackage
