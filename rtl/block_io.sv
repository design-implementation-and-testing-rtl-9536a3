// block_io: data bus decoder, write drivers and read multiplexer.
//
// The five sections share 32 differential data buses; the enabled column
// select line of the enabled section connects one sense amplifier to each
// bus.  Column address bits 4..0 pick one bus.  For a write, the selected
// bus's write driver is enabled (DBSEL & WRITE) and drives D_IN onto it;
// all other drivers stay in high impedance.  For a read, a 32-to-1
// multiplexer with the same select bits routes the selected bus to D_OUT.
// While YDEC_EN is low the buses are precharged, which the core reports as
// a logic 1, so D_OUT idles high.
//
// Interface:
//   col_lo (address bits 4..0), ydec_en, write, d_in   from the pins
//   db_we[31:0]     write driver enables, DBSEL & WRITE, DBSEL one-hot
//                   from col_lo while ydec_en
//   db_wdata        data driven by an enabled write driver
//   db_precharge    data bus precharge device enable
//   db_rdata[31:0]  logic value on each data bus, from the core
//   d_out           to the output buffer and pad
// Purely combinational.  Gating DBSEL and the write drivers with YDEC_EN is
// this design's choice; the chip description says both pins are pulsed
// together for a write.  The output buffer (five cascaded inverters in the
// chip) is an electrical driver and is not modelled; D_OUT here carries the
// data bus value with the polarity shown in the chip's simulations, where
// D_OUT equals the data written.
module block_io
  import mldram_pkg::*;
(
  input  logic [4:0]        col_lo,
  input  logic              ydec_en,
  input  logic              write,
  input  logic              d_in,
  input  logic [NUM_DB-1:0] db_rdata,
  output logic [NUM_DB-1:0] db_we,
  output logic              db_wdata,
  output logic              db_precharge,
  output logic              d_out
);

  logic [NUM_DB-1:0] dbsel;

  always_comb begin
    dbsel        = ydec_en ? (NUM_DB'(1) << col_lo) : '0;
    db_we        = write ? dbsel : '0;
    db_wdata     = d_in;
    db_precharge = !ydec_en;
    d_out        = db_rdata[col_lo];
  end

endmodule
