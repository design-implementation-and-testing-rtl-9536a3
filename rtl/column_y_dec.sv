// column_y_dec: column decoder of one array section.
//
// Every eight physically adjacent sense amplifiers share one data bus pair.
// Column address bits 7..5 pick which of the eight is connected, through the
// column select lines CSEL0..7 that run across the whole section; bits 4..0
// pick the data bus in block_io.  A column address c therefore lands on
// physical bitline n = c[7:5] + 8*c[4:0], and the 250 columns leave only
// CSEL0 and CSEL1 in use on data bus 31.
//
// Interface: en (section enable from y_enable_dec, carries YDEC_EN timing),
// col_hi (address bits 7..5) -> csel[7:0] one-hot.  Purely combinational.
module column_y_dec
  import mldram_pkg::*;
(
  input  logic                   en,
  input  logic [2:0]             col_hi,
  output logic [COLS_PER_DB-1:0] csel
);

  always_comb begin
    csel = '0;
    if (en) csel[col_hi] = 1'b1;
  end

endmodule
