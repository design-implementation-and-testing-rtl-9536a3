// x_pre_dec: row pre-decoder.
//
// Splits the four row address LSBs into two 2-bit fields and decodes each
// into a one-hot group of four minterms: pa from bits 1..0, pb from bits
// 3..2.  The row decoder of every section then needs only a 3-input AND per
// wordline instead of a 4-input decode.  The grouping into two 2-bit fields
// is this design's choice; the chip description only says that the row
// address is pre-decoded into groups of minterms.
//
// Interface: row_lsb (4 bits) -> pa[3:0], pb[3:0], each one-hot.
// Purely combinational.
module x_pre_dec (
  input  logic [3:0] row_lsb,
  output logic [3:0] pa,
  output logic [3:0] pb
);

  always_comb begin
    pa = 4'b0001 << row_lsb[1:0];
    pb = 4'b0001 << row_lsb[3:2];
  end

endmodule
