// y_enable_dec: column section select decoder.
//
// While YDEC_EN is high, address bits 10..8 enable the column decoder of
// one section (A=000 .. E=100, codes 101..111 select nothing).  Because the
// five sections are written and read one after another through the same
// data pin, these three bits act as the serial bit index of the
// thermometer-coded cell value during a multilevel access.
//
// Interface: sec_addr (3 bits), ydec_en -> sec_en[4:0], bit 0 = section A.
// Purely combinational.  The binary section code is this design's choice,
// taken to match the row section code.
module y_enable_dec
  import mldram_pkg::*;
(
  input  logic [2:0]              sec_addr,
  input  logic                    ydec_en,
  output logic [NUM_SECTIONS-1:0] sec_en
);

  always_comb begin
    for (int unsigned s = 0; s < NUM_SECTIONS; s++) begin
      sec_en[s] = ydec_en && (sec_addr == 3'(s));
    end
  end

endmodule
