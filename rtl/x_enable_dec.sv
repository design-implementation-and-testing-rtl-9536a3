// x_enable_dec: row section select decoder.
//
// While XDEC_EN is high, the three row address MSBs (row bits 6..4) enable
// the wordline decoder of one of the five array sections: A=000, B=001,
// C=010, D=011, E=100.  Codes 101..111 enable no section.  XDEC_EN also sets
// the timing of every normal wordline, because the section enable gates the
// row decoder of that section.
//
// Interface: sec_addr (3 bits), xdec_en -> sec_en[4:0], bit 0 = section A.
// Purely combinational.
//
// The fabricated chip decoded section C with A6'.A5.A4 (the code of D), so
// row addresses in C selected nothing and D addresses selected a wordline
// in C as well.  The intended decode is the default here.  Setting
// SECTION_C_DECODE_ERROR = 1 reproduces the fabricated behaviour, for
// comparing against measurements of the real part.
module x_enable_dec
  import mldram_pkg::*;
#(
  parameter bit SECTION_C_DECODE_ERROR = 1'b0
) (
  input  logic [2:0]              sec_addr,
  input  logic                    xdec_en,
  output logic [NUM_SECTIONS-1:0] sec_en
);

  always_comb begin
    for (int unsigned s = 0; s < NUM_SECTIONS; s++) begin
      sec_en[s] = xdec_en && (sec_addr == 3'(s));
    end
    if (SECTION_C_DECODE_ERROR) begin
      sec_en[SEC_C] = xdec_en && (sec_addr == 3'(SEC_D));
    end
  end

endmodule
