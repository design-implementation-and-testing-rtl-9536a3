// x_dec: row decoder of one array section.
//
// Selects one of the section's 12 data wordlines from the pre-decoded
// minterms: wordline w = 4*j + i is driven when pb[j], pa[i] and the
// section enable are all high.  Row LSB values 12..15 name no wordline and
// select nothing.  In the chip the output drives a boosted wordline driver;
// here a wordline is a plain logic level.
//
// Interface: en (section enable from x_enable_dec, carries the XDEC_EN
// timing), pa[3:0], pb[3:0] -> wl[11:0].  Purely combinational.
// Even wordlines reach cells on true sub-bitlines, odd ones cells on
// complement sub-bitlines; that distinction is made in the array, not here.
module x_dec
  import mldram_pkg::*;
(
  input  logic                      en,
  input  logic [3:0]                pa,
  input  logic [3:0]                pb,
  output logic [WL_PER_SECTION-1:0] wl
);

  always_comb begin
    for (int unsigned w = 0; w < WL_PER_SECTION; w++) begin
      wl[w] = en && pb[w / 4] && pa[w % 4];
    end
  end

endmodule
