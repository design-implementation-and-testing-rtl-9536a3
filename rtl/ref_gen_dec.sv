// ref_gen_dec: reference and generate wordline decoder.
//
// Each section has four special wordlines: RW0/RW1 reach the reference dummy
// cells and GW0/GW1 the generate dummy cells, on the true ("0") and
// complement ("1") sub-bitlines.  They are not timed individually: three
// waveform pins, Rgx1..Rgx3, carry the three timings an access needs, and
// this decoder connects each of the 20 lines to one of them.
//
//   Rgx1  restore/write: dummy cells on the addressed polarity in the other
//         four sections, so every sub-bitline that is charge shared carries
//         exactly one cell.
//   Rgx2  sensing: reference cells on the opposite polarity, which dump the
//         stored reference onto the reference sub-bitlines.
//   Rgx3  reference generation: the generate cells and the addressed
//         section's dummy cells.  The opposite polarity's reference cells
//         sit on Rgx2 only, so the access sequence used with this design
//         raises all three waveforms while references are generated, which
//         turns on every dummy cell.
//
// The assignment follows the chip's waveform table exactly.  With S the
// addressed section (row bits 6..4) and "odd" row bit 0:
//
//   even row (cell on true line):   RW0[s], GW0[s] = (s==S) ? 3 : 1
//                                   RW1[s] = 2,  GW1[s] = 3
//   odd row  (cell on complement):  RW1[s], GW1[s] = (s==S) ? 3 : 1
//                                   RW0[s] = 2,  GW0[s] = 3
//
// A section code 5..7 matches no section, so every "(s==S)" line then takes
// waveform 1 (this design's choice; the table does not cover those codes).
//
// Interface: sec_addr, odd, rgx1..rgx3 -> refgen_wl_t.  Combinational.
module ref_gen_dec
  import mldram_pkg::*;
(
  input  logic [2:0]  sec_addr,
  input  logic        odd,
  input  logic        rgx1,
  input  logic        rgx2,
  input  logic        rgx3,
  output refgen_wl_t  rgwl
);

  function automatic logic pick(rgx_e w, logic r1, logic r2, logic r3);
    unique case (w)
      RGX_1:   return r1;
      RGX_2:   return r2;
      default: return r3;
    endcase
  endfunction

  always_comb begin
    for (int unsigned s = 0; s < NUM_SECTIONS; s++) begin
      automatic logic  here = (sec_addr == 3'(s));
      automatic rgx_e  addressed_pol = here ? RGX_3 : RGX_1;
      if (!odd) begin
        rgwl.rw0[s] = pick(addressed_pol, rgx1, rgx2, rgx3);
        rgwl.gw0[s] = pick(addressed_pol, rgx1, rgx2, rgx3);
        rgwl.rw1[s] = pick(RGX_2, rgx1, rgx2, rgx3);
        rgwl.gw1[s] = pick(RGX_3, rgx1, rgx2, rgx3);
      end else begin
        rgwl.rw1[s] = pick(addressed_pol, rgx1, rgx2, rgx3);
        rgwl.gw1[s] = pick(addressed_pol, rgx1, rgx2, rgx3);
        rgwl.rw0[s] = pick(RGX_2, rgx1, rgx2, rgx3);
        rgwl.gw0[s] = pick(RGX_3, rgx1, rgx2, rgx3);
      end
    end
  end

endmodule
