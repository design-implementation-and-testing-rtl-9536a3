// tb_ref_gen_dec: checks the reference/generate wordline decoder against the
// waveform assignment table of the chip, typed in here row by row.  For every
// addressed section (A..E), both wordline parities and each single RGX pin
// raised alone, each of the 20 lines must be high exactly when the pin of its
// table waveform is the raised one.  Section codes 5..7 are checked to give
// waveform 1 on the lines that depend on the addressed section.
module tb_ref_gen_dec;
  import mldram_pkg::*;

  logic [2:0] sec = '0;
  logic       odd = 0, rgx1 = 0, rgx2 = 0, rgx3 = 0;
  refgen_wl_t rg;
  int checks = 0, failures = 0;

  ref_gen_dec dut (.sec_addr(sec), .odd(odd), .rgx1(rgx1), .rgx2(rgx2), .rgx3(rgx3), .rgwl(rg));

  // rows: RW0x, RW1x, GW0x, GW1x for x = A..E; columns: true A..E, complement A..E
  string tbl [4][5] = '{
    '{"3111122222", "1311122222", "1131122222", "1113122222", "1111322222"},
    '{"2222231111", "2222213111", "2222211311", "2222211131", "2222211113"},
    '{"3111133333", "1311133333", "1131133333", "1113133333", "1111333333"},
    '{"3333331111", "3333313111", "3333311311", "3333311131", "3333311113"}
  };

  function automatic logic line(int kind, int x);
    case (kind)
      0: return rg.rw0[x];
      1: return rg.rw1[x];
      2: return rg.gw0[x];
      default: return rg.gw1[x];
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int o = 0; o < 2; o++)
        for (int w = 1; w <= 3; w++) begin
          sec = 3'(s); odd = o[0];
          rgx1 = (w == 1); rgx2 = (w == 2); rgx3 = (w == 3);
          #1;
          for (int kind = 0; kind < 4; kind++)
            for (int x = 0; x < 5; x++) begin
              int wave;
              if (s < 5) begin
                wave = tbl[kind][x][o * 5 + s] - "0";
              end else begin
                // no section addressed: the (s==S) entries fall back to 1
                wave = tbl[kind][x][o * 5 + ((x + 1) % 5)] - "0";
              end
              checks++;
              if (line(kind, x) !== (wave == w)) begin
                failures++;
                $display("FAIL: sec=%0d odd=%0d rgx%0d kind=%0d x=%0d got %b (waveform %0d)",
                         s, o, w, kind, x, line(kind, x), wave);
              end
            end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
