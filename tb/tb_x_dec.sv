// tb_x_dec: exhaustive check of one section's row decoder.  The testbench
// builds the minterm inputs itself; for each 4-bit row address exactly
// wordline "address" must rise when enabled (none for 12..15, none when the
// section is not enabled).
module tb_x_dec;
  logic        en = 0;
  logic [3:0]  pa = '0, pb = '0;
  logic [11:0] wl;
  int checks = 0, failures = 0;

  x_dec dut (.en(en), .pa(pa), .pb(pb), .wl(wl));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] want;
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 16; i++) begin
        en = e[0];
        pa = '0; pa[i % 4] = 1'b1;
        pb = '0; pb[i / 4] = 1'b1;
        #1;
        want = (e == 1 && i < 12) ? (12'd1 << i) : 12'd0;
        checks++;
        if (wl !== want) begin failures++; $display("FAIL: en=%0d a=%0d wl=%b want %b", e, i, wl, want); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
