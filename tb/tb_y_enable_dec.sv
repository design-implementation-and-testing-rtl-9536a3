// tb_y_enable_dec: exhaustive check of the column section select decoder.
module tb_y_enable_dec;
  logic [2:0] a = '0;
  logic       en = 0;
  logic [4:0] y;
  int checks = 0, failures = 0;

  y_enable_dec dut (.sec_addr(a), .ydec_en(en), .sec_en(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] want;
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 8; i++) begin
        a = 3'(i); en = e[0];
        #1;
        want = '0;
        if (e == 1 && i < 5) want[i] = 1'b1;
        checks++;
        if (y !== want) begin failures++; $display("FAIL: a=%0d en=%0d got %b want %b", i, e, y, want); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
