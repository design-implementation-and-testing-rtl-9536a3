// tb_x_enable_dec: exhaustive check of the row section select decoder, with
// the intended decode (A=000 .. E=100, other codes none) and with the
// fabricated chip's decode error enabled (section C answering to code 011).
module tb_x_enable_dec;
  logic [2:0] a = '0;
  logic       en = 0;
  logic [4:0] y_ok, y_err;
  int checks = 0, failures = 0;

  x_enable_dec dut (.sec_addr(a), .xdec_en(en), .sec_en(y_ok));
  x_enable_dec #(.SECTION_C_DECODE_ERROR(1'b1)) dut_err (.sec_addr(a), .xdec_en(en), .sec_en(y_err));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] want, want_err;
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 8; i++) begin
        a = 3'(i); en = e[0];
        #1;
        case (i)
          0: want = 5'b00001;
          1: want = 5'b00010;
          2: want = 5'b00100;
          3: want = 5'b01000;
          4: want = 5'b10000;
          default: want = 5'b00000;
        endcase
        if (!e[0]) want = 5'b0;
        want_err = want;
        if (e[0] && i == 2) want_err = 5'b00000;
        if (e[0] && i == 3) want_err = 5'b01100;
        checks++;
        if (y_ok !== want) begin failures++; $display("FAIL: a=%0d en=%0d got %b want %b", i, e, y_ok, want); end
        checks++;
        if (y_err !== want_err) begin failures++; $display("FAIL(err) a=%0d en=%0d got %b want %b", i, e, y_err, want_err); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
