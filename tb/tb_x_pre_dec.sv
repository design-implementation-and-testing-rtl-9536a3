// tb_x_pre_dec: exhaustive check of the row pre-decoder: pa must be the
// one-hot minterm of row bits 1..0 and pb that of row bits 3..2.
module tb_x_pre_dec;
  logic [3:0] a = '0, pa, pb;
  int checks = 0, failures = 0;

  x_pre_dec dut (.row_lsb(a), .pa(pa), .pb(pb));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (pa[j] !== (j == i % 4)) begin failures++; $display("FAIL: a=%0d pa=%b", i, pa); end
        checks++;
        if (pb[j] !== (j == i / 4)) begin failures++; $display("FAIL: a=%0d pb=%b", i, pb); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
