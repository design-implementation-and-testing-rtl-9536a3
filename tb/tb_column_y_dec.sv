// tb_column_y_dec: checks the column decoder against the column/data bus
// decoding table: for every 8-bit column address, CSELj with j = bits 7..5
// must be the only select line, so that together with data bus bits 4..0
// the address reaches physical bitline (c >> 5) + 8*(c & 31).
module tb_column_y_dec;
  logic       en = 0;
  logic [2:0] hi = '0;
  logic [7:0] csel;
  int checks = 0, failures = 0;

  column_y_dec dut (.en(en), .col_hi(hi), .csel(csel));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 256; c++) begin
        int phys, sel;
        en = e[0]; hi = c[7:5];
        #1;
        phys = (c >> 5) + (c & 31) * 8;
        sel  = phys % 8;              // position inside the data bus group
        checks++;
        if (csel !== (e == 1 ? 8'(1 << sel) : 8'd0)) begin
          failures++; $display("FAIL: c=%0d en=%0d csel=%b", c, e, csel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
