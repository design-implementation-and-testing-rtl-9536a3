// tb_block_io: checks data bus decoding, write driver enables, the 32-to-1
// read multiplexer and the precharge enable with random stimuli.
module tb_block_io;
  logic [4:0]  a = '0;
  logic        ydec_en = 0, write = 0, d_in = 0;
  logic [31:0] db_rdata = '0, db_we;
  logic        db_wdata, db_pre, d_out;
  int checks = 0, failures = 0;

  block_io dut (.col_lo(a), .ydec_en(ydec_en), .write(write), .d_in(d_in),
                .db_rdata(db_rdata), .db_we(db_we), .db_wdata(db_wdata),
                .db_precharge(db_pre), .d_out(d_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = 5'($urandom); ydec_en = 1'($urandom); write = 1'($urandom);
      d_in = 1'($urandom); db_rdata = $urandom;
      #1;
      for (int k = 0; k < 32; k++)
        check(db_we[k] == (ydec_en && write && k == int'(a)),
              $sformatf("db_we[%0d]=%b a=%0d y=%b w=%b", k, db_we[k], a, ydec_en, write));
      check(db_wdata == d_in, "write data");
      check(db_pre == !ydec_en, "precharge enable");
      check(d_out == db_rdata[a], $sformatf("d_out for bus %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
