// tb_x_addr_reg: checks that the row address register captures its input on
// the rising clock edge and holds it while the multiplexed address pins
// change to a column address.  Random addresses, 200 captures.
module tb_x_addr_reg;
  logic       clk = 0;
  logic [6:0] din = '0, q;
  int checks = 0, failures = 0;

  x_addr_reg dut (.clk(clk), .row_addr_in(din), .row_addr(q));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] want;
    for (int i = 0; i < 200; i++) begin
      want = 7'($urandom);
      din = want;
      #5 clk = 1;
      #5 clk = 0;
      checks++;
      if (q !== want) begin failures++; $display("FAIL: captured %h want %h", q, want); end
      din = ~want;            // the pins now carry a column address
      #5;
      checks++;
      if (q !== want) begin failures++; $display("FAIL: did not hold %h, got %h", want, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
