// x_addr_reg: row address register.
//
// The chip's address pins are time-multiplexed between row and column
// addresses.  A rising edge on the Clk pin captures the row address (pins
// Addr<6:0>) here, so that the same pins can carry the column address
// afterwards.  Clk is not a free-running clock: the tester pulses it once per
// row access.
//
// Interface: clk, row_addr_in (ROW_ADDR_W bits) -> row_addr (registered).
// Timing: row_addr changes one clock-to-q after the rising edge of clk.
// The register has no reset, as the chip has none; it holds garbage until
// the first clk pulse.  Width follows the seven row address bits the chip
// uses; edge choice (rising) follows the chip description.
module x_addr_reg
  import mldram_pkg::*;
#(
  parameter int unsigned W = ROW_ADDR_W
) (
  input  logic         clk,
  input  logic [W-1:0] row_addr_in,
  output logic [W-1:0] row_addr
);

  always_ff @(posedge clk) begin
    row_addr <= row_addr_in;
  end

endmodule
