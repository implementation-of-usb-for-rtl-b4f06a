// clock_divider: derives the symbol clock from the bit clock.
//
// A counter runs 0..DIV-1 on the bit clock. sym_clk is high while the count
// is below DIV/2, so it is the bit clock divided by DIV (10 for 8b/10b, as the
// design specifies). sym_en is a one-bit-clock strobe in the last bit clock of
// every symbol; the symbol-rate blocks of the PHY use it as a clock enable on
// the bit clock, so the whole PHY stays in one clock domain. The duty cycle,
// the phase and the strobe are this implementation's choices.
//
// Timing: the first strobe comes DIV bit clocks after reset is released,
// then one every DIV bit clocks.
module clock_divider #(
  parameter int unsigned DIV = 10
) (
  input  logic clk,      // bit clock
  input  logic rst_n,    // asynchronous, active low
  output logic sym_clk,  // bit clock / DIV
  output logic sym_en    // high in the last bit clock of each symbol
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          count <= '0;
    else if (count == CW'(DIV - 1))      count <= '0;
    else                                 count <= count + 1'b1;
  end

  assign sym_clk = (count < CW'(DIV / 2));
  assign sym_en  = (count == CW'(DIV - 1));

  initial assert (DIV >= 2) else $error("clock_divider: DIV must be at least 2");

endmodule
