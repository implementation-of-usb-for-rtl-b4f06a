// serializer: parallel to serial converter of the transmit path.
//
// On the bit clock, a W-bit shift register loads a new symbol in the cycle in
// which load (the symbol strobe) is high and otherwise shifts left by one.
// ser_out is the register's MSB, so bit 9 (bit a of the 8b/10b symbol) leaves
// first and one symbol takes W bit clocks. The design specifies a converter
// on a clock proportional to the bit rate; MSB-first order is this
// implementation's choice, matching the encoder's bit numbering.
//
// Timing: the MSB of a symbol loaded at a load edge is on ser_out for the
// next bit clock, the LSB W bit clocks later. load must come every W cycles.
module serializer #(
  parameter int unsigned W = 10
) (
  input  logic         clk,     // bit clock
  input  logic         rst_n,
  input  logic         load,    // symbol strobe
  input  logic [W-1:0] par_in,
  output logic         ser_out
);

  logic [W-1:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     shreg <= '0;
    else if (load)  shreg <= par_in;
    else            shreg <= {shreg[W-2:0], 1'b0};
  end

  assign ser_out = shreg[W-1];

endmodule
