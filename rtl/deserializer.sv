// deserializer: serial to parallel converter of the receive path.
//
// On every bit clock the incoming bit is shifted into a W-bit register from
// the LSB side, so the first bit of a symbol ends up in bit W-1. In the cycle
// in which capture (the symbol strobe) is high, the word formed by the
// previous W-1 bits and the current one is copied to par_out and valid is
// set. The word boundary is fixed by the strobe: there is no comma search,
// and a line with zero added delay from the local serializer is aligned.
// The bit-rate clocking is the design's; the alignment rule is this
// implementation's choice.
//
// Timing: par_out changes one bit clock after the capture edge and holds for
// a symbol.
module deserializer #(
  parameter int unsigned W = 10
) (
  input  logic         clk,     // bit clock
  input  logic         rst_n,
  input  logic         capture, // symbol strobe
  input  logic         ser_in,
  output logic [W-1:0] par_out, // first received bit in bit W-1
  output logic         valid
);

  logic [W-2:0] shreg;   // the last W-1 bits received

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg   <= '0;
      par_out <= '0;
      valid   <= 1'b0;
    end else begin
      shreg <= {shreg[W-3:0], ser_in};
      if (capture) begin
        par_out <= {shreg, ser_in};
        valid   <= 1'b1;
      end
    end
  end

  initial assert (W >= 3) else $error("deserializer: W must be at least 3");

endmodule
