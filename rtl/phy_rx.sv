// phy_rx: receive path of the USB 3.0 SuperSpeed PHY.
//
// Three stages, in the order the design gives: the deserializer collects the
// bit stream into 10-bit symbols on the bit clock, the 10b/8b decoder
// recovers byte and D/K flag and flags invalid symbols and disparity errors,
// and the descrambler removes the LFSR key from data symbols. Decoder and
// descrambler advance once per symbol (sym_en). The word boundary is the
// sym_en strobe: there is no comma alignment, so the bit stream must arrive
// aligned to it (a zero-delay connection from a serializer driven by the same
// strobe is).
//
// Timing: the symbol whose last bit arrives in a sym_en cycle appears on
// par_data one bit clock later, decoded one symbol later and descrambled on
// rx_data one more symbol later. rx_valid rises with the first such symbol.
// code_err and disp_err are aligned with rx_data.
module phy_rx
  import usb3_phy_pkg::*;
#(
  parameter logic [15:0] LFSR_SEED = LFSR_SEED_DEFAULT
) (
  input  logic       clk,        // bit clock
  input  logic       rst_n,
  input  logic       sym_en,     // symbol strobe from the clock divider
  input  logic       rx_serial,
  output logic [9:0] par_data,   // deserialized symbol
  output logic [7:0] rx_data,    // RxData
  output logic       rx_datak,   // RxDataK
  output logic       rx_valid,
  output logic       code_err,
  output logic       disp_err
);

  logic       des_valid;
  logic [7:0] dec_data;
  logic       dec_k, dec_cerr, dec_derr;
  logic [1:0] valid_pipe;

  deserializer #(.W(SYM_BITS)) u_deserializer (
    .clk     (clk),
    .rst_n   (rst_n),
    .capture (sym_en),
    .ser_in  (rx_serial),
    .par_out (par_data),
    .valid   (des_valid)
  );

  decoder_8b10b u_decoder (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (sym_en),
    .code_in  (par_data),
    .data_out (dec_data),
    .k_out    (dec_k),
    .code_err (dec_cerr),
    .disp_err (dec_derr)
  );

  descrambler #(.LFSR_SEED(LFSR_SEED)) u_descrambler (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (sym_en),
    .data_in  (dec_data),
    .k_in     (dec_k),
    .data_out (rx_data),
    .k_out    (rx_datak)
  );

  // error flags and valid delayed to line up with rx_data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_err   <= 1'b0;
      disp_err   <= 1'b0;
      valid_pipe <= '0;
    end else if (sym_en) begin
      code_err   <= dec_cerr;
      disp_err   <= dec_derr;
      valid_pipe <= {valid_pipe[0], des_valid};
    end
  end

  assign rx_valid = valid_pipe[1];

endmodule
