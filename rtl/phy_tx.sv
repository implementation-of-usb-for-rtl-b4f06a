// phy_tx: transmit path of the USB 3.0 SuperSpeed PHY.
//
// Three stages, in the order the design gives: the scrambler XORs data
// symbols with the LFSR key (K symbols pass unscrambled), the 8b/10b encoder
// turns the scrambled byte and its D/K flag into a 10-bit symbol with running
// disparity, and the serializer sends the 10 bits one per bit clock, bit a
// first. Scrambler and encoder advance once per symbol (sym_en); the
// serializer runs on every bit clock.
//
// Timing: tx_data/tx_datak are sampled at a sym_en edge. scr_data follows at
// that edge, enc_data one symbol later, and the serializer loads it one
// symbol after that; the first bit of the symbol is on tx_serial in the bit
// clock right after the load, i.e. 20 bit clocks after the sampling edge.
module phy_tx
  import usb3_phy_pkg::*;
#(
  parameter logic [15:0] LFSR_SEED = LFSR_SEED_DEFAULT
) (
  input  logic       clk,        // bit clock
  input  logic       rst_n,
  input  logic       sym_en,     // symbol strobe from the clock divider
  input  logic [7:0] tx_data,    // TxData
  input  logic       tx_datak,   // TxDataK
  output logic       tx_serial,
  output logic [7:0] scr_data,   // scrambled symbol
  output logic [9:0] enc_data,   // encoded symbol
  output logic       k_err       // an undefined K code was requested
);

  logic scr_k;

  scrambler #(.LFSR_SEED(LFSR_SEED)) u_scrambler (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (sym_en),
    .data_in  (tx_data),
    .k_in     (tx_datak),
    .data_out (scr_data),
    .k_out    (scr_k)
  );

  encoder_8b10b u_encoder (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (sym_en),
    .data_in  (scr_data),
    .k_in     (scr_k),
    .code_out (enc_data),
    .k_err    (k_err),
    .rd       ()
  );

  serializer #(.W(SYM_BITS)) u_serializer (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (sym_en),
    .par_in  (enc_data),
    .ser_out (tx_serial)
  );

endmodule
