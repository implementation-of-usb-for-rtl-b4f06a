// usb3_phy: USB 3.0 SuperSpeed physical layer, digital part.
//
// The PHY sits between the link layer (a PIPE-style byte interface with a
// D/K flag per symbol) and the two unidirectional serial data paths of a
// SuperSpeed port. The transmit path scrambles, 8b/10b-encodes and
// serializes; the receive path deserializes, decodes with error checks and
// descrambles. One clock divider turns the bit clock into the symbol clock
// (bit clock / 10, brought out as sym_clk) and a symbol strobe (sym_en) that
// all symbol-rate stages use as clock enable. At the 2.5 Gb/s line rate of
// the design the bit clock is 2.5 GHz and the symbol rate 250 Msymbol/s.
// The clock recovery, the analog line driver and receiver, and the layers
// above the PHY are outside this module.
//
// Interface: tx_data/tx_datak are taken at each sym_en edge; rx_data,
// rx_datak, rx_valid and the error flags change right after sym_en edges.
// The receiver frames words on the local sym_en, so rx_serial must arrive
// word-aligned; tying rx_serial to tx_serial gives a working loopback.
//
// Timing (loopback): a symbol sampled at a sym_en edge starts to leave on
// tx_serial 2 symbols later (20 bit clocks) and is on rx_data 5 symbols
// (50 bit clocks) after sampling. One symbol is accepted every 10 bit clocks.
module usb3_phy
  import usb3_phy_pkg::*;
#(
  parameter int unsigned DIV       = SYM_BITS,
  parameter logic [15:0] LFSR_SEED = LFSR_SEED_DEFAULT
) (
  input  logic       bit_clk,
  input  logic       rst_n,
  // transmit side
  input  logic [7:0] tx_data,
  input  logic       tx_datak,
  output logic       tx_serial,
  output logic       tx_k_err,
  output logic [7:0] tx_scr_data,   // scrambled symbol, for observation
  output logic [9:0] tx_enc_data,   // encoded symbol, for observation
  // receive side
  input  logic       rx_serial,
  output logic [7:0] rx_data,
  output logic       rx_datak,
  output logic       rx_valid,
  output logic       rx_code_err,
  output logic       rx_disp_err,
  output logic [9:0] rx_par_data,   // deserialized symbol, for observation
  // symbol clock
  output logic       sym_clk,
  output logic       sym_en
);

  clock_divider #(.DIV(DIV)) u_clock_divider (
    .clk     (bit_clk),
    .rst_n   (rst_n),
    .sym_clk (sym_clk),
    .sym_en  (sym_en)
  );

  phy_tx #(.LFSR_SEED(LFSR_SEED)) u_tx (
    .clk       (bit_clk),
    .rst_n     (rst_n),
    .sym_en    (sym_en),
    .tx_data   (tx_data),
    .tx_datak  (tx_datak),
    .tx_serial (tx_serial),
    .scr_data  (tx_scr_data),
    .enc_data  (tx_enc_data),
    .k_err     (tx_k_err)
  );

  phy_rx #(.LFSR_SEED(LFSR_SEED)) u_rx (
    .clk       (bit_clk),
    .rst_n     (rst_n),
    .sym_en    (sym_en),
    .rx_serial (rx_serial),
    .par_data  (rx_par_data),
    .rx_data   (rx_data),
    .rx_datak  (rx_datak),
    .rx_valid  (rx_valid),
    .code_err  (rx_code_err),
    .disp_err  (rx_disp_err)
  );

  initial assert (DIV == SYM_BITS)
    else $error("usb3_phy: DIV must equal the 8b/10b symbol width");

endmodule
