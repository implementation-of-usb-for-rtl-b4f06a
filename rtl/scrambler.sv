// scrambler: the transmit scrambler of the USB 3.0 PHY.
//
// Each data symbol is XORed with 8 key bits produced by a 16-bit LFSR with
// G(X) = X^16 + X^5 + X^4 + X^3 + 1, which spreads the spectrum of repetitive
// data and lowers EMI. K symbols pass through unscrambled ("data only").
// The polynomial and the data-only rule are the design's; the seed, bit order
// and the control rules below follow the USB 3.0 specification:
//   COM (K28.5)  re-seeds the LFSR, so the next data symbol gets key 8'hFF;
//   SKP (K28.1)  leaves the LFSR unchanged;
//   any other    advances it by 8 steps.
// Reset loads the seed, so the first data symbol after reset also gets 8'hFF.
//
// Timing: one symbol per cycle in which en is high; data_out/k_out are
// registered, one symbol of latency.
module scrambler
  import usb3_phy_pkg::*;
#(
  parameter logic [15:0] LFSR_SEED = LFSR_SEED_DEFAULT,
  parameter logic [15:0] LFSR_POLY = LFSR_POLY_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,        // symbol strobe
  input  logic [7:0] data_in,
  input  logic       k_in,      // 1: data_in is a K code
  output logic [7:0] data_out,
  output logic       k_out
);

  logic [15:0]  lfsr;
  lfsr_step_t   step;
  lfsr_action_t action;

  always_comb begin
    step   = lfsr_step8(lfsr, LFSR_POLY);
    action = lfsr_action(data_in, k_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr     <= LFSR_SEED;
      data_out <= '0;
      k_out    <= 1'b0;
    end else if (en) begin
      data_out <= k_in ? data_in : (data_in ^ step.key);
      k_out    <= k_in;
      unique case (action)
        LFSR_RESEED:  lfsr <= LFSR_SEED;
        LFSR_HOLD:    lfsr <= lfsr;
        default:      lfsr <= step.next_state;
      endcase
    end
  end

endmodule
