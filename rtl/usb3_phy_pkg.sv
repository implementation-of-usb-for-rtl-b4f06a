// usb3_phy_pkg: constants and helper functions shared by the USB 3.0 SuperSpeed
// PHY blocks.
//
// The scrambler and descrambler both use a 16-bit LFSR with the generator
// polynomial G(X) = X^16 + X^5 + X^4 + X^3 + 1. The polynomial is the
// design's specification; the Galois form, the seed of 16'hFFFF and the bit
// order (data bit 0 first, key bit taken from LFSR bit 15) follow the USB 3.0
// specification. With that seed the first key byte is 8'hFF.
// The 8b/10b 5b/6b and 3b/4b tables (RD- forms) are shared by the encoder
// and the decoder.
// The special-symbol values (COM = K28.5, SKP = K28.1) are the USB 3.0 ones.
package usb3_phy_pkg;

  localparam int unsigned SYM_BITS  = 10;       // bits per 8b/10b symbol

  localparam logic [15:0] LFSR_SEED_DEFAULT = 16'hFFFF;
  // feedback taps X^5, X^4, X^3 and X^0 of G(X)
  localparam logic [15:0] LFSR_POLY_DEFAULT = 16'h0039;

  localparam logic [7:0] K28_5_COM = 8'hBC;     // COM: re-seeds the LFSR
  localparam logic [7:0] K28_1_SKP = 8'h3C;     // SKP: LFSR holds

  // 8 key bits and the LFSR state after 8 steps, packed {next_state, key}
  typedef struct packed {
    logic [15:0] next_state;
    logic [7:0]  key;
  } lfsr_step_t;

  function automatic lfsr_step_t lfsr_step8(input logic [15:0] state,
                                            input logic [15:0] poly);
    lfsr_step_t r;
    logic [15:0] s;
    s = state;
    for (int i = 0; i < 8; i++) begin
      r.key[i] = s[15];
      s = {s[14:0], 1'b0} ^ (s[15] ? poly : 16'h0000);
    end
    r.next_state = s;
    return r;
  endfunction

  // What a symbol does to the LFSR
  typedef enum logic [1:0] {
    LFSR_ADVANCE = 2'd0,
    LFSR_RESEED  = 2'd1,
    LFSR_HOLD    = 2'd2
  } lfsr_action_t;

  function automatic lfsr_action_t lfsr_action(input logic [7:0] data,
                                               input logic       k);
    if (k && data == K28_5_COM)      return LFSR_RESEED;
    else if (k && data == K28_1_SKP) return LFSR_HOLD;
    else                             return LFSR_ADVANCE;
  endfunction

  // 8b/10b sub-block tables (standard 8b/10b code), RD- forms.
  // 5b/6b code for RD- (abcdei, a is the MSB); x = EDCBA
  function automatic logic [5:0] code6_rdm(input logic [4:0] x);
    unique case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b primary code for RD- (fghj, f is the MSB); y = HGF
  function automatic logic [3:0] code4_rdm(input logic [2:0] y);
    unique case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

endpackage
