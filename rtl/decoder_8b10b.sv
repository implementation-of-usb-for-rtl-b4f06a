// decoder_8b10b: 10b/8b decoder with error detection.
//
// The received symbol {abcdei, fghj} is split into its 6-bit and 4-bit
// sub-blocks. Each is looked up against both disparity forms of the standard
// 8b/10b tables (shared with the encoder) to recover x = EDCBA and y = HGF.
// For K28 the neutral 4-bit codes are complemented when the 6-bit part is
// 110000, so the 4-bit part is normalised before lookup.
// Two kinds of error are reported, as the design asks for detection of
// invalid symbols:
//   code_err  the symbol is not an 8b/10b code: a sub-block that is in no
//             table, an alternate D.x.7 form where it is not allowed, a
//             primary D.x.7 form that would make a run of five, or a K28.7
//             with the primary form;
//   disp_err  an unbalanced (or D.x.7 / D.x.3 disparity-specific) sub-block
//             does not match the running disparity (RD) the decoder tracks.
// A symbol that is invalid in both disparities may show as disp_err only.
// RD starts negative and follows the received bits, errors included; these
// rules and the Start/End framing checks (a link-layer matter, not built)
// are this implementation's reading.
//
// Timing: one symbol per cycle in which en is high; all outputs registered,
// one symbol of latency.
module decoder_8b10b
  import usb3_phy_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,        // symbol strobe
  input  logic [9:0] code_in,   // {abcdei, fghj}
  output logic [7:0] data_out,  // HGF_EDCBA
  output logic       k_out,
  output logic       code_err,
  output logic       disp_err
);

  logic       rd;
  logic [5:0] c6;
  logic [3:0] c4, c4n;
  logic [4:0] x;
  logic [2:0] y;
  logic       hit6, hit4, k28, alt, kx7, bad7;
  logic       need6_m, need6_p, need4_m, need4_p, rd6, rd_next;
  logic       cerr, derr;
  int unsigned n6, n4;

  always_comb begin
    c6 = code_in[9:4];
    c4 = code_in[3:0];

    // 6-bit sub-block lookup
    hit6 = 1'b0;
    x    = '0;
    k28  = (c6 == 6'b001111) || (c6 == 6'b110000);
    for (int i = 0; i < 32; i++) begin
      logic [5:0] cm, cp;
      cm = code6_rdm(5'(i));
      cp = ($countones(cm) != 3 || i == 7) ? ~cm : cm;
      if (c6 == cm || c6 == cp) begin
        hit6 = 1'b1;
        x    = 5'(i);
      end
    end
    if (k28) begin
      hit6 = 1'b1;
      x    = 5'd28;
    end

    // 4-bit sub-block lookup, normalised for K28
    c4n  = (c6 == 6'b110000) ? ~c4 : c4;
    hit4 = 1'b0;
    y    = '0;
    alt  = (c4n == 4'b0111) || (c4n == 4'b1000);
    for (int j = 0; j < 8; j++) begin
      logic [3:0] dm, dp;
      dm = code4_rdm(3'(j));
      dp = ($countones(dm) != 2 || j == 3) ? ~dm : dm;
      if (c4n == dm || c4n == dp) begin
        hit4 = 1'b1;
        y    = 3'(j);
      end
    end
    if (alt) begin
      hit4 = 1'b1;
      y    = 3'd7;
    end

    // D.x.7 / K.x.7 rules
    kx7  = (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);
    bad7 = 1'b0;
    if (y == 3'd7) begin
      if (k28)
        bad7 = !(alt && c4n == 4'b1000);
      else if (alt)
        bad7 = !((kx7 || x == 5'd11 || x == 5'd13 || x == 5'd14 ||
                  x == 5'd17 || x == 5'd18 || x == 5'd20) && (c4[3] != c6[0]));
      else
        bad7 = (x == 5'd11 || x == 5'd13 || x == 5'd14 ||
                x == 5'd17 || x == 5'd18 || x == 5'd20) && (c4[3] == c6[0]);
    end
    cerr = !hit6 || !hit4 || bad7;

    // running disparity, on the raw bits
    n6      = $countones(c6);
    n4      = $countones(c4);
    need6_m = (n6 > 3) || (c6 == 6'b111000);
    need6_p = (n6 < 3) || (c6 == 6'b000111);
    rd6     = (n6 > 3) ? 1'b1 : (n6 < 3) ? 1'b0 : rd;
    need4_m = (n4 > 2) || (c4 == 4'b1100);
    need4_p = (n4 < 2) || (c4 == 4'b0011);
    rd_next = (n4 > 2) ? 1'b1 : (n4 < 2) ? 1'b0 : rd6;
    derr    = (need6_m && rd) || (need6_p && !rd) ||
              (need4_m && rd6) || (need4_p && !rd6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd       <= 1'b0;
      data_out <= '0;
      k_out    <= 1'b0;
      code_err <= 1'b0;
      disp_err <= 1'b0;
    end else if (en) begin
      rd       <= rd_next;
      data_out <= {y, x};
      k_out    <= k28 || (alt && kx7 && !cerr);
      code_err <= cerr;
      disp_err <= derr;
    end
  end

endmodule
