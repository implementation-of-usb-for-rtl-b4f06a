// encoder_8b10b: 8b/10b encoder with running disparity.
//
// The byte HGF_EDCBA is split into x = EDCBA (5 bits) and y = HGF (3 bits).
// A 5b/6b sub-block encoder turns x into abcdei and a 3b/4b sub-block encoder
// turns y into fghj. Every sub-block has either equal numbers of ones and
// zeros or a surplus of two; the running disparity register (RD) chooses,
// for each unbalanced sub-block, the form that moves RD back toward
// balance, so the line stays DC balanced. This split and the RD register are
// the design's; the code tables are those of the standard 8b/10b code, with
// the usual special cases:
//   D.x.7 uses the alternate 0111/1000 form where the primary one would make
//         a run of five equal bits (x = 17, 18, 20 at RD-, x = 11, 13, 14 at RD+);
//   K28.y complements the neutral 3b/4b codes so that K28.1, K28.5 and K28.7
//         carry the comma pattern;
//   K23.7, K27.7, K29.7, K30.7 and K28.y are the only K codes. Any other byte
//         requested as K sets k_err and is sent as the D code of that byte
//         (not as a K code, which could be taken for a COM and re-seed the
//         far-end descrambler).
// Output order is code_out = {a,b,c,d,e,i,f,g,h,j}: the 6-bit sub-block in
// bits 9:4, the 4-bit one in 3:0, bit a (bit 9) sent first. RD starts
// negative after reset (this implementation's choice).
//
// Timing: one symbol per cycle in which en is high; code_out, k_err and rd
// are registered, one symbol of latency.
module encoder_8b10b
  import usb3_phy_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,        // symbol strobe
  input  logic [7:0] data_in,   // HGF_EDCBA
  input  logic       k_in,      // 1: encode as K code
  output logic [9:0] code_out,  // {abcdei, fghj}
  output logic       k_err,     // k_in with a byte that is no K code
  output logic       rd         // running disparity after code_out (1 = +)
);

  function automatic logic is_valid_k(input logic [7:0] b);
    return (b[4:0] == 5'd28) ||
           (b[7:5] == 3'd7 && (b[4:0] == 5'd23 || b[4:0] == 5'd27 ||
                               b[4:0] == 5'd29 || b[4:0] == 5'd30));
  endfunction

  logic       k_use;
  logic [4:0] x;
  logic [2:0] y;
  logic       k_ok;
  logic [5:0] c6;
  logic [3:0] c4;
  logic       rd6, rd_next;
  logic       c6_unbal, c4_unbal, alt7;

  always_comb begin
    k_ok    = is_valid_k(data_in);
    k_use   = k_in && k_ok;
    x       = data_in[4:0];
    y       = data_in[7:5];

    // 5b/6b
    if (k_use && x == 5'd28) c6 = 6'b001111;
    else                    c6 = code6_rdm(x);
    c6_unbal = ($countones(c6) != 3);
    if (rd && (c6_unbal || c6 == 6'b111000)) c6 = ~c6;
    rd6 = c6_unbal ? ~rd : rd;

    // 3b/4b
    alt7 = (y == 3'd7) &&
           (k_use ||
            (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
            ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    c4 = alt7 ? 4'b0111 : code4_rdm(y);
    c4_unbal = ($countones(c4) != 2);
    if (rd6 && (c4_unbal || c4 == 4'b1100)) c4 = ~c4;
    // K28.y: neutral 3b/4b codes are complemented when RD after 6b is -
    if (k_use && x == 5'd28 && !rd6 && !c4_unbal && c4 != 4'b1100 && c4 != 4'b0011)
      c4 = ~c4;
    rd_next = c4_unbal ? ~rd6 : rd6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_out <= '0;
      k_err    <= 1'b0;
      rd       <= 1'b0;
    end else if (en) begin
      code_out <= {c6, c4};
      k_err    <= k_in && !k_ok;
      rd       <= rd_next;
    end
  end

endmodule
