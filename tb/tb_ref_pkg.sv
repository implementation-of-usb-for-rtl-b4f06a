// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//
// ref_encode  8b/10b encoding from explicit two-column code tables (RD- and
//             RD+ forms written out), with the running disparity computed
//             from the ones count of the whole 10-bit symbol.
// ref_lfsr8   the scrambler LFSR, G(X) = X^16 + X^5 + X^4 + X^3 + 1, stepped
//             bit by bit with each tap written out; seed 16'hFFFF.
// ref_scramble a whole scrambler with the COM / SKP rules.
package tb_ref_pkg;

  typedef struct packed {
    logic [9:0] code;
    logic       rd_out;
  } enc_t;

  localparam logic [5:0] T6M [32] = '{
    6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001, 6'b011001, 6'b111000,
    6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b010111,
    6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
    6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110, 6'b011110, 6'b101011};
  localparam logic [5:0] T6P [32] = '{
    6'b011000, 6'b100010, 6'b010010, 6'b110001, 6'b001010, 6'b101001, 6'b011001, 6'b000111,
    6'b000110, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b101000,
    6'b100100, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b000101,
    6'b001100, 6'b100110, 6'b010110, 6'b001001, 6'b001110, 6'b010001, 6'b100001, 6'b010100};
  // 3b/4b, column chosen by the disparity after the 6-bit sub-block
  localparam logic [3:0] T4M [8] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
  localparam logic [3:0] T4P [8] = '{4'b0100, 4'b1001, 4'b0101, 4'b0011, 4'b0010, 4'b1010, 4'b0110, 4'b0001};
  // K28.0 .. K28.7, then K23.7, K27.7, K29.7, K30.7: {RD- code, RD+ code}
  localparam logic [7:0] KBYTE [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                                         8'hF7, 8'hFB, 8'hFD, 8'hFE};
  localparam logic [9:0] KM [12] = '{10'b0011110100, 10'b0011111001, 10'b0011110101, 10'b0011110011,
                                      10'b0011110010, 10'b0011111010, 10'b0011110110, 10'b0011111000,
                                      10'b1110101000, 10'b1101101000, 10'b1011101000, 10'b0111101000};
  localparam logic [9:0] KP [12] = '{10'b1100001011, 10'b1100000110, 10'b1100001010, 10'b1100001100,
                                      10'b1100001101, 10'b1100000101, 10'b1100001001, 10'b1100000111,
                                      10'b0001010111, 10'b0010010111, 10'b0100010111, 10'b1000010111};

  function automatic int k_index(input logic [7:0] b);
    for (int i = 0; i < 12; i++) if (KBYTE[i] == b) return i;
    return -1;
  endfunction

  function automatic enc_t ref_encode(input logic [7:0] b, input logic k, input logic rd_in);
    enc_t r;
    logic [5:0] s6;
    logic [3:0] s4;
    logic rd6;
    int ki, ones;
    ki = k ? k_index(b) : -1;                   // undefined K: sent as D code
    if (ki >= 0) begin
      r.code = rd_in ? KP[ki] : KM[ki];
    end else begin
      s6 = rd_in ? T6P[b[4:0]] : T6M[b[4:0]];
      ones = $countones(s6);
      rd6 = (ones > 3) ? 1'b1 : (ones < 3) ? 1'b0 : rd_in;
      s4 = rd6 ? T4P[b[7:5]] : T4M[b[7:5]];
      if (b[7:5] == 3'd7) begin
        if (!rd6 && (b[4:0] == 17 || b[4:0] == 18 || b[4:0] == 20)) s4 = 4'b0111;
        if ( rd6 && (b[4:0] == 11 || b[4:0] == 13 || b[4:0] == 14)) s4 = 4'b1000;
      end
      r.code = {s6, s4};
    end
    ones = $countones(r.code);
    r.rd_out = (ones > 5) ? 1'b1 : (ones < 5) ? 1'b0 : rd_in;
    return r;
  endfunction

  // one LFSR step written tap by tap; returns {next_state, key byte}
  function automatic logic [23:0] ref_lfsr8(input logic [15:0] s_in);
    logic [15:0] s, n;
    logic [7:0] key;
    s = s_in;
    for (int i = 0; i < 8; i++) begin
      key[i] = s[15];
      n[0] = s[15];
      n[1] = s[0];
      n[2] = s[1];
      n[3] = s[2] ^ s[15];
      n[4] = s[3] ^ s[15];
      n[5] = s[4] ^ s[15];
      for (int j = 6; j < 16; j++) n[j] = s[j-1];
      s = n;
    end
    return {s, key};
  endfunction

  // scrambler reference: updates state, returns the scrambled byte
  function automatic logic [7:0] ref_scramble(inout logic [15:0] st, input logic [7:0] b, input logic k);
    logic [23:0] r;
    r = ref_lfsr8(st);
    if (k && b == 8'hBC)      st = 16'hFFFF;
    else if (k && b == 8'h3C) st = st;
    else                      st = r[23:8];
    return k ? b : (b ^ r[7:0]);
  endfunction

endpackage
