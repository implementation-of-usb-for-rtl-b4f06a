// tb_usb3_phy: end-to-end test of the PHY in serial loopback, at the
// default parameters (bit clock divided by 10, LFSR seed 16'hFFFF).
// rx_serial is tx_serial, optionally with one bit flipped.
//  1. The first symbol after reset is 8'h5c: tx_scr_data must be 8'ha3 and
//     tx_enc_data 10'h31a.
//  2. Symbol 1 is a COM, which brings the receive descrambler in step (symbol
//     0 precedes it and is descrambled with a different key). From there a
//     random stream of data, COM, SKP and the other K codes, plus one
//     undefined K code, must arrive on rx_data/rx_datak unchanged, each
//     symbol exactly 50 bit clocks (5 symbols) after it was sampled, with no
//     error flag. The symbol strobe must come every 10 bit clocks.
//  3. In the last symbols single bit errors are put on the line; each must
//     raise rx_code_err or rx_disp_err within four symbols.
// Each mechanism is counted and must happen at least once: scrambled data,
// K pass-through, COM re-seed, SKP hold, codes of both disparities, k_err,
// code errors, disparity errors, a full rx_valid stream.
module tb_usb3_phy;
  import tb_ref_pkg::*;
  localparam int N    = 2500;
  localparam int NERR = 200;          // every 4th of the last NERR symbols gets a bit error
  localparam int LAT  = 50;           // bit clocks from sampling edge to rx_data
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] txd = '0, rxd, scr;
  logic txk = 1'b0, tser, kerr, rser, rxk, rxv, cerr, derr, sclk, sen;
  logic [9:0] enc, rpar;
  int checks = 0, failures = 0, cyc = 0, last_en = -1;
  int n_scr = 0, n_kpass = 0, n_com = 0, n_skp = 0, n_pos = 0, n_neg = 0, n_kerr = 0;
  int n_cerr = 0, n_derr = 0, n_valid = 0, flagged = 0, n_flips = 0;
  bit pending = 1'b0;
  logic [7:0] sym_b [N];
  logic       sym_k [N];
  int         flip_bit [N];
  logic       flip;

  usb3_phy dut (
    .bit_clk(clk), .rst_n(rst_n),
    .tx_data(txd), .tx_datak(txk), .tx_serial(tser), .tx_k_err(kerr),
    .tx_scr_data(scr), .tx_enc_data(enc),
    .rx_serial(rser), .rx_data(rxd), .rx_datak(rxk), .rx_valid(rxv),
    .rx_code_err(cerr), .rx_disp_err(derr), .rx_par_data(rpar),
    .sym_clk(sclk), .sym_en(sen));

  assign rser = tser ^ flip;

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int KERR_AT = 700;       // index of the undefined K code

  initial begin
    flip = 1'b0;
    for (int n = 0; n < N; n++) begin
      sym_k[n] = (n > 0) && ($urandom % 6 == 0);
      sym_b[n] = (n == 0) ? 8'h5c : 8'($urandom);
      if (sym_k[n]) sym_b[n] = (($urandom % 3) == 0) ? 8'hBC : (($urandom % 2) == 0) ? 8'h3C : KBYTE[$urandom % 12];
      flip_bit[n] = -1;
    end
    sym_k[1] = 1'b1;                  // the receiver gets in step at the first COM
    sym_b[1] = 8'hBC;
    sym_k[KERR_AT] = 1'b1;
    sym_b[KERR_AT] = 8'h00;
    sym_k[KERR_AT + 1] = 1'b1;        // COM right after, so a lost key byte cannot matter
    sym_b[KERR_AT + 1] = 8'hBC;
    for (int n = N - NERR; n < N; n += 4) flip_bit[n] = int'($urandom % 10);

    @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 10 * N + LAT + 9) begin
      @(negedge clk);
      // symbol strobe
      if (sen) begin
        if (last_en >= 0) check(cyc - last_en == 10, $sformatf("strobe period %0d", cyc - last_en));
        last_en = cyc;
      end
      // first symbol: the values of the transmit example
      if (cyc == 10) check(scr == 8'ha3, $sformatf("5c scrambled to %h, expected a3", scr));
      if (cyc == 20) check(enc == 10'h31a, $sformatf("5c encoded to %h, expected 31a", enc));
      // transmit-side mechanisms, once per symbol
      if (cyc >= 10 && cyc < 10 * N + 10 && cyc % 10 == 0) begin
        int n;
        n = (cyc - 10) / 10;
        if (!sym_k[n] && scr != sym_b[n]) n_scr++;
        if (sym_k[n] && scr == sym_b[n]) n_kpass++;
        if (sym_k[n] && sym_b[n] == 8'hBC) n_com++;
        if (sym_k[n] && sym_b[n] == 8'h3C) n_skp++;
      end
      if (cyc >= 20 && cyc % 10 == 0) begin
        if ($countones(enc) > 5) n_pos++;
        if ($countones(enc) < 5) n_neg++;
        if (kerr) n_kerr++;
        check(kerr == ((cyc - 20) / 10 == KERR_AT), $sformatf("k_err at cycle %0d", cyc));
      end
      // receive side
      // the receiver captures its first word (the idle, all-zero line) at cycle 10
      if (cyc < 30) check(!rxv, "rx_valid low before the first captured word");
      if (cyc >= LAT + 10 && cyc % 10 == 0) begin
        int n;
        n = (cyc - LAT - 10) / 10;
        if (rxv) n_valid++;
        if (cerr) n_cerr++;
        if (derr) n_derr++;
        if (n < N - NERR) begin
          if (n == 0)
            check(rxv && !rxk && !cerr && !derr, "symbol 0 arrives (before the first COM)");
          else if (n != KERR_AT)
            check(rxv && rxd == sym_b[n] && rxk == sym_k[n] && !cerr && !derr,
                  $sformatf("symbol %0d: %h/%0d c%0d d%0d, expected %h/%0d", n, rxd, rxk, cerr, derr,
                            sym_b[n], sym_k[n]));
          else
            check(rxv && !rxk && !cerr && !derr, "undefined K arrives as a data symbol");
        end else if (n < N) begin
          if (flip_bit[n] >= 0) pending = 1'b1;
          if (pending && (cerr || derr)) begin
            flagged++;
            pending = 1'b0;
          end
          if ((n - (N - NERR)) % 4 == 3 && pending) begin
            check(1'b0, $sformatf("bit error in symbol %0d not flagged", n - 3));
            pending = 1'b0;
          end
        end
      end
      // drive the next bit clock
      if (cyc / 10 < N) begin
        txd = sym_b[cyc / 10];
        txk = sym_k[cyc / 10];
      end
      // symbol n is on the line in cycles 10n+30 .. 10n+39, bit 9 first
      flip = 1'b0;
      if (cyc >= 30 && (cyc - 30) / 10 < N) begin
        int n, b;
        n = (cyc - 30) / 10;
        b = 9 - (cyc - 30) % 10;
        flip = (flip_bit[n] == b);
        if (flip) n_flips++;
      end
    end

    check(n_flips == NERR / 4, $sformatf("%0d bit errors injected", n_flips));
    check(flagged == NERR / 4, $sformatf("%0d of %0d bit errors flagged", flagged, NERR / 4));
    check(n_scr > 0,   $sformatf("scrambled data symbols: %0d", n_scr));
    check(n_kpass > 0, $sformatf("K symbols passed unscrambled: %0d", n_kpass));
    check(n_com > 0,   $sformatf("COM re-seeds: %0d", n_com));
    check(n_skp > 0,   $sformatf("SKP holds: %0d", n_skp));
    check(n_pos > 0 && n_neg > 0, $sformatf("codes with more ones %0d, more zeros %0d", n_pos, n_neg));
    check(n_kerr == 1, $sformatf("k_err events: %0d", n_kerr));
    check(n_cerr > 0,  $sformatf("code errors seen: %0d", n_cerr));
    check(n_derr > 0,  $sformatf("disparity errors seen: %0d", n_derr));
    check(n_valid == N, $sformatf("rx_valid symbols: %0d", n_valid));
    $display("mechanisms: scrambled=%0d kpass=%0d com=%0d skp=%0d rd_pos=%0d rd_neg=%0d kerr=%0d code_err=%0d disp_err=%0d",
             n_scr, n_kpass, n_com, n_skp, n_pos, n_neg, n_kerr, n_cerr, n_derr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
