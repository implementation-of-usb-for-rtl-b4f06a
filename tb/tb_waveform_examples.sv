// tb_waveform_examples: the worked examples of the design, run through the
// whole PHY in serial loopback at its default parameters.
//   symbol 0  5c right after reset: scrambled a3, encoded 10'h31a
//   symbol 1  COM
//   symbol 2  5f: scrambled a0 (key FF after COM); the receiver decodes a0
//             and descrambles it back to 5f
//   symbol 3  COM
//   symbol 4  b5: scrambled 4a; the receiver decodes 4a and outputs b5
//   then 1000 random data symbols back to back: the line carries one bit per
//   bit clock (2.5 Gb/s at a 2.5 GHz bit clock), one symbol per 10 clocks,
//   and every symbol arrives 50 bit clocks after it was sampled.
module tb_waveform_examples;
  import tb_ref_pkg::*;
  localparam int N = 1005;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] txd = '0, rxd, scr;
  logic txk = 1'b0, tser, kerr, rxk, rxv, cerr, derr, sclk, sen;
  logic [9:0] enc, rpar;
  int checks = 0, failures = 0, cyc = 0, nsym = 0, bits = 0;
  logic [7:0] sym_b [N];
  logic       sym_k [N];

  usb3_phy dut (
    .bit_clk(clk), .rst_n(rst_n),
    .tx_data(txd), .tx_datak(txk), .tx_serial(tser), .tx_k_err(kerr),
    .tx_scr_data(scr), .tx_enc_data(enc),
    .rx_serial(tser), .rx_data(rxd), .rx_datak(rxk), .rx_valid(rxv),
    .rx_code_err(cerr), .rx_disp_err(derr), .rx_par_data(rpar),
    .sym_clk(sclk), .sym_en(sen));

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // decoded (still scrambled) byte of a received word, via the reference tables
  function automatic logic [7:0] ref_decode(input logic [9:0] c);
    enc_t e;
    for (int r = 0; r < 2; r++)
      for (int b = 0; b < 256; b++) begin
        e = ref_encode(8'(b), 1'b0, r[0]);
        if (e.code == c) return 8'(b);
      end
    return 8'hxx;
  endfunction

  initial begin
    sym_b[0] = 8'h5c; sym_k[0] = 1'b0;
    sym_b[1] = 8'hBC; sym_k[1] = 1'b1;
    sym_b[2] = 8'h5f; sym_k[2] = 1'b0;
    sym_b[3] = 8'hBC; sym_k[3] = 1'b1;
    sym_b[4] = 8'hb5; sym_k[4] = 1'b0;
    for (int n = 5; n < N; n++) begin
      sym_b[n] = 8'($urandom);
      sym_k[n] = 1'b0;
    end
    @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 10 * N + 59) begin
      @(negedge clk);
      // transmit side
      if (cyc == 10) check(scr == 8'ha3, $sformatf("5c -> scrambled %h, expected a3", scr));
      if (cyc == 20) check(enc == 10'h31a, $sformatf("5c -> encoded %h, expected 31a", enc));
      if (cyc == 30) check(scr == 8'ha0, $sformatf("5f -> scrambled %h, expected a0", scr));
      if (cyc == 50) check(scr == 8'h4a, $sformatf("b5 -> scrambled %h, expected 4a", scr));
      // receive side: word of symbol n in rx_par_data from 10n+40, rx_data from 10n+60
      if (cyc == 60) check(ref_decode(rpar) == 8'ha0, "receiver word for symbol 2 decodes to a0");
      if (cyc == 80) check(ref_decode(rpar) == 8'h4a, "receiver word for symbol 4 decodes to 4a");
      if (cyc == 80) check(rxv && rxd == 8'h5f && !rxk, $sformatf("a0 -> descrambled %h, expected 5f", rxd));
      if (cyc == 100) check(rxv && rxd == 8'hb5 && !rxk, $sformatf("4a -> descrambled %h, expected b5", rxd));
      if (cyc >= 70 && cyc % 10 == 0 && (cyc - 60) / 10 < N) begin
        int n;
        n = (cyc - 60) / 10;
        check(rxd == sym_b[n] && rxk == sym_k[n] && !cerr && !derr, $sformatf("symbol %0d", n));
        nsym++;
      end
      if (sen) bits += 10;
      txd = (cyc / 10 < N) ? sym_b[cyc / 10] : 8'h00;
      txk = (cyc / 10 < N) ? sym_k[cyc / 10] : 1'b0;
    end
    check(nsym == N - 1, $sformatf("%0d symbols received", nsym));
    check(bits == cyc + 1 - (cyc + 1) % 10, $sformatf("%0d line bits in %0d bit clocks", bits, cyc + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
