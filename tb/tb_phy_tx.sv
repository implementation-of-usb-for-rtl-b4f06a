// tb_phy_tx: checks the transmit path against the reference scrambler and
// encoder. The symbol strobe comes every 10 bit clocks. The first symbol
// after reset is 8'h5c, which must scramble to 8'ha3 and encode to 10'h31a;
// then a random stream of data, COM, SKP and other K symbols follows.
// For symbol n sampled at the strobe edge that ends cycle 10n+9:
//   scr_data   = reference scramble   in cycles 10n+10 .. 10n+19
//   enc_data   = reference encoding   in cycles 10n+20 .. 10n+29
//   tx_serial  = its bits, MSB first, in cycles 10n+30 .. 10n+39
// The running digital sum of the serial line must stay within +-3.
module tb_phy_tx;
  import tb_ref_pkg::*;
  localparam int N = 1500;
  logic clk = 1'b0, rst_n = 1'b0, sym_en = 1'b0;
  logic [7:0] txd = '0, scr;
  logic txk = 1'b0, ser, kerr;
  logic [9:0] enc;
  int checks = 0, failures = 0, cyc = 0, rds = 0;
  logic [7:0] sym_b [N];
  logic       sym_k [N];
  logic [7:0] exp_s [N];
  logic [9:0] exp_c [N];

  phy_tx dut (.clk(clk), .rst_n(rst_n), .sym_en(sym_en), .tx_data(txd), .tx_datak(txk),
              .tx_serial(ser), .scr_data(scr), .enc_data(enc), .k_err(kerr));

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] st;
    logic rd;
    enc_t e;
    st = 16'hFFFF;
    rd = 1'b0;
    for (int n = 0; n < N; n++) begin
      sym_k[n] = (n > 0) && ($urandom % 8 == 0);
      sym_b[n] = (n == 0) ? 8'h5c : 8'($urandom);
      if (sym_k[n]) sym_b[n] = (($urandom % 3) == 0) ? 8'hBC : (($urandom % 2) == 0) ? 8'h3C : KBYTE[$urandom % 12];
      exp_s[n] = ref_scramble(st, sym_b[n], sym_k[n]);
      e = ref_encode(exp_s[n], sym_k[n], rd);
      exp_c[n] = e.code;
      rd = e.rd_out;
    end
    check(exp_s[0] == 8'ha3 && exp_c[0] == 10'h31a, "reference values for 5c");

    @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 10 * N + 29) begin
      @(negedge clk);
      if (cyc >= 10 && cyc < 10 * N + 10)
        check(scr == exp_s[(cyc - 10) / 10], $sformatf("cycle %0d scr_data %h", cyc, scr));
      if (cyc >= 20 && cyc < 10 * N + 20) begin
        check(enc == exp_c[(cyc - 20) / 10], $sformatf("cycle %0d enc_data %h", cyc, enc));
        check(!kerr, "no k_err");
      end
      if (cyc >= 30) begin
        int n, b;
        n = (cyc - 30) / 10;
        b = 9 - (cyc - 30) % 10;
        check(ser == exp_c[n][b], $sformatf("cycle %0d serial bit of symbol %0d", cyc, n));
        rds += ser ? 1 : -1;
        if (b == 0) check(rds >= -3 && rds <= 3, $sformatf("running digital sum %0d", rds));
      end
      sym_en = (cyc % 10 == 9);
      txd = (cyc / 10 < N) ? sym_b[cyc / 10] : 8'h00;
      txk = (cyc / 10 < N) ? sym_k[cyc / 10] : 1'b0;
    end
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
