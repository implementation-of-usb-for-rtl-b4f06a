// tb_phy_rx: checks the receive path with a bit stream built by the
// reference scrambler and encoder, sent MSB first and aligned to the symbol
// strobe (every 10 bit clocks).
//  - a COM followed by the scrambled byte 8'h4a must give 8'hb5 (the first
//    key byte is FF)
//  - a random stream of data, COM, SKP and K symbols is restored exactly; the
//    symbol whose last bit arrives in cycle 10n+9 is on rx_data, with
//    rx_valid, in cycles 10n+30 .. 10n+39; par_data holds it in 10n+10 .. 10n+19
//  - single bit errors injected near the end must each raise code_err or
//    disp_err in the slot of the damaged symbol or of one of the next three
//    (a flipped bit can form another valid code, whose wrong disparity only
//    shows at the next unbalanced symbol)
module tb_phy_rx;
  import tb_ref_pkg::*;
  localparam int N = 1500;
  localparam int NERR = 40;           // every 4th of the last NERR symbols gets one flipped bit
  logic clk = 1'b0, rst_n = 1'b0, sym_en = 1'b0, sin = 1'b0;
  logic [9:0] par;
  logic [7:0] rxd;
  logic rxk, rxv, cerr, derr;
  int checks = 0, failures = 0, cyc = 0, flagged = 0;
  bit pending = 1'b0;
  logic [7:0] sym_b [N];
  logic       sym_k [N];
  logic [9:0] line_c [N];
  int         flip_bit [N];

  phy_rx dut (.clk(clk), .rst_n(rst_n), .sym_en(sym_en), .rx_serial(sin), .par_data(par),
              .rx_data(rxd), .rx_datak(rxk), .rx_valid(rxv), .code_err(cerr), .disp_err(derr));

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
    logic [7:0] s;
    st = 16'hFFFF;
    rd = 1'b0;
    for (int n = 0; n < N; n++) begin
      sym_k[n] = (n == 0) || ($urandom % 8 == 0);
      sym_b[n] = 8'($urandom);
      if (sym_k[n]) sym_b[n] = (n == 0 || ($urandom % 3) == 0) ? 8'hBC : (($urandom % 2) == 0) ? 8'h3C : KBYTE[$urandom % 12];
      s = ref_scramble(st, sym_b[n], sym_k[n]);
      if (n == 1) begin
        sym_k[1] = 1'b0;
        s = 8'h4a;
        sym_b[1] = 8'h4a ^ 8'hFF;
      end
      e = ref_encode(s, sym_k[n], rd);
      line_c[n] = e.code;
      rd = e.rd_out;
      flip_bit[n] = (n >= N - NERR && n % 4 == 0) ? int'($urandom % 10) : -1;
    end

    @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 10 * N + 29) begin
      @(negedge clk);
      if (cyc < 30) check(!rxv, "rx_valid low while the pipeline fills");
      if (cyc >= 10 && cyc < 10 * N + 10)
        check(par == (line_c[(cyc - 10) / 10] ^ ((flip_bit[(cyc - 10) / 10] >= 0) ?
                      10'(1 << flip_bit[(cyc - 10) / 10]) : 10'd0)),
              $sformatf("cycle %0d par_data %b line %b flip %0d", cyc, par, line_c[(cyc - 10) / 10], flip_bit[(cyc - 10) / 10]));
      if (cyc >= 30 && cyc < 10 * N + 30) begin
        int n;
        n = (cyc - 30) / 10;
        if (n == 1) check(rxd == 8'hb5, $sformatf("4a -> %h, expected b5", rxd));
        if (n < N - NERR) begin
          check(rxv && rxd == sym_b[n] && rxk == sym_k[n] && !cerr && !derr,
                $sformatf("symbol %0d: %h/%0d c%0d d%0d, expected %h/%0d", n, rxd, rxk, cerr, derr,
                          sym_b[n], sym_k[n]));
        end else if (cyc % 10 == 0) begin
          // an error shows in the damaged symbol or, as a disparity error,
          // in one of the next three
          if (flip_bit[n] >= 0) pending = 1'b1;
          if (pending && (cerr || derr)) begin
            flagged++;
            pending = 1'b0;
          end
          if (n % 4 == 3 && pending) begin
            check(1'b0, $sformatf("bit error in symbol %0d not flagged", n - 3));
            pending = 1'b0;
          end
        end
      end
      sym_en = (cyc % 10 == 9);
      if (cyc / 10 < N) begin
        int n;
        n = cyc / 10;
        sin = line_c[n][9 - cyc % 10] ^ (flip_bit[n] == 9 - cyc % 10);
      end
    end
    check(flagged == NERR / 4, $sformatf("%0d of %0d bit errors flagged", flagged, NERR / 4));
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
