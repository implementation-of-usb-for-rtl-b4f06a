// tb_encoder_8b10b: checks the 8b/10b encoder against the reference tables.
//  - fixed values: D3.5 (8'ha3) at RD- is 10'h31a; D25.2 (8'h59) is
//    1001100101; K28.5 at RD- is 0011111010 and at RD+ 1100000101
//  - every D and K code from both running disparities, with the RD output
//  - a random stream: codes, RD, bounded running digital sum, 4..6 ones per
//    symbol, both RD forms used
//  - an undefined K code sets k_err and is sent as the D code of that byte
module tb_encoder_8b10b;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din = '0;
  logic kin = 1'b0;
  logic [9:0] code;
  logic kerr, rd;
  int checks = 0, failures = 0;
  int rds = 0, n_pos = 0, n_neg = 0;
  logic model_rd;

  encoder_8b10b dut (.clk(clk), .rst_n(rst_n), .en(en), .data_in(din), .k_in(kin),
                     .code_out(code), .k_err(kerr), .rd(rd));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input logic k);
    enc_t e;
    e = ref_encode(b, k, model_rd);
    @(negedge clk);
    din = b; kin = k; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    check(code == e.code, $sformatf("%s%h at RD%s: %b, expected %b", k ? "K" : "D", b,
                                     model_rd ? "+" : "-", code, e.code));
    check(rd == e.rd_out, $sformatf("rd after %h", b));
    check($countones(code) >= 4 && $countones(code) <= 6, "ones per symbol");
    rds += 2 * $countones(code) - 10;
    if (model_rd) n_pos++; else n_neg++;
    model_rd = e.rd_out;
  endtask

  // force the encoder's RD to a value by sending K28.5, whose two forms are unbalanced
  task automatic set_rd(input logic want);
    while (model_rd != want) send(8'hBC, 1'b1);
  endtask

  initial begin
    model_rd = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check(rd == 1'b0, "RD negative after reset");
    send(8'ha3, 1'b0);
    check(code == 10'h31a, $sformatf("a3 -> %h, expected 31a", code));
    send(8'h59, 1'b0);
    check(code == 10'b1001100101, "D25.2");
    set_rd(1'b0);
    send(8'hBC, 1'b1);
    check(code == 10'b0011111010, "K28.5 RD-");
    send(8'hBC, 1'b1);
    check(code == 10'b1100000101, "K28.5 RD+");

    for (int r = 0; r < 2; r++) begin
      for (int b = 0; b < 256; b++) begin
        set_rd(r[0]);
        send(8'(b), 1'b0);
      end
      for (int i = 0; i < 12; i++) begin
        set_rd(r[0]);
        send(KBYTE[i], 1'b1);
        check(!kerr, "valid K without k_err");
      end
    end

    // undefined K code
    send(8'h00, 1'b1);
    check(kerr, "k_err for K0.0");
    check(code == 10'b1001110100 || code == 10'b0110001011, "K0.0 sent as D0.0");
    send(8'h55, 1'b0);
    check(!kerr, "k_err clears");

    rds = 0;
    for (int i = 0; i < 4000; i++) begin
      logic k;
      k = ($urandom % 10) == 0;
      send(k ? KBYTE[$urandom % 12] : 8'($urandom), k);
      check(rds >= -3 && rds <= 3, $sformatf("running digital sum %0d", rds));
    end
    check(n_pos > 1000 && n_neg > 1000, $sformatf("RD+ %0d RD- %0d symbols", n_pos, n_neg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
