// tb_deserializer: checks the serial to parallel converter.
// Random 10-bit words are sent MSB first, one bit per bit clock, with a
// capture strobe in the cycle of each word's last bit. Each word must appear
// on par_out one bit clock after its capture edge, hold for 10 clocks, and
// valid must be low until the first capture.
module tb_deserializer;
  logic clk = 1'b0, rst_n = 1'b0, cap = 1'b0, sin = 1'b0;
  logic [9:0] pout;
  logic valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [9:0] words [64];

  deserializer #(.W(10)) dut (.clk(clk), .rst_n(rst_n), .capture(cap), .ser_in(sin),
                              .par_out(pout), .valid(valid));

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) words[i] = 10'($urandom);
    @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 10 * 63) begin
      @(negedge clk);
      // bit (cyc % 10) of word cyc / 10 is on the line during this cycle
      if (cyc < 10) check(!valid, "valid low before the first capture");
      else begin
        check(valid, "valid");
        check(pout == words[cyc / 10 - 1], $sformatf("cycle %0d word %0d: %b", cyc, cyc / 10 - 1, pout));
      end
      sin = words[cyc / 10][9 - cyc % 10];
      cap = (cyc % 10 == 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
