// tb_serializer: checks the parallel to serial converter.
// A load strobe every 10 bit clocks loads random words; each word must come
// out MSB first, one bit per bit clock, starting in the cycle after its load,
// with no gap between words (10 bits per 10 clocks).
module tb_serializer;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [9:0] pin = '0;
  logic sout;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [9:0] words [64];

  serializer #(.W(10)) dut (.clk(clk), .rst_n(rst_n), .load(load), .par_in(pin), .ser_out(sout));

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) words[i] = 10'($urandom);
    words[0] = 10'h31a;
    @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 10 * 63) begin
      @(negedge clk);
      if (cyc >= 10) begin
        int w, b;
        w = (cyc - 10) / 10;
        b = 9 - (cyc - 10) % 10;
        check(sout == words[w][b], $sformatf("cycle %0d word %0d bit %0d", cyc, w, b));
      end
      load = (cyc % 10 == 9);
      pin  = words[(cyc / 10) % 64];
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
