// tb_clock_divider: checks the divide-by-10 symbol clock and strobe.
// After reset the strobe must come every 10 bit clocks, the first one in the
// 10th cycle; sym_clk must be high for 5 cycles and low for 5.
module tb_clock_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sym_clk, sym_en;
  int checks = 0, failures = 0;
  int cyc = 0, last_en = -1, hi = 0, lo = 0, strobes = 0;

  clock_divider #(.DIV(10)) dut (.clk(clk), .rst_n(rst_n), .sym_clk(sym_clk), .sym_en(sym_en));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;             // released at a clock edge: the counter starts at the next one
    for (cyc = 1; cyc <= 205; cyc++) begin
      @(negedge clk);
      if (sym_clk) hi++; else lo++;
      if (sym_en) begin
        strobes++;
        if (last_en < 0) check(cyc == 10, $sformatf("first strobe in cycle %0d", cyc));
        else             check(cyc - last_en == 10, $sformatf("strobe period %0d", cyc - last_en));
        check(hi == 5 && lo == 5, $sformatf("sym_clk high %0d low %0d", hi, lo));
        hi = 0; lo = 0;
        last_en = cyc;
      end
      @(posedge clk);
    end
    check(strobes == 20, $sformatf("%0d strobes in 205 cycles", strobes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
