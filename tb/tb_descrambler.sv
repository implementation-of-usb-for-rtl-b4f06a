// tb_descrambler: checks the descrambler.
//  - first data byte after reset: 8'ha0 -> 8'h5f, and after a COM 8'h4a -> 8'hb5
//  - a random stream scrambled by the independent reference model is
//    restored exactly, including COM and SKP handling; K symbols pass.
module tb_descrambler;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din = '0, dout;
  logic kin = 1'b0, kout;
  int checks = 0, failures = 0;
  logic [15:0] st;

  descrambler dut (.clk(clk), .rst_n(rst_n), .en(en), .data_in(din), .k_in(kin),
                   .data_out(dout), .k_out(kout));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input logic k, output logic [7:0] o, output logic ko);
    @(negedge clk);
    din = b; kin = k; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    o = dout; ko = kout;
  endtask

  logic [7:0] o, s;
  logic ko, kk;

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    send(8'ha0, 1'b0, o, ko);
    check(o == 8'h5f && !ko, $sformatf("a0 -> %h, expected 5f", o));
    send(8'h12, 1'b0, o, ko);
    send(8'hBC, 1'b1, o, ko);
    check(o == 8'hBC && ko, "COM passes");
    send(8'h4a, 1'b0, o, ko);
    check(o == 8'hb5, $sformatf("4a after COM -> %h, expected b5", o));

    // reference-scrambled stream, starting with a COM to synchronise
    st = 16'hFFFF;
    s = ref_scramble(st, 8'hBC, 1'b1);
    send(s, 1'b1, o, ko);
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] b;
      b  = 8'($urandom);
      kk = ($urandom % 8) == 0;
      if (kk) b = (($urandom % 3) == 0) ? 8'hBC : (($urandom % 2) == 0) ? 8'h3C : 8'hFE;
      s = ref_scramble(st, b, kk);
      send(s, kk, o, ko);
      check(o == b && ko == kk, $sformatf("stream %0d: got %h/%0d, sent %h/%0d", i, o, ko, b, kk));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
