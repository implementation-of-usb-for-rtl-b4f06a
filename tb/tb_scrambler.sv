// tb_scrambler: checks the scrambler against an independent tap-by-tap LFSR
// model and against fixed values.
//  - first data byte after reset: 8'h5f -> 8'ha0 and 8'h5c -> 8'ha3 (key FF)
//  - key sequence for zero data: FF 17 C0 14 B2 E7 02 82 (USB 3.0 / PCIe
//    scrambler sequence)
//  - K symbols pass unchanged, COM re-seeds, SKP holds the LFSR
//  - a long random stream of D and K symbols matches the model
module tb_scrambler;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din = '0, dout;
  logic kin = 1'b0, kout;
  int checks = 0, failures = 0;
  logic [15:0] st;
  localparam logic [7:0] SEQ [8] = '{8'hFF, 8'h17, 8'hC0, 8'h14, 8'hB2, 8'hE7, 8'h02, 8'h82};

  scrambler dut (.clk(clk), .rst_n(rst_n), .en(en), .data_in(din), .k_in(kin),
                 .data_out(dout), .k_out(kout));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // present one symbol, strobe once, return the registered output
  task automatic send(input logic [7:0] b, input logic k, output logic [7:0] o, output logic ko);
    @(negedge clk);
    din = b; kin = k; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    o = dout; ko = kout;
    // idle cycles without en must not change anything
    @(negedge clk);
    check(dout == o, "output held without en");
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  logic [7:0] o, e;
  logic ko, kk;

  initial begin
    do_reset();
    send(8'h5f, 1'b0, o, ko);
    check(o == 8'ha0, $sformatf("5f -> %h, expected a0", o));
    do_reset();
    send(8'h5c, 1'b0, o, ko);
    check(o == 8'ha3, $sformatf("5c -> %h, expected a3", o));

    do_reset();
    for (int i = 0; i < 8; i++) begin
      send(8'h00, 1'b0, o, ko);
      check(o == SEQ[i] && !ko, $sformatf("key %0d = %h, expected %h", i, o, SEQ[i]));
    end
    // SKP holds: next data key is still SEQ[8]... compare against the model
    st = 16'hFFFF;
    for (int i = 0; i < 8; i++) void'(ref_scramble(st, 8'h00, 1'b0));
    send(8'h3C, 1'b1, o, ko);
    check(o == 8'h3C && ko, "SKP passes unscrambled");
    void'(ref_scramble(st, 8'h3C, 1'b1));
    send(8'h00, 1'b0, o, ko);
    e = ref_scramble(st, 8'h00, 1'b0);
    check(o == e, $sformatf("key after SKP %h, expected %h", o, e));
    // COM re-seeds: next key is FF again
    send(8'hBC, 1'b1, o, ko);
    check(o == 8'hBC && ko, "COM passes unscrambled");
    send(8'h00, 1'b0, o, ko);
    check(o == 8'hFF, $sformatf("key after COM %h, expected FF", o));
    send(8'h00, 1'b0, o, ko);
    check(o == 8'h17, $sformatf("second key after COM %h, expected 17", o));

    // random stream against the model
    do_reset();
    st = 16'hFFFF;
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] b;
      b  = 8'($urandom);
      kk = ($urandom % 8) == 0;
      if (kk) begin
        case ($urandom % 4)
          0: b = 8'hBC;
          1: b = 8'h3C;
          2: b = 8'hF7;
          default: b = 8'h1C;
        endcase
      end
      send(b, kk, o, ko);
      e = ref_scramble(st, b, kk);
      check(o == e && ko == kk, $sformatf("stream %0d: %h/%0d -> %h, expected %h", i, b, kk, o, e));
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
