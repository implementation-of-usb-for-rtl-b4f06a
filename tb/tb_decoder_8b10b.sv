// tb_decoder_8b10b: checks the 10b/8b decoder.
// For each running disparity the set of valid symbols is built from the
// reference encoder (all D and K codes). Then every one of the 1024 10-bit
// values is decoded at that disparity:
//  - a valid symbol of this disparity decodes to its byte and K flag with no
//    error;
//  - a valid symbol of the other disparity only raises disp_err;
//  - any other value raises code_err or disp_err.
// The decoder's disparity is set before each test symbol with a K28.5 whose
// form leaves the wanted disparity. A random reference-encoded stream must
// decode with no errors.
module tb_decoder_8b10b;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [9:0] cin = '0;
  logic [7:0] dout;
  logic kout, cerr, derr;
  int checks = 0, failures = 0;
  int n_cerr = 0, n_derr = 0;

  // valid[rd][code] = {1, k, byte} when that code is sent at that RD
  logic [9:0] valid_tab [2][1024];

  decoder_8b10b dut (.clk(clk), .rst_n(rst_n), .en(en), .code_in(cin), .data_out(dout),
                     .k_out(kout), .code_err(cerr), .disp_err(derr));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [9:0] c);
    @(negedge clk);
    cin = c; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
  endtask

  // K28.5 RD+ form leaves RD-, RD- form leaves RD+
  task automatic set_rd(input logic want);
    send(want ? 10'b0011111010 : 10'b1100000101);
  endtask

  initial begin
    enc_t e;
    logic rd;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 1024; c++) valid_tab[r][c] = '0;
    for (int r = 0; r < 2; r++) begin
      for (int b = 0; b < 256; b++) begin
        e = ref_encode(8'(b), 1'b0, r[0]);
        valid_tab[r][e.code] = {1'b1, 1'b0, 8'(b)};
      end
      for (int i = 0; i < 12; i++) begin
        e = ref_encode(KBYTE[i], 1'b1, r[0]);
        valid_tab[r][e.code] = {1'b1, 1'b1, KBYTE[i]};
      end
    end

    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 1024; c++) begin
        set_rd(r[0]);
        send(10'(c));
        if (valid_tab[r][c][9]) begin
          check(!cerr && !derr && dout == valid_tab[r][c][7:0] && kout == valid_tab[r][c][8],
                $sformatf("RD%s %b: %h k%0d c%0d d%0d", r != 0 ? "+" : "-", 10'(c), dout, kout, cerr, derr));
        end else if (valid_tab[1-r][c][9]) begin
          check(!cerr && derr, $sformatf("RD%s %b other-RD code: c%0d d%0d", r != 0 ? "+" : "-", 10'(c), cerr, derr));
        end else begin
          check(cerr || derr, $sformatf("RD%s %b invalid, not flagged", r != 0 ? "+" : "-", 10'(c)));
        end
        if (cerr) n_cerr++;
        if (derr) n_derr++;
      end
    end
    check(n_cerr > 0 && n_derr > 0, "both error kinds seen");

    // reference-encoded stream from RD-
    set_rd(1'b0);
    rd = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] b;
      logic k;
      k = ($urandom % 8) == 0;
      b = k ? KBYTE[$urandom % 12] : 8'($urandom);
      e = ref_encode(b, k, rd);
      rd = e.rd_out;
      send(e.code);
      check(dout == b && kout == k && !cerr && !derr, $sformatf("stream %0d: %h", i, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
