// tb_crc_gen: checks the bit-serial CRC-16 generator.
//
// Instance A has the default 32-bit message: random messages are compared
// with a CRC computed here bit by bit, and the result must appear exactly
// DATA_BITS+1 clocks after start. Instance B (72 bits) gets the ASCII string
// "123456789", whose CRC-16 with polynomial 0x1021 and initial value 0 is the
// published check value 0x31C3.
module tb_crc_gen;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic        start_a, done_a, busy_a, start_b, done_b, busy_b;
  logic [31:0] data_a;
  logic [71:0] data_b;
  logic [15:0] crc_a, crc_b;

  crc_gen dut_a (.clk, .rst, .start(start_a), .data_in(data_a), .crcout(crc_a), .done(done_a), .busy(busy_a));
  crc_gen #(.DATA_BITS(72)) dut_b (.clk, .rst, .start(start_b), .data_in(data_b), .crcout(crc_b), .done(done_b), .busy(busy_b));

  function automatic logic [15:0] ref_crc32(input logic [31:0] d);
    logic [15:0] c = '0;
    for (int b = 31; b >= 0; b--) begin
      logic fb = c[15] ^ d[b];
      c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
    end
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst = 1; start_a = 0; start_b = 0; data_a = '0; data_b = "123456789";
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      data_a  = (t == 0) ? 32'h0 : (t == 1) ? 32'h8000_0000 : $urandom;
      start_a = 1;
      @(negedge clk);
      start_a = 0;
      n = 1;
      while (!done_a) begin @(negedge clk); n++; end
      check(n - 1 == 33, $sformatf("done %0d clocks after the start edge, expected 33", n - 1));
      check(crc_a == ref_crc32(data_a), $sformatf("crc of %h: %h vs %h", data_a, crc_a, ref_crc32(data_a)));
      check(!busy_a, "busy cleared");
    end
    @(negedge clk);
    start_b = 1;
    @(negedge clk);
    start_b = 0;
    wait (done_b);
    @(negedge clk);
    check(crc_b == 16'h31C3, $sformatf("check value %h", crc_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
