// tb_crc_check: checks the word-wide CRC check unit. Ten random data words
// are fed one per clock; ok must be high when rx_crc is the CRC computed
// here bit by bit and low when one bit of it is wrong.
module tb_crc_check;
  import router_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clr, en, ok;
  word_t word;
  logic [15:0] rx_crc;
  crc_check dut (.*);
  initial begin
    rst = 1; clr = 0; en = 0; word = '0; rx_crc = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 50; t++) begin
      automatic logic [15:0] c = '0;
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int i = 0; i < NDATA; i++) begin
        word = word_t'($urandom);
        for (int b = 15; b >= 0; b--) begin
          automatic logic fb = c[15] ^ word[b];
          c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
        end
        en = 1;
        @(negedge clk);
      end
      en = 0;
      rx_crc = c;
      #1 check(ok, $sformatf("crc %h accepted", c));
      rx_crc = c ^ (16'h1 << $urandom_range(15));
      #1 check(!ok, "wrong crc rejected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
