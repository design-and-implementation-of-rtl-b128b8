// tb_rdata: checks the even/odd word pairing.
//
// Sends 12-word packets; after each odd word, pair_valid must be high for one
// clock with d0 = the preceding even word and d1 = the odd word.
module tb_rdata;
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

  logic in_valid, first, in_pkt, pair_valid;
  word_t in_word, d0, d1;
  rdata dut (.*);

  initial begin
    word_t ev;
    rst = 1; in_valid = 0; first = 0; in_pkt = 0; in_word = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 10; p++) begin
      for (int k = 0; k < PKT_WORDS; k++) begin
        @(negedge clk);
        in_valid = 1; first = (k == 0); in_pkt = (k != 0); in_word = word_t'($urandom);
        if (k % 2 == 0) ev = in_word;
        @(negedge clk);
        in_valid = 0; first = 0;
        check(pair_valid == (k % 2 == 1), $sformatf("pair_valid at word %0d", k));
        if (k % 2 == 1) check(d0 == ev && d1 == in_word, "pair contents");
        repeat ($urandom_range(2)) @(negedge clk);
      end
      in_pkt = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
