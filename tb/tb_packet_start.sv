// tb_packet_start: checks preamble detection.
//
// A word without the A5h tag outside a packet must be ignored; a tagged word
// starts a packet (first high, in_pkt set); a tagged word inside a packet is
// not a start; `last` with a valid word ends the packet.
module tb_packet_start;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_valid, last, first, in_pkt;
  word_t in_word;
  packet_start dut (.*);

  task automatic word(input word_t w, input bit l, input bit exp_first, input bit exp_pkt_after);
    @(negedge clk);
    in_valid = 1; in_word = w; last = l;
    #1 check(first == exp_first, $sformatf("first for %h", w));
    @(negedge clk);
    in_valid = 0; last = 0;
    check(in_pkt == exp_pkt_after, $sformatf("in_pkt after %h", w));
  endtask

  initial begin
    rst = 1; in_valid = 0; in_word = '0; last = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 20; r++) begin
      word(16'h1234, 0, 0, 0);
      word({8'hA5, 8'h02}, 0, 1, 1);
      // tag inside the packet is data
      word({8'hA5, 8'h00}, 0, 0, 1);
      // no valid: nothing changes
      @(negedge clk);
      in_word = {8'hA5, 8'h01};
      #1 check(!first, "no first without valid");
      word(word_t'($urandom), 1, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
