// tb_pac_cnt: checks the packet word counter.
//
// Feeds packets of 12 words with random gaps between words. For word k the
// registered one-hot wsel must have bit k set one clock later together with
// write; last must be high exactly on the twelfth word. Words outside a packet
// produce no write.
module tb_pac_cnt;
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

  logic in_valid, first, in_pkt, write, last;
  logic [PKT_WORDS-1:0] wsel;
  pac_cnt dut (.*);

  initial begin
    rst = 1; in_valid = 0; first = 0; in_pkt = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 10; p++) begin
      for (int k = 0; k < PKT_WORDS; k++) begin
        @(negedge clk);
        in_valid = 1; first = (k == 0); in_pkt = (k != 0);
        #1 check(last == (k == PKT_WORDS - 1), $sformatf("last at word %0d", k));
        @(negedge clk);
        in_valid = 0; first = 0;
        check(write && wsel == (PKT_WORDS'(1) << k), $sformatf("wsel at word %0d: %b", k, wsel));
        repeat ($urandom_range(2)) begin
          @(negedge clk);
          check(!write, "no write without word");
        end
      end
      in_pkt = 0;
      @(negedge clk);
      in_valid = 1;   // stray word between packets
      @(negedge clk);
      in_valid = 0;
      check(!write, "no write outside a packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
