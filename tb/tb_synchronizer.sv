// tb_synchronizer: checks the toggle synchronizer.
//
// Sends random words, each announced by a toggle and held for 4 to 7 clocks.
// Every word must come out exactly once, with valid high for one clock, three
// clocks after its toggle; no valid may appear without a toggle.
module tb_synchronizer;
  import router_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic tgl, valid;
  word_t word_in, word_out;
  synchronizer dut (.*);

  word_t expq [$];
  int    tq [$];
  int    cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && valid) begin
      check(expq.size() > 0, "valid without a word");
      if (expq.size() > 0) begin
        check(word_out == expq.pop_front(), "word value");
        check(cyc - tq.pop_front() == 3, "latency 3 clocks");
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; tgl = 0; word_in = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      word_in = word_t'($urandom);
      tgl = ~tgl;
      expq.push_back(word_in);
      tq.push_back(cyc + 1);
      repeat (3 + $urandom_range(3)) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    check(expq.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
