// tb_reqcount: checks the record counter against a model under random
// increments and decrements (never past empty or full): more = count > 0,
// room = count < 16.
module tb_reqcount;
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

  logic inc, dec, more, room;
  reqcount dut (.*);
  int cnt = 0;
  initial begin
    rst = 1; inc = 0; dec = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      check(more == (cnt > 0) && room == (cnt < 16), $sformatf("count %0d more %b room %b", cnt, more, room));
      // bias towards filling in the first half, draining in the second
      inc = (t < 500 ? $urandom_range(3) != 0 : $urandom_range(3) == 0) && (cnt < 16);
      dec = ($urandom_range(1) == 0) && (cnt > 0);
      cnt = cnt + int'(inc) - int'(dec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
