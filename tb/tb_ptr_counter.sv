// tb_ptr_counter: checks the address counter at the default depth 16 and at
// depth 5 against a modulo model with random enables.
module tb_ptr_counter;
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

  logic en;
  logic [3:0] c16;
  logic [2:0] c5;
  ptr_counter dut (.clk, .rst, .en, .count(c16));
  ptr_counter #(.DEPTH(5)) dut5 (.clk, .rst, .en, .count(c5));
  int m = 0;
  initial begin
    rst = 1; en = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      check(c16 == 4'(m % 16) && c5 == 3'(m % 5), $sformatf("count %0d: %0d %0d", m, c16, c5));
      en = $urandom_range(1);
      m += int'(en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
