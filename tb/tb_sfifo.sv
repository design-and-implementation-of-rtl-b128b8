// tb_sfifo: checks the record memory: random writes at random addresses,
// combinational reads compared with a model.
module tb_sfifo;
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

  logic we;
  logic [3:0] adwrite, adread, data, data_out;
  logic [3:0] model [16];
  bit         known [16];
  sfifo dut (.*);
  initial begin
    we = 0; adwrite = '0; adread = '0; data = '0; rst = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      we = $urandom_range(1); adwrite = 4'($urandom); data = 4'($urandom);
      adread = 4'($urandom);
      #1 if (known[adread]) check(data_out == model[adread], $sformatf("read %0d", adread));
      @(posedge clk);
      if (we) begin model[adwrite] = data; known[adwrite] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
