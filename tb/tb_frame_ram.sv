// tb_frame_ram: checks the frame RAM.
//
// Writes random data to every address, reads it back (data appears one clock
// after rd), checks that dataout holds while rd is low, and that nothing is
// written and dataout is cleared while reset is high.
module tb_frame_ram;
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

  logic wr, rd;
  logic [3:0] addr, addr1;
  logic [15:0] datain, dataout;
  logic [15:0] model [16];
  frame_ram dut (.clk, .reset(rst), .wr, .addr, .datain, .rd, .addr1, .dataout);

  initial begin
    rst = 1; wr = 0; rd = 0; addr = '0; addr1 = '0; datain = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      wr = 1; addr = 4'(a); datain = 16'($urandom); model[a] = datain;
    end
    @(negedge clk);
    wr = 0;
    for (int t = 0; t < 64; t++) begin
      automatic int a = $urandom_range(15);
      @(negedge clk);
      rd = 1; addr1 = 4'(a);
      @(negedge clk);
      rd = 0;
      check(dataout == model[a], $sformatf("read %0d", a));
      addr1 = 4'(a + 1);
      @(negedge clk);
      check(dataout == model[a], "dataout holds without rd");
    end
    // reset blocks writes and clears dataout
    @(negedge clk);
    rst = 1; wr = 1; addr = 4'd5; datain = ~model[5];
    @(negedge clk);
    check(dataout == '0, "dataout cleared in reset");
    rst = 0; wr = 0; rd = 1; addr1 = 4'd5;
    @(negedge clk);
    rd = 0;
    check(dataout == model[5], "no write during reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
