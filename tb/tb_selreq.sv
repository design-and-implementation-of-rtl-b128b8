// tb_selreq: checks the round-robin request arbiter.
//
// With all three inputs requesting, grants must rotate 0,1,2,0,...; with
// room low nothing is granted; random request patterns are compared with a
// round-robin model. ackreqs equals the one-hot grant and gnt's top bit says
// a grant was made.
module tb_selreq;
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

  logic [NPORTS-1:0] req, ackreqs;
  logic room;
  logic [NPORTS:0] gnt;
  selreq dut (.*);

  int last_m = NPORTS - 1;
  initial begin
    rst = 1; req = '0; room = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      automatic int exp_p = -1;
      @(negedge clk);
      req  = (t < 9) ? 3'b111 : NPORTS'($urandom);
      room = (t < 9) ? 1'b1 : ($urandom_range(4) != 0);
      for (int k = 1; k <= NPORTS; k++) begin
        automatic int p = (last_m + k) % NPORTS;
        if (exp_p < 0 && req[p]) exp_p = p;
      end
      #1;
      if (exp_p >= 0 && room) begin
        check(ackreqs == NPORTS'(1) << exp_p && gnt == {1'b1, ackreqs}, $sformatf("grant %b expected port %0d", ackreqs, exp_p));
        last_m = exp_p;
      end else
        check(ackreqs == '0 && gnt == '0, "no grant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
