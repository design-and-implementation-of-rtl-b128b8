// tb_selport: checks the routing decision.
//
// dest_ok must be high for destinations 0..2 and low for 3. On alloc the
// one-hot request for the destination and rinfo = ploc must appear one clock
// later and stay until the matching ackreq.
module tb_selport;
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

  logic alloc, dest_ok;
  bufno_t ploc, rinfo;
  logic [NPORTS-1:0] request, ackreq;
  word_t in_word;
  selport dut (.*);

  initial begin
    rst = 1; alloc = 0; ploc = '0; ackreq = '0; in_word = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      automatic port_t d = port_t'($urandom_range(3));
      automatic bufno_t b = bufno_t'($urandom);
      @(negedge clk);
      in_word = {8'hA5, 6'b0, d};
      #1 check(dest_ok == (d != 3), $sformatf("dest_ok for %0d", d));
      if (d != 3) begin
        alloc = 1; ploc = b;
        @(negedge clk);
        alloc = 0; ploc = '0;
        check(request == (3'b1 << d) && rinfo == b, $sformatf("request %b rinfo %0d", request, rinfo));
        repeat ($urandom_range(3)) begin
          @(negedge clk);
          check(request == (3'b1 << d), "request held");
        end
        ackreq = 3'b111 & ~(3'b1 << d);   // other outputs' acks do not clear it
        @(negedge clk);
        check(request == (3'b1 << d), "request kept on foreign ack");
        ackreq = 3'b1 << d;
        @(negedge clk);
        ackreq = '0;
        check(request == '0, "request cleared by ack");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
