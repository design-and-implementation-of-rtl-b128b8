// tb_availb: checks buffer allocation.
//
// Four packet starts must get buffers 0,1,2,3 (lowest free first) with
// matching one-hot selram and start; then Wait is high and a fifth start
// raises roomerr and allocates nothing. Freeing buffer 2 clears Wait and the
// next start gets buffer 2. A start with an invalid destination allocates
// nothing. Afterwards random starts and frees are checked against a model.
module tb_availb;
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
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic first, dest_ok, alloc, accepted, wait_o, roomerr;
  logic [NBUF-1:0] makeavail, selram, start;
  bufno_t ploc;
  availb dut (.*);

  logic [NBUF-1:0] busy_m;

  task automatic pkt(input bit ok);
    int exp_b = -1;
    for (int b = NBUF - 1; b >= 0; b--) if (!busy_m[b]) exp_b = b;
    @(negedge clk);
    first = 1; dest_ok = ok;
    #1 check(alloc == (ok && exp_b >= 0), "alloc");
    if (alloc) check(ploc == bufno_t'(exp_b), $sformatf("ploc %0d expected %0d", ploc, exp_b));
    @(negedge clk);
    first = 0;
    check(roomerr == (ok && exp_b < 0), "roomerr");
    check(accepted == (ok && exp_b >= 0), "accepted");
    if (ok && exp_b >= 0) begin
      check(selram == NBUF'(1) << exp_b && start == NBUF'(1) << exp_b, "selram/start");
      busy_m[exp_b] = 1;
    end else
      check(start == '0, "no start");
    @(negedge clk);
    check(start == '0, "start is one clock");
    check(wait_o == &busy_m, "wait");
  endtask

  task automatic free(input int b);
    @(negedge clk);
    makeavail = NBUF'(1) << b;
    @(negedge clk);
    makeavail = '0;
    busy_m[b] = 0;
    check(wait_o == &busy_m, "wait after free");
  endtask

  initial begin
    rst = 1; first = 0; dest_ok = 0; makeavail = '0; busy_m = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4; i++) pkt(1);
    check(wait_o, "wait with four busy");
    pkt(1);
    free(2);
    pkt(0);
    pkt(1);
    for (int t = 0; t < 200; t++) begin
      if ($urandom_range(1) == 0) pkt($urandom_range(5) != 0);
      else begin
        automatic int b = $urandom_range(NBUF - 1);
        if (busy_m[b]) free(b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
