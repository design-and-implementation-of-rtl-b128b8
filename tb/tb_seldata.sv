// tb_seldata: checks request record formation for every grant value and
// random buffer numbers: record = {granted port, its PLOC}, written only for
// a valid grant with exactly one bit set.
module tb_seldata;
  import router_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [NPORTS:0] gnt;
  bufno_t [NPORTS-1:0] ploc;
  req_rec_t rec;
  logic we;
  seldata dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++)
      for (int g = 0; g < 16; g++) begin
        automatic int n = 0, p = 0;
        gnt = 4'(g);
        for (int i = 0; i < NPORTS; i++) ploc[i] = bufno_t'($urandom);
        for (int i = 0; i < NPORTS; i++) if (g[i]) begin n++; p = i; end
        #1;
        check(we == (g[3] && n == 1), $sformatf("we for gnt %b", gnt));
        if (g[3] && n == 1) check(rec.port == port_t'(p) && rec.ploc == ploc[p], $sformatf("record for gnt %b", gnt));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
