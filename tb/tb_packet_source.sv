// tb_packet_source: checks packet generation.
//
// Starts packets with random data and destinations, records the word present
// at every toggle of tgl, and compares the 12 words with the expected
// preamble, a CRC-16 computed here, and the data. Toggles must be exactly
// WORD_GAP (4) clocks apart. With err_inject the first data word arrives with
// bit 0 flipped while the CRC word still covers the original data.
module tb_packet_source;
  import router_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic start, err_inject, busy, tgl;
  port_t dest;
  word_t [NDATA-1:0] data;
  word_t word;

  packet_source dut (.*);

  function automatic logic [15:0] ref_crc(input word_t [NDATA-1:0] d);
    logic [15:0] c = '0;
    for (int i = 0; i < NDATA; i++)
      for (int b = 15; b >= 0; b--) begin
        logic fb = c[15] ^ d[i][b];
        c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
      end
    return c;
  endfunction

  word_t got [$];
  int    last_t, gaps_bad;
  logic  tgl_q;
  always @(posedge clk) begin
    tgl_q <= tgl;
    if (!rst && tgl != tgl_q) begin
      #1 got.push_back(word);
    end
  end
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && tgl != tgl_q) begin
      if (got.size() > 0 && cyc - last_t != 4) gaps_bad++;
      last_t = cyc;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; err_inject = 0; dest = '0; data = '0; gaps_bad = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 6; t++) begin
      word_t [NDATA-1:0] d;
      bit inj;
      port_t ds;
      for (int i = 0; i < NDATA; i++) d[i] = word_t'($urandom);
      inj = (t == 3);
      ds  = port_t'(t % 3);
      got.delete();
      gaps_bad = 0;
      @(negedge clk);
      start = 1; data = d; dest = ds; err_inject = inj;
      @(negedge clk);
      start = 0; data = '0;
      check(busy, "busy after start");
      while (busy) @(negedge clk);
      repeat (2) @(negedge clk);
      check(got.size() == PKT_WORDS, $sformatf("%0d words sent", got.size()));
      if (got.size() == PKT_WORDS) begin
        check(got[0] == {8'hA5, 6'b0, ds}, "preamble");
        check(got[1] == ref_crc(d), $sformatf("crc %h vs %h", got[1], ref_crc(d)));
        for (int i = 0; i < NDATA; i++)
          check(got[2+i] == (i == 0 && inj ? d[i] ^ 16'h1 : d[i]), $sformatf("data word %0d", i));
      end
      check(gaps_bad == 0, "word spacing of 4 clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
