// tb_out_mux: checks the display multiplexer. With fixed select values and
// random channel data, disp_valid/disp_word must follow the selected channel
// one clock later. In automatic mode (select 3) three channels carry random
// 11-word packets with random gaps, and the display must show whole packets,
// each from one channel, never interleaved: every displayed packet is
// compared with the packets the channels sent.
module tb_out_mux;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    auto_mode();
    $display("shown packets in automatic mode: %0d", n_shown);
    check(n_shown >= 10, "automatic mode showed packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  port_t sel;
  logic  [NPORTS-1:0] valid, sop, eop;
  word_t [NPORTS-1:0] word;
  logic  disp_valid;
  word_t disp_word;
  out_mux dut (.*);

  // automatic mode: three channels send 11-word packets with random gaps
  word_t sent [$];          // all packets sent, concatenated per packet
  int    n_sent = 0, n_shown = 0;
  word_t shown [$];
  always @(posedge clk) if (!rst && sel == 2'd3 && disp_valid) begin
    shown.push_back(disp_word);
    if (shown.size() == 11) begin
      automatic bit hit = 0;
      for (int p = 0; p < n_sent; p++) begin
        automatic bit same = 1;
        for (int k = 0; k < 11; k++) if (sent[p*11+k] != shown[k]) same = 0;
        if (same) hit = 1;
      end
      check(hit, "displayed packet is one whole sent packet");
      n_shown++;
      shown.delete();
    end
  end

  task automatic channel(input int c, input int npk);
    for (int p = 0; p < npk; p++) begin
      automatic word_t pk [11];
      for (int k = 0; k < 11; k++) begin
        @(negedge clk);
        while ($urandom_range(2) == 0) begin
          valid[c] = 0; sop[c] = 0; eop[c] = 0;
          @(negedge clk);
        end
        valid[c] = 1; sop[c] = (k == 0); eop[c] = (k == 10);
        word[c] = word_t'({c[3:0], 12'($urandom)});
        pk[k] = word[c];
        if (k == 10) begin
          n_sent++;
          for (int j = 0; j < 11; j++) sent.push_back(pk[j]);
        end
      end
      @(negedge clk);
      valid[c] = 0; sop[c] = 0; eop[c] = 0;
      repeat ($urandom_range(5)) @(negedge clk);
    end
  endtask

  task automatic auto_mode();
    @(negedge clk);
    valid = '0; sop = '0; eop = '0; sel = 2'd3;
    fork
      channel(0, 15);
      channel(1, 15);
      channel(2, 15);
    join
    repeat (5) @(negedge clk);
  endtask
  initial begin
    rst = 1; sel = '0; valid = '0; word = '0; sop = '0; eop = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      port_t s;
      logic v;
      word_t w;
      @(negedge clk);
      sel = port_t'($urandom_range(2)); valid = NPORTS'($urandom); sop = NPORTS'($urandom); eop = NPORTS'($urandom);
      for (int i = 0; i < NPORTS; i++) word[i] = word_t'($urandom);
      s = sel;
      v = valid[s];
      w = word[s];
      @(negedge clk);
      check(disp_valid == v, "disp_valid");
      if (v) check(disp_word == w, "disp_word");
    end
    auto_mode();
    $display("shown packets in automatic mode: %0d", n_shown);
    check(n_shown >= 10, "automatic mode showed packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
