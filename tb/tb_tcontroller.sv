// tb_tcontroller: checks the transmit controller against a model of the
// three input ports' buffers.
//
// The testbench keeps packets in modelled buffers whose fill count grows by
// two words every few clocks (the packet still arriving) and answers reads
// one clock late like the real buffer. Request records are offered from a
// queue. For each record the controller must send the 11 words after the
// header, in order, with sop/eop, pausing while hold is high, or pulse
// crc_err and send nothing when the packet was corrupted. It must release
// exactly the buffer it read, once, and must never read a word not yet stored.
module tb_tcontroller;
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic more, next, hold, out_valid, out_sop, out_eop, crc_err;
  req_rec_t rec;
  logic   [NPORTS-1:0] rd_en;
  bufno_t rd_buf;
  widx_t  rd_word;
  word_t  [NPORTS-1:0] din;
  widx_t  [NPORTS-1:0] fill;
  logic   [NPORTS-1:0][NBUF-1:0] rel;
  word_t  out_word;
  tcontroller dut (.*);

  word_t bufs [NPORTS][NBUF][PKT_WORDS];
  int    fillm [NPORTS][NBUF];
  req_rec_t recq [$];
  word_t    expq [$];     // expected output words
  req_rec_t relq [$];     // expected releases, in order
  int       n_err_exp = 0, n_err = 0;

  function automatic logic [15:0] ref_crc(input word_t d [PKT_WORDS]);
    logic [15:0] c = '0;
    for (int i = 2; i < PKT_WORDS; i++)
      for (int b = 15; b >= 0; b--) begin
        logic fb = c[15] ^ d[i][b];
        c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
      end
    return c;
  endfunction

  // the record queue is presented between clock edges
  always @(negedge clk) begin
    more <= recq.size() > 0;
    rec  <= (recq.size() > 0) ? recq[0] : '0;
  end
  always @* for (int i = 0; i < NPORTS; i++) fill[i] = widx_t'(fillm[i][rd_buf]);

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NPORTS; i++) begin
      if (rd_en[i]) begin
        check(int'(rd_word) < fillm[i][rd_buf], "read of a stored word only");
        din[i] <= bufs[i][rd_buf][rd_word];
      end
      if (rel[i] != '0) begin
        req_rec_t r;
        check(relq.size() > 0, "unexpected release");
        if (relq.size() > 0) begin
          r = relq.pop_front();
          check(int'(r.port) == i && rel[i] == NBUF'(1) << r.ploc, "release of the right buffer");
        end
      end
    end
    if (next) recq.pop_front();
    if (crc_err) n_err++;
    if (out_valid) begin
      check(!hold, "no word while hold");
      check(expq.size() > 0, "unexpected output word");
      if (expq.size() > 0) begin
        check(out_sop == (expq.size() % OUT_WORDS == 0), "sop");
        check(out_eop == (expq.size() % OUT_WORDS == 1), "eop");
        check(out_word == expq.pop_front(), "output word");
      end
    end
  end

  // a packet arriving into buffer (i, b), two words every `gap` clocks
  task automatic arrive(input int i, input int b, input bit bad, input int gap);
    word_t w [PKT_WORDS];
    fillm[i][b] = 0;
    w[0] = {8'hA5, 6'b0, 2'd0};
    for (int k = 2; k < PKT_WORDS; k++) w[k] = word_t'($urandom);
    w[1] = ref_crc(w);
    if (bad) w[5] ^= 16'h0100;
    for (int k = 0; k < PKT_WORDS; k++) bufs[i][b][k] = w[k];
    if (bad) n_err_exp++;
    else for (int k = 1; k < PKT_WORDS; k++) expq.push_back(w[k]);
    relq.push_back('{port: port_t'(i), ploc: bufno_t'(b)});
    recq.push_back('{port: port_t'(i), ploc: bufno_t'(b)});
    for (int p = 0; p < PKT_WORDS / 2; p++) begin
      repeat (gap) @(negedge clk);
      fillm[i][b] += 2;
    end
  endtask

  initial begin
    rst = 1; hold = 0; din = '0; more = 0; rec = '0;
    for (int i = 0; i < NPORTS; i++) for (int b = 0; b < NBUF; b++) fillm[i][b] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // packets one after the other, some corrupted, some arriving slowly
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      hold = (t >= 15) && ($urandom_range(3) == 0);
      arrive($urandom_range(2), $urandom_range(3), (t % 7 == 3), (t % 3 == 0) ? 6 : 0);
      while (recq.size() > 0 || expq.size() > 0 || relq.size() > 0) begin
        @(negedge clk);
        if (t >= 15) hold = ($urandom_range(3) == 0);
      end
      hold = 0;
      repeat (2) @(negedge clk);
    end
    // output rate: with hold low, the 11 words leave on consecutive clocks
    begin
      int first_t = -1, last_t = -1, cyc = 0;
      arrive(1, 2, 0, 0);
      while (expq.size() > 0 && cyc < 200) begin
        @(negedge clk);
        cyc++;
        if (out_valid && first_t < 0) first_t = cyc;
        if (out_valid) last_t = cyc;
      end
      check(last_t - first_t == OUT_WORDS - 1, $sformatf("11 words in %0d clocks", last_t - first_t + 1));
    end
    check(n_err == n_err_exp, $sformatf("crc errors %0d of %0d", n_err, n_err_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
