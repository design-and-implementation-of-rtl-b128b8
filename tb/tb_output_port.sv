// tb_output_port: checks an output port with modelled input ports.
//
// Each of the three modelled inputs repeatedly stores a packet in one of its
// buffers and raises its request with the buffer number until acknowledged.
// Requests from several inputs collide, so the arbiter, the request record
// FIFO and its counters are exercised. Packets must leave in the order their
// requests were acknowledged, each as the 11 words after the header; a
// corrupted one must give crc_err instead; every buffer must be released once.
module tb_output_port;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   [NPORTS-1:0] req, ackreqs, rd_en;
  bufno_t [NPORTS-1:0] ploc;
  bufno_t rd_buf;
  widx_t  rd_word;
  word_t  [NPORTS-1:0] din;
  widx_t  [NPORTS-1:0] fill;
  logic   [NPORTS-1:0][NBUF-1:0] rel;
  logic   hold, out_valid, out_sop, out_eop, crc_err;
  word_t  out_word;
  output_port dut (.*);

  word_t bufs [NPORTS][NBUF][PKT_WORDS];
  bit    bad  [NPORTS][NBUF];
  int    fillm [NPORTS][NBUF];
  bit    busy [NPORTS][NBUF];
  word_t expq [$];
  int    n_err_exp = 0, n_err = 0, n_pkts = 0, n_multi = 0;

  function automatic logic [15:0] ref_crc(input word_t d [PKT_WORDS]);
    logic [15:0] c = '0;
    for (int i = 2; i < PKT_WORDS; i++)
      for (int b = 15; b >= 0; b--) begin
        logic fb = c[15] ^ d[i][b];
        c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
      end
    return c;
  endfunction

  always @* for (int i = 0; i < NPORTS; i++) fill[i] = widx_t'(fillm[i][rd_buf]);

  always @(posedge clk) if (!rst) begin
    if ($countones(req) > 1) n_multi++;
    for (int i = 0; i < NPORTS; i++) begin
      if (rd_en[i]) din[i] <= bufs[i][rd_buf][rd_word];
      for (int b = 0; b < NBUF; b++)
        if (rel[i][b]) begin
          check(busy[i][b], "release of a busy buffer");
          busy[i][b] = 0;
        end
      // acknowledged: the packet's words join the expected stream
      if (ackreqs[i]) begin
        check(req[i], "ack only for a request");
        if (bad[i][ploc[i]]) n_err_exp++;
        else for (int k = 1; k < PKT_WORDS; k++) expq.push_back(bufs[i][ploc[i]][k]);
      end
    end
    if (crc_err) n_err++;
    if (out_valid) begin
      check(expq.size() > 0, "unexpected output word");
      if (expq.size() > 0) begin
        check(out_sop == (expq.size() % OUT_WORDS == 0), "sop");
        check(out_eop == (expq.size() % OUT_WORDS == 1), "eop");
        check(out_word == expq.pop_front(), "output word (order of acknowledgement)");
      end
    end
  end

  task automatic input_side(input int i, input int npk);
    for (int n = 0; n < npk; n++) begin
      automatic int b = -1;
      automatic word_t w [PKT_WORDS];
      while (b < 0) begin
        for (int k = NBUF - 1; k >= 0; k--) if (!busy[i][k]) b = k;
        if (b < 0) @(negedge clk);
      end
      busy[i][b] = 1;
      fillm[i][b] = 0;
      w[0] = {8'hA5, 6'b0, 2'd0};
      for (int k = 2; k < PKT_WORDS; k++) w[k] = word_t'($urandom);
      w[1] = ref_crc(w);
      bad[i][b] = ($urandom_range(9) == 0);
      if (bad[i][b]) w[7] ^= 16'h8000;
      for (int k = 0; k < PKT_WORDS; k++) bufs[i][b][k] = w[k];
      @(negedge clk);
      req[i] = 1; ploc[i] = bufno_t'(b);
      fork
        begin
          for (int p = 0; p < PKT_WORDS / 2; p++) begin
            repeat ($urandom_range(3)) @(negedge clk);
            fillm[i][b] += 2;
          end
        end
        begin
          @(posedge clk);
          while (!ackreqs[i]) @(posedge clk);
          @(negedge clk);
          req[i] = 0;
        end
      join
      n_pkts++;
      repeat ($urandom_range(4)) @(negedge clk);
    end
  endtask

  initial begin
    rst = 1; req = '0; ploc = '0; hold = 0; din = '0;
    for (int i = 0; i < NPORTS; i++) for (int b = 0; b < NBUF; b++) begin
      fillm[i][b] = 0; busy[i][b] = 0; bad[i][b] = 0;
    end
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      fork
        input_side(0, 25);
        input_side(1, 25);
        input_side(2, 25);
      join
      forever begin
        @(negedge clk);
        hold = ($urandom_range(5) == 0);
      end
    join_any
    disable fork;
    hold = 0;
    repeat (2000) begin
      @(negedge clk);
      if (expq.size() == 0) break;
    end
    repeat (40) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d words not delivered", expq.size()));
    check(n_err == n_err_exp, $sformatf("crc errors %0d of %0d", n_err, n_err_exp));
    check(n_multi > 0, "colliding requests occurred");
    check(n_pkts == 75, $sformatf("%0d of 75 packets offered", n_pkts));
    for (int i = 0; i < NPORTS; i++) for (int b = 0; b < NBUF; b++) check(!busy[i][b], "all buffers released");
    $display("packets %0d, crc errors %0d, clocks with colliding requests %0d", n_pkts, n_err, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
