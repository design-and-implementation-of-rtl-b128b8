// tb_router_top: end-to-end test of the 3x3 router at its default sizes.
//
// Sends packets from the three sources and checks every output channel word
// against packets the testbench builds itself (its own bit-serial CRC-16).
// Phases: one packet per source to three different outputs in parallel; all
// three sources to one output (arbitration); a corrupted packet (CRC error,
// dropped); a packet to the non-existent port 3 (dropped); a held output that
// fills all four buffers of an input (Wait) and then one more packet (buffer
// error, dropped); and the display multiplexer, with fixed select lines and
// in its automatic packet-at-a-time mode. Counts how often each
// mechanism occurred and fails for any that never did.
module tb_router_top;
  import router_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic  [NPORTS-1:0]            pkt_start, err_inject, src_busy, in_wait, room_err;
  port_t [NPORTS-1:0]            pkt_dest;
  word_t [NPORTS-1:0][NDATA-1:0] pkt_data;
  logic  [NPORTS-1:0]            out_hold, out_valid, out_sop, out_eop, crc_err;
  word_t [NPORTS-1:0]            out_word;
  port_t                         disp_sel;
  logic                          disp_valid;
  word_t                         disp_word;

  router_top dut (.*);

  int checks = 0, failures = 0;
  int n_delivered = 0, n_crc_err = 0, n_room_err = 0, n_wait = 0, n_cut = 0,
      n_contend = 0, n_hold = 0, n_disp = 0, n_baddest = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [15:0] ref_crc(input word_t d [NDATA]);
    logic [15:0] c = 16'h0000;
    for (int i = 0; i < NDATA; i++)
      for (int b = 15; b >= 0; b--) begin
        logic fb = c[15] ^ d[i][b];
        c = {c[14:0], 1'b0};
        if (fb) c = c ^ 16'h1021;
      end
    return c;
  endfunction

  // expected packets per output: 11 words each (CRC + data)
  typedef word_t pkt_t [OUT_WORDS];
  pkt_t expq [NPORTS][$];
  pkt_t log [$];          // every packet delivered so far
  int   exp_err [NPORTS];

  task automatic send(input int s, input int d, input bit inj);
    word_t dat [NDATA];
    pkt_t  e;
    while (src_busy[s]) @(posedge clk);
    for (int i = 0; i < NDATA; i++) dat[i] = word_t'($urandom);
    @(negedge clk);
    pkt_start[s]  = 1'b1;
    pkt_dest[s]   = port_t'(d);
    err_inject[s] = inj;
    for (int i = 0; i < NDATA; i++) pkt_data[s][i] = dat[i];
    e[0] = ref_crc(dat);
    for (int i = 0; i < NDATA; i++) e[1+i] = dat[i];
    if (d < NPORTS) begin
      if (inj) exp_err[d]++;
      else expq[d].push_back(e);
    end
    @(negedge clk);
    pkt_start[s] = 1'b0;
    @(posedge clk);
  endtask

  // collect output packets and match them against the expected ones
  for (genvar o = 0; o < NPORTS; o++) begin : g_mon
    word_t got [OUT_WORDS];
    int    n = 0;
    always @(posedge clk) if (!rst) begin
      if (crc_err[o]) begin
        n_crc_err++;
        check(exp_err[o] > 0, $sformatf("unexpected crc_err on output %0d", o));
        exp_err[o]--;
      end
      if (out_valid[o]) begin
        check(out_sop[o] == (n == 0), "sop position");
        check(out_eop[o] == (n == OUT_WORDS - 1), "eop position");
        got[n] = out_word[o];
        n++;
        if (n == OUT_WORDS) begin
          automatic int hit = -1;
          n = 0;
          foreach (expq[o][k]) if (hit < 0 && expq[o][k] == got) hit = k;
          check(hit >= 0, $sformatf("output %0d packet not expected (crc %h)", o, got[0]));
          if (hit >= 0) begin
            log.push_back(got);
            expq[o].delete(hit);
            n_delivered++;
          end
        end
      end else if (n != 0) begin
        check(out_hold[o], $sformatf("gap inside packet on output %0d without hold", o));
        n_hold++;
      end
    end
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (|room_err) n_room_err++;
    if (|in_wait) n_wait++;
    if ($countones(dut.op_req[0]) > 1) n_contend++;
  end

  // a read of a packet whose input port is still receiving it is a
  // cut-through read; a preamble naming port 3 is a bad destination
  for (genvar i = 0; i < NPORTS; i++) begin : g_probe
    always @(posedge clk) if (!rst) begin
      if (|dut.ip_rd_en[i] && dut.g_in[i].u_in.in_pkt) n_cut++;
      if (dut.g_in[i].u_in.first && !dut.g_in[i].u_in.dest_ok) n_baddest++;
    end
  end

  // display multiplexer: follows the selected channel one clock later
  logic  pv;
  word_t pw;
  always @(posedge clk) begin
    if (!rst && disp_sel < NPORTS) begin
      check(disp_valid == pv, "display valid");
      if (pv) begin
        check(disp_word == pw, "display word");
        n_disp++;
      end
    end
    pv = (disp_sel < NPORTS) ? out_valid[disp_sel] : 1'b0;
    pw = (disp_sel < NPORTS) ? out_word[disp_sel] : '0;
  end

  // automatic display mode: the display shows whole delivered packets
  word_t dq [$];
  int    n_disp_pkts = 0;
  always @(posedge clk) if (!rst && disp_sel == 2'd3 && disp_valid) begin
    dq.push_back(disp_word);
    if (dq.size() == OUT_WORDS) begin
      automatic bit hit = 0;
      automatic pkt_t d;
      for (int k = 0; k < OUT_WORDS; k++) d[k] = dq[k];
      #1 foreach (log[k]) if (log[k] == d) hit = 1;
      check(hit, "display shows one whole delivered packet");
      n_disp_pkts++;
      dq.delete();
    end
  end

  task automatic drain(input int cycles);
    repeat (cycles) @(posedge clk);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    pkt_start = '0; err_inject = '0; pkt_dest = '0; pkt_data = '0;
    out_hold = '0; disp_sel = 2'd1;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);

    // 1. three packets in parallel to three different outputs, display in
    //    automatic (packet at a time) mode
    disp_sel = 2'd3;
    fork
      send(0, 1, 0);
      send(1, 2, 0);
      send(2, 0, 0);
    join
    drain(400);
    disp_sel = 2'd1;

    // 2. all three sources to output 0, twice
    repeat (2) fork
      send(0, 0, 0);
      send(1, 0, 0);
      send(2, 0, 0);
    join
    drain(500);

    // 3. corrupted packet and a packet to a non-existent port
    send(1, 2, 1);
    send(2, 3, 0);
    send(0, 2, 0);
    drain(400);

    // 4. hold output 1: one packet is read and held in its controller,
    //    four more fill the buffers of input 0 (Wait), the sixth is dropped
    out_hold[1] = 1'b1;
    for (int p = 0; p < 5; p++) send(0, 1, 0);
    drain(300);
    check(in_wait[0], "Wait with all buffers busy");
    begin
      // sixth packet sent regardless of Wait: must be dropped
      while (src_busy[0]) @(posedge clk);
      @(negedge clk);
      pkt_start[0] = 1'b1; pkt_dest[0] = 2'd1; err_inject[0] = 1'b0;
      @(negedge clk);
      pkt_start[0] = 1'b0;
    end
    drain(400);
    check(n_room_err == 1, "exactly one buffer error");
    // release output 1, with a random hold on about one clock in four
    repeat (300) begin
      @(negedge clk);
      out_hold[1] = ($urandom_range(3) == 0);
    end
    out_hold[1] = 1'b0;
    drain(600);

    for (int o = 0; o < NPORTS; o++) begin
      check(expq[o].size() == 0, $sformatf("output %0d: %0d packets missing", o, expq[o].size()));
      check(exp_err[o] == 0, $sformatf("output %0d: crc_err missing", o));
    end
    check(n_delivered == 15, $sformatf("delivered %0d of 15 packets", n_delivered));
    check(n_crc_err == 1, "one CRC error");
    check(n_baddest == 1, "one packet to a non-existent port");
    check(n_wait > 0, "Wait occurred");
    check(n_cut > 0, "cut-through read occurred");
    check(n_contend > 0, "contention at output 0 occurred");
    check(n_hold > 0, "output hold occurred");
    check(n_disp > 0, "display showed words");
    check(n_disp_pkts > 0, "display showed a packet in automatic mode");
    $display("mechanisms: delivered=%0d crc_err=%0d room_err=%0d wait_clocks=%0d cut_through_reads=%0d contention=%0d hold=%0d disp=%0d disp_auto_pkts=%0d bad_dest=%0d",
             n_delivered, n_crc_err, n_room_err, n_wait, n_cut, n_contend, n_hold, n_disp, n_disp_pkts, n_baddest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
