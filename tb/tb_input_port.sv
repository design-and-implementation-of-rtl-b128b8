// tb_input_port: checks an input port on its own.
//
// Sends 12-word packets as word strobes to random destinations. For each one
// the port must raise the one-hot request to the destination with the buffer
// number in rinfo; the testbench acknowledges it, reads the buffer through
// that output's multiplexer word by word as the fill count allows, compares
// every word, and releases the buffer. Five packets without releases must
// fill the four buffers (Wait) and drop the fifth (roomerr).
module tb_input_port;
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_valid, wait_o, roomerr;
  word_t in_word;
  logic   [NPORTS-1:0] request, ackreq, rd_en;
  bufno_t rinfo;
  bufno_t [NPORTS-1:0] rd_buf;
  widx_t  [NPORTS-1:0] rd_word, fill;
  word_t  [NPORTS-1:0] dout;
  logic   [NPORTS-1:0][NBUF-1:0] rel;
  input_port dut (.*);

  word_t pkt [PKT_WORDS];
  int n_room = 0;
  always @(posedge clk) if (!rst && roomerr) n_room++;

  task automatic send_pkt(input port_t d, input int gap);
    pkt[0] = {8'hA5, 6'b0, d};
    for (int k = 1; k < PKT_WORDS; k++) pkt[k] = word_t'($urandom);
    for (int k = 0; k < PKT_WORDS; k++) begin
      @(negedge clk);
      in_valid = 1; in_word = pkt[k];
      @(negedge clk);
      in_valid = 0;
      repeat (gap) @(negedge clk);
    end
  endtask

  // reads the packet routed to output o out of buffer b while it arrives
  task automatic read_pkt(input int o, input bufno_t b, input bit release_it);
    rd_buf[o] = b;
    for (int k = 0; k < PKT_WORDS; k++) begin
      @(negedge clk);
      while (fill[o] <= widx_t'(k)) @(negedge clk);
      rd_en[o] = 1; rd_word[o] = widx_t'(k);
      @(negedge clk);
      rd_en[o] = 0;
      check(dout[o] == pkt[k], $sformatf("word %0d: %h vs %h", k, dout[o], pkt[k]));
    end
    if (release_it) begin
      rel[o] = NBUF'(1) << b;
      @(negedge clk);
      rel[o] = '0;
    end
  endtask

  initial begin
    rst = 1; in_valid = 0; in_word = '0; ackreq = '0; rd_en = '0; rd_buf = '0; rd_word = '0; rel = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 12; t++) begin
      automatic port_t d = port_t'($urandom_range(2));
      fork
        send_pkt(d, 2);
        begin
          bufno_t b;
          while (request == '0) @(negedge clk);
          check(request == (3'b1 << d), $sformatf("request %b for dest %0d", request, d));
          b = rinfo;
          ackreq = request;
          @(negedge clk);
          ackreq = '0;
          check(request == '0, "request cleared");
          read_pkt(d, b, 1);
        end
      join
    end
    check(!wait_o, "no Wait while buffers are free");
    // fill all four buffers, the fifth packet is dropped
    for (int t = 0; t < 5; t++) begin
      send_pkt(2'd1, 0);
      ackreq = request;
      @(negedge clk);
      ackreq = '0;
    end
    check(wait_o, "Wait with four buffers busy");
    check(n_room == 1, "fifth packet dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
