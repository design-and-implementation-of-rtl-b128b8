// tb_fmem: checks the packet buffer memory.
//
// Writes a 12-word packet into each of the four buffers as six pairs, with
// `start` first; the fill count seen through an output must grow by two per
// pair and be cleared by start. Then all three outputs read different buffers
// at the same time, word by word in random order, and each dout must equal
// the stored word one clock after rd_en. rel from the outputs must appear
// ORed on makeavail.
module tb_fmem;
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

  logic [NBUF-1:0] selram, start, makeavail;
  logic accepted, pair_valid;
  logic [PKT_WORDS-1:0] wsel;
  word_t d0, d1;
  logic   [NPORTS-1:0] rd_en;
  bufno_t [NPORTS-1:0] rd_buf;
  widx_t  [NPORTS-1:0] rd_word;
  word_t  [NPORTS-1:0] dout;
  widx_t  [NPORTS-1:0] fill;
  logic   [NPORTS-1:0][NBUF-1:0] rel;
  fmem dut (.*);

  word_t mem [NBUF][PKT_WORDS];

  initial begin
    rst = 1; selram = '0; start = '0; accepted = 0; pair_valid = 0; wsel = '0; d0 = '0; d1 = '0;
    rd_en = '0; rd_buf = '0; rd_word = '0; rel = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int b = 0; b < NBUF; b++) begin
        rd_buf[0] = bufno_t'(b);
        @(negedge clk);
        start = NBUF'(1) << b;
        @(negedge clk);
        start = '0; selram = NBUF'(1) << b; accepted = 1;
        #1 check(fill[0] == 0, "fill cleared by start");
        for (int p = 0; p < PKT_WORDS / 2; p++) begin
          @(negedge clk);
          d0 = word_t'($urandom); d1 = word_t'($urandom);
          mem[b][2*p] = d0; mem[b][2*p+1] = d1;
          wsel = PKT_WORDS'(1) << (2*p + 1); pair_valid = 1;
          @(negedge clk);
          pair_valid = 0;
          #1 check(fill[0] == widx_t'(2*p + 2), $sformatf("fill %0d after pair %0d", fill[0], p));
        end
      end
      // three outputs read buffers 1, 3, 0 in parallel
      rd_buf = {bufno_t'(0), bufno_t'(3), bufno_t'(1)};
      for (int t = 0; t < 60; t++) begin
        widx_t w [NPORTS];
        @(negedge clk);
        for (int o = 0; o < NPORTS; o++) begin
          w[o] = widx_t'($urandom_range(PKT_WORDS - 1));
          rd_word[o] = w[o];
        end
        rd_en = '1;
        @(negedge clk);
        rd_en = '0;
        for (int o = 0; o < NPORTS; o++)
          check(dout[o] == mem[rd_buf[o]][w[o]], $sformatf("out %0d buf %0d word %0d", o, rd_buf[o], w[o]));
      end
      @(negedge clk);
      rel[0] = 4'b0010; rel[2] = 4'b1000;
      #1 check(makeavail == 4'b1010, "makeavail is the OR of releases");
      @(negedge clk);
      rel = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
