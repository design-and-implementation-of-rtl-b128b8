// fmem: packet buffer memory of an input port.
//
// Four buffers, each a frame_ram of six 32-bit entries holding one packet as
// even/odd word pairs {d1, d0}, and three read multiplexers, one per output
// port. Write: when rdata presents a pair (pair_valid) for an accepted
// packet, it goes to the buffer selected by selram at entry index/2 of the
// one-hot word select wsel, and that buffer's fill count grows by two.
// `start` clears a fill count when the buffer is newly allocated. Read: output
// o names a buffer rd_buf[o] and word rd_word[o]; since one buffer is only ever
// read by the output its packet is routed to, each buffer takes its read
// address from the output that names it. dout[o] is valid one clock after
// rd_en[o] (the RAM's read latency). fill[o] is the fill count of the buffer
// output o names, so an output can read words as soon as they are stored.
// rel[o] (one-hot) is output o's release of a buffer; their OR is makeavail to
// the allocator. Four buffers and three multiplexers are the specification's;
// the pair organisation and fill counts are this design's.
module fmem
  import router_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  // write side
  input  logic [NBUF-1:0]       selram,
  input  logic [NBUF-1:0]       start,
  input  logic                  accepted,
  input  logic [PKT_WORDS-1:0]  wsel,
  input  logic                  pair_valid,
  input  word_t                 d0,
  input  word_t                 d1,
  // read side, one set per output port
  input  logic   [NPORTS-1:0]   rd_en,
  input  bufno_t [NPORTS-1:0]   rd_buf,
  input  widx_t  [NPORTS-1:0]   rd_word,
  output word_t  [NPORTS-1:0]   dout,
  output widx_t  [NPORTS-1:0]   fill,
  input  logic   [NPORTS-1:0][NBUF-1:0] rel,
  output logic   [NBUF-1:0]     makeavail
);
  localparam int unsigned AW = 3;

  widx_t  wr_idx;
  widx_t  [NBUF-1:0]   fillc;
  logic   [NBUF-1:0]   b_rd;
  logic   [NBUF-1:0][AW-1:0] b_raddr;
  logic   [NBUF-1:0][2*WORD_W-1:0] b_dout;
  bufno_t [NPORTS-1:0] rbuf_q;
  logic   [NPORTS-1:0] half_q;

  always_comb begin
    wr_idx = '0;
    for (int w = 0; w < PKT_WORDS; w++) if (wsel[w]) wr_idx = widx_t'(w);
  end

  always_comb begin
    b_rd    = '0;
    b_raddr = '0;
    for (int o = 0; o < NPORTS; o++)
      if (rd_en[o]) begin
        b_rd[rd_buf[o]]    = 1'b1;
        b_raddr[rd_buf[o]] = rd_word[o][AW:1];
      end
  end

  for (genvar b = 0; b < NBUF; b++) begin : g_buf
    frame_ram #(.DATA_W(2*WORD_W), .ADDR_W(AW)) u_ram (
      .clk, .reset(rst),
      .wr(pair_valid && accepted && selram[b]), .addr(wr_idx[AW:1]), .datain({d1, d0}),
      .rd(b_rd[b]), .addr1(b_raddr[b]), .dataout(b_dout[b])
    );

    always_ff @(posedge clk) begin
      if (rst || start[b])                        fillc[b] <= '0;
      else if (pair_valid && accepted && selram[b]) fillc[b] <= fillc[b] + widx_t'(2);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rbuf_q <= '0;
      half_q <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++)
        if (rd_en[o]) begin
          rbuf_q[o] <= rd_buf[o];
          half_q[o] <= rd_word[o][0];
        end
    end
  end

  always_comb begin
    makeavail = '0;
    for (int o = 0; o < NPORTS; o++) begin
      dout[o]   = half_q[o] ? b_dout[rbuf_q[o]][2*WORD_W-1:WORD_W] : b_dout[rbuf_q[o]][WORD_W-1:0];
      fill[o]   = fillc[rd_buf[o]];
      makeavail = makeavail | rel[o];
    end
  end

  // two outputs never read the same buffer in the same clock
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    for (genvar p = o + 1; p < NPORTS; p++) begin : g_pair
      a_excl : assert property (@(posedge clk) disable iff (rst)
        !(rd_en[o] && rd_en[p] && rd_buf[o] == rd_buf[p]));
    end
  end
endmodule
