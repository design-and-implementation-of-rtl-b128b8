// input_port: one input port component of the router.
//
// Wires the packet start detector, the even/odd pair register (rdata), the
// word counter (pac_cnt), the routing decision (selport), the buffer
// allocator (availb) and the packet buffer (fmem). A packet's preamble
// allocates a buffer and raises a request to its output port at once; its
// words are written into the buffer as pairs as they arrive, and the output
// reads them through its own multiplexer of fmem and releases the buffer when
// done. Words arrive as in_valid/in_word strobes from the synchronizer.
// wait_o and roomerr report buffer exhaustion. The set of components follows
// the specification's input port structure; all timing is this design's.
module input_port
  import router_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  word_t                in_word,
  // to the output ports
  output logic   [NPORTS-1:0]  request,
  input  logic   [NPORTS-1:0]  ackreq,
  output bufno_t               rinfo,
  input  logic   [NPORTS-1:0]  rd_en,
  input  bufno_t [NPORTS-1:0]  rd_buf,
  input  widx_t  [NPORTS-1:0]  rd_word,
  output word_t  [NPORTS-1:0]  dout,
  output widx_t  [NPORTS-1:0]  fill,
  input  logic   [NPORTS-1:0][NBUF-1:0] rel,
  // status
  output logic                 wait_o,
  output logic                 roomerr
);
  logic first, in_pkt, last, dest_ok, alloc, accepted, write, pair_valid;
  bufno_t ploc;
  logic [NBUF-1:0] selram, start, makeavail;
  logic [PKT_WORDS-1:0] wsel;
  word_t d0, d1;

  packet_start u_start (.clk, .rst, .in_valid, .in_word, .last, .first, .in_pkt);

  pac_cnt u_cnt (.clk, .rst, .in_valid, .first, .in_pkt, .wsel, .write, .last);

  rdata u_rdata (.clk, .rst, .in_valid, .in_word, .first, .in_pkt, .d0, .d1, .pair_valid);

  selport u_selport (.clk, .rst, .in_word, .alloc, .ploc, .dest_ok, .request, .ackreq, .rinfo);

  availb u_availb (.clk, .rst, .first, .dest_ok, .makeavail, .alloc, .ploc, .selram, .start,
                   .accepted, .wait_o, .roomerr);

  fmem u_fmem (.clk, .rst, .selram, .start, .accepted, .wsel, .pair_valid, .d0, .d1,
               .rd_en, .rd_buf, .rd_word, .dout, .fill, .rel, .makeavail);

  // pair writes always coincide with an odd word's write strobe
  a_pair_align : assert property (@(posedge clk) disable iff (rst) pair_valid |-> write);
endmodule
