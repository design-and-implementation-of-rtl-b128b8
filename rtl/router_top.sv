// router_top: 3-input, 3-output FPGA packet router with virtual cut-through
// forwarding.
//
// Each of the three sources builds a 12-word packet (preamble with the
// destination, CRC-16 of the data, ten data words) and sends it word by word
// through a toggle synchronizer into its input port. The input port stores
// the packet in one of four buffers and, on the preamble already, requests the
// destination output port. Each output port queues the requests, reads the
// packet from the input buffer while it is still arriving, checks its CRC,
// drops it on an error (crc_err) or sends the eleven words after the header
// on its output channel. A multiplexer picks one output channel for the
// display, either a fixed channel or (disp_sel = 3) a whole packet at a time
// from whichever output starts one. in_wait tells a feeder not to start a packet (all four buffers of
// that input busy); room_err reports a packet dropped for lack of a buffer.
// err_inject corrupts one data bit of a source's next packet after its CRC is
// computed (a test hook). The block structure follows the specification; the
// encodings, handshakes and timing are this design's.
module router_top
  import router_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  // packet sources
  input  logic  [NPORTS-1:0]            pkt_start,
  input  port_t [NPORTS-1:0]            pkt_dest,
  input  word_t [NPORTS-1:0][NDATA-1:0] pkt_data,
  input  logic  [NPORTS-1:0]            err_inject,
  output logic  [NPORTS-1:0]            src_busy,
  output logic  [NPORTS-1:0]            in_wait,
  output logic  [NPORTS-1:0]            room_err,
  // output channels
  input  logic  [NPORTS-1:0]            out_hold,
  output logic  [NPORTS-1:0]            out_valid,
  output word_t [NPORTS-1:0]            out_word,
  output logic  [NPORTS-1:0]            out_sop,
  output logic  [NPORTS-1:0]            out_eop,
  output logic  [NPORTS-1:0]            crc_err,
  // display
  input  port_t                         disp_sel,
  output logic                          disp_valid,
  output word_t                         disp_word
);
  logic  [NPORTS-1:0] s_tgl, s_valid;
  word_t [NPORTS-1:0] s_word, s_sync;

  // [input port][output port]
  logic   [NPORTS-1:0][NPORTS-1:0] request, ackreq, ip_rd_en;
  bufno_t [NPORTS-1:0][NPORTS-1:0] ip_rd_buf;
  widx_t  [NPORTS-1:0][NPORTS-1:0] ip_rd_word, ip_fill;
  word_t  [NPORTS-1:0][NPORTS-1:0] ip_dout;
  logic   [NPORTS-1:0][NPORTS-1:0][NBUF-1:0] ip_rel;
  bufno_t [NPORTS-1:0]             rinfo;

  // [output port][input port]
  logic   [NPORTS-1:0][NPORTS-1:0] op_req, op_ack, op_rd_en;
  bufno_t [NPORTS-1:0]             op_rd_buf;
  widx_t  [NPORTS-1:0]             op_rd_word;
  word_t  [NPORTS-1:0][NPORTS-1:0] op_din;
  widx_t  [NPORTS-1:0][NPORTS-1:0] op_fill;
  logic   [NPORTS-1:0][NPORTS-1:0][NBUF-1:0] op_rel;

  always_comb
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++) begin
        op_req[o][i]     = request[i][o];
        ackreq[i][o]     = op_ack[o][i];
        ip_rd_en[i][o]   = op_rd_en[o][i];
        ip_rd_buf[i][o]  = op_rd_buf[o];
        ip_rd_word[i][o] = op_rd_word[o];
        op_din[o][i]     = ip_dout[i][o];
        op_fill[o][i]    = ip_fill[i][o];
        ip_rel[i][o]     = op_rel[o][i];
      end

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    packet_source u_src (
      .clk, .rst, .start(pkt_start[i]), .dest(pkt_dest[i]), .data(pkt_data[i]),
      .err_inject(err_inject[i]), .busy(src_busy[i]), .tgl(s_tgl[i]), .word(s_word[i])
    );

    synchronizer u_sync (
      .clk, .rst, .tgl(s_tgl[i]), .word_in(s_word[i]), .valid(s_valid[i]), .word_out(s_sync[i])
    );

    input_port u_in (
      .clk, .rst, .in_valid(s_valid[i]), .in_word(s_sync[i]),
      .request(request[i]), .ackreq(ackreq[i]), .rinfo(rinfo[i]),
      .rd_en(ip_rd_en[i]), .rd_buf(ip_rd_buf[i]), .rd_word(ip_rd_word[i]),
      .dout(ip_dout[i]), .fill(ip_fill[i]), .rel(ip_rel[i]),
      .wait_o(in_wait[i]), .roomerr(room_err[i])
    );
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    output_port u_out (
      .clk, .rst, .req(op_req[o]), .ploc(rinfo), .ackreqs(op_ack[o]),
      .rd_en(op_rd_en[o]), .rd_buf(op_rd_buf[o]), .rd_word(op_rd_word[o]),
      .din(op_din[o]), .fill(op_fill[o]), .rel(op_rel[o]), .hold(out_hold[o]),
      .out_valid(out_valid[o]), .out_word(out_word[o]), .out_sop(out_sop[o]),
      .out_eop(out_eop[o]), .crc_err(crc_err[o])
    );
  end

  out_mux u_mux (.clk, .rst, .sel(disp_sel), .valid(out_valid), .sop(out_sop), .eop(out_eop), .word(out_word),
                .disp_valid, .disp_word);
endmodule
