// output_port: one output port component of the router.
//
// selreq grants one input port request per clock, seldata turns the grant
// into a request record {port, ploc}, which is written into the sfifo at the
// CountIn address; reqcount tracks how many records wait; the transmit
// controller takes them in order (CountOut address), reads the packet from
// the input buffer, checks the CRC and sends it without its header. The set
// of components follows the specification's output port structure.
module output_port
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic   [NPORTS-1:0]   req,
  input  bufno_t [NPORTS-1:0]   ploc,
  output logic   [NPORTS-1:0]   ackreqs,
  output logic   [NPORTS-1:0]   rd_en,
  output bufno_t                rd_buf,
  output widx_t                 rd_word,
  input  word_t  [NPORTS-1:0]   din,
  input  widx_t  [NPORTS-1:0]   fill,
  output logic   [NPORTS-1:0][NBUF-1:0] rel,
  input  logic                  hold,
  output logic                  out_valid,
  output word_t                 out_word,
  output logic                  out_sop,
  output logic                  out_eop,
  output logic                  crc_err
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [NPORTS:0] gnt;
  logic            room, more, we, next;
  req_rec_t        rec_in, rec_out;
  logic [AW-1:0]   adwrite, adread;

  selreq u_selreq (.clk, .rst, .req, .room, .ackreqs, .gnt);

  seldata u_seldata (.gnt, .ploc, .rec(rec_in), .we);

  reqcount #(.DEPTH(DEPTH)) u_reqcount (.clk, .rst, .inc(we), .dec(next), .more, .room);

  ptr_counter #(.DEPTH(DEPTH)) u_countin  (.clk, .rst, .en(we),   .count(adwrite));
  ptr_counter #(.DEPTH(DEPTH)) u_countout (.clk, .rst, .en(next), .count(adread));

  sfifo #(.DEPTH(DEPTH), .W($bits(req_rec_t))) u_sfifo (
    .clk, .we, .adwrite, .data(rec_in), .adread, .data_out(rec_out)
  );

  tcontroller u_tctl (.clk, .rst, .more, .rec(rec_out), .next, .rd_en, .rd_buf, .rd_word,
                      .din, .fill, .rel, .hold, .out_valid, .out_word, .out_sop, .out_eop, .crc_err);
endmodule
