// router_pkg: types and constants shared by the 3x3 virtual cut-through router.
//
// A packet is 12 words of 16 bits: word 0 is the preamble (header), word 1
// the CRC-16 of the ten data words, words 2..11 the data. The preamble layout
// {PREAMBLE_TAG, 6'b0, dest[1:0]} and the CRC polynomial are choices of this
// design; the packet size, word width, port count and buffer count follow the
// router's specification. The function crc16_word() advances a CRC-16 register
// by one 16-bit word, MSB first, and is the reference every CRC block agrees with.
package router_pkg;
  localparam int unsigned NPORTS    = 3;   // inputs and outputs
  localparam int unsigned WORD_W    = 16;  // word width
  localparam int unsigned PKT_WORDS = 12;  // preamble + CRC + 10 data words
  localparam int unsigned NDATA     = 10;  // data words per packet
  localparam int unsigned NBUF      = 4;   // packet buffers per input port
  localparam int unsigned OUT_WORDS = PKT_WORDS - 1; // header removed on output

  localparam logic [7:0]  PREAMBLE_TAG = 8'hA5;
  localparam logic [15:0] CRC_POLY     = 16'h1021; // x^16 + x^12 + x^5 + 1
  localparam logic [15:0] CRC_INIT     = 16'h0000;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [1:0]        port_t;  // port number 0..2 (3 = none)
  typedef logic [1:0]        bufno_t; // buffer number (PLOC)
  typedef logic [3:0]        widx_t;  // word index 0..11

  // Request record stored in the SFifo of an output port.
  typedef struct packed {
    port_t  port;  // input port holding the packet
    bufno_t ploc;  // buffer number inside that input port
  } req_rec_t;

  function automatic logic [15:0] crc16_bit(input logic [15:0] crc, input logic b);
    logic fb;
    fb = crc[15] ^ b;
    return {crc[14:0], 1'b0} ^ (fb ? CRC_POLY : 16'h0000);
  endfunction

  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input word_t w);
    logic [15:0] c;
    c = crc;
    for (int i = WORD_W - 1; i >= 0; i--) c = crc16_bit(c, w[i]);
    return c;
  endfunction

  function automatic word_t make_preamble(input port_t dest);
    return {PREAMBLE_TAG, 6'b0, dest};
  endfunction
endpackage
