// crc_check: CRC check unit of an output port.
//
// clr sets the running CRC to its initial value; each clock with en high
// advances it by one 16-bit word (all 16 bit steps of the CRC-16 LFSR unrolled
// into one clock). ok is high when the running CRC equals the received CRC
// word rx_crc. It computes the same CRC as crc_gen bit by bit. Comparing a
// recomputed CRC with the received one is the specification's; the word-wide
// step is this design's, so the check keeps pace with the buffer reads.
module crc_check
  import router_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en,
  input  word_t       word,
  input  logic [15:0] rx_crc,
  output logic        ok
);
  logic [15:0] crc;

  always_ff @(posedge clk) begin
    if (rst || clr) crc <= CRC_INIT;
    else if (en)    crc <= crc16_word(crc, word);
  end

  assign ok = (crc == rx_crc);
endmodule
