// packet_start: marks the first word of a new packet.
//
// A word is a packet start (`first`, combinational, same clock as in_valid)
// when no packet is in progress and its upper byte carries the preamble tag.
// in_pkt is then set and stays high until the packet word counter reports the
// twelfth word (`last`). Words that arrive between packets without the tag are
// ignored. The role of the block is the specification's; the tag test is this
// design's way of recognising a preamble.
module packet_start
  import router_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  word_t in_word,
  input  logic  last,
  output logic  first,
  output logic  in_pkt
);
  assign first = in_valid && !in_pkt && (in_word[15:8] == PREAMBLE_TAG);

  always_ff @(posedge clk) begin
    if (rst)                    in_pkt <= 1'b0;
    else if (in_valid && last)  in_pkt <= 1'b0;
    else if (first)             in_pkt <= 1'b1;
  end
endmodule
