// rdata: collects packet words as even/odd pairs.
//
// Words with an even index inside the packet go to d0, odd ones to d1; when
// the odd word of a pair is stored, pair_valid is high for one clock (the
// clock after that word arrived) and {d1, d0} is one complete pair for the
// packet buffer. `first` restarts the pairing at an even word. Storing the
// packet in even and odd words is the specification's; pairing them for a
// 32-bit buffer write is this design's reading of it.
module rdata
  import router_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  word_t in_word,
  input  logic  first,
  input  logic  in_pkt,
  output word_t d0,
  output word_t d1,
  output logic  pair_valid
);
  logic odd, cur_odd;

  assign cur_odd = first ? 1'b0 : odd;

  always_ff @(posedge clk) begin
    if (rst) begin
      odd        <= 1'b0;
      d0         <= '0;
      d1         <= '0;
      pair_valid <= 1'b0;
    end else begin
      pair_valid <= 1'b0;
      if (in_valid && (first || in_pkt)) begin
        if (cur_odd) d1 <= in_word;
        else         d0 <= in_word;
        pair_valid <= cur_odd;
        odd        <= ~cur_odd;
      end
    end
  end
endmodule
