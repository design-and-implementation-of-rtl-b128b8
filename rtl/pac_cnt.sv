// pac_cnt: counts the twelve words of a packet.
//
// The word index of the current word is 0 when `first` is high and the stored
// count otherwise. For every word of a packet (in_valid while first or in_pkt)
// it registers a one-hot word select `wsel` (12 bits) and a `write` strobe, so
// both are valid one clock after the word arrived, aligned with the pair
// register of rdata. `last` is combinational: the current word is the twelfth.
// Word count and one-hot select width follow the specification; the one-clock
// registration is this design's timing.
module pac_cnt
  import router_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic                 first,
  input  logic                 in_pkt,
  output logic [PKT_WORDS-1:0] wsel,
  output logic                 write,
  output logic                 last
);
  widx_t cnt, cur;

  assign cur  = first ? '0 : cnt;
  assign last = (first || in_pkt) && (cur == widx_t'(PKT_WORDS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      wsel  <= '0;
      write <= 1'b0;
    end else begin
      write <= 1'b0;
      if (in_valid && (first || in_pkt)) begin
        cnt   <= last ? '0 : cur + 1'b1;
        wsel  <= PKT_WORDS'(1) << cur;
        write <= 1'b1;
      end
    end
  end
endmodule
