// synchronizer: brings a source's word stream into the router clock domain.
//
// The source flips `tgl` once per word and holds `word_in` stable until the
// next flip. tgl passes through two flip-flops (metastability guard) and a
// third flop for edge detection; when the synchronized toggle changes, the
// (by then stable) data word is captured into word_out and `valid` is high
// for that one clock. Latency is three clocks from the toggle to valid, so a
// source must hold each word at least four router clocks. The specification
// only names a synchronizer between the sources and the input ports; the
// toggle handshake is this design's choice, because a multi-bit word cannot be
// synchronized bit by bit.
module synchronizer
  import router_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  tgl,
  input  word_t word_in,
  output logic  valid,
  output word_t word_out
);
  logic s1, s2, s3;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1       <= 1'b0;
      s2       <= 1'b0;
      s3       <= 1'b0;
      valid    <= 1'b0;
      word_out <= '0;
    end else begin
      s1    <= tgl;
      s2    <= s1;
      s3    <= s2;
      valid <= s2 ^ s3;
      if (s2 ^ s3) word_out <= word_in;
    end
  end
endmodule
