// packet_source: packet generation for one router input (one "source").
//
// On start it latches the destination and the ten 16-bit data words, runs the
// bit-serial CRC generator over the 160 data bits, and then sends the 12-word
// packet: preamble {A5h tag, dest}, CRC word, data words 0..9. Each word is
// put on `word` and announced by flipping `tgl`; the word stays stable for
// WORD_GAP clocks, long enough for the receiving two-flop toggle synchronizer.
// busy is high from start until the last word has been held for WORD_GAP
// clocks; start is ignored while busy. err_inject flips bit 0 of the first data
// word after the CRC has been computed, so the receiving side sees a CRC error;
// it is a test hook of this design. The packet layout (preamble, CRC, ten data
// words) is the specification's; header encoding and word pacing are choices.
module packet_source
  import router_pkg::*;
#(
  parameter int unsigned WORD_GAP = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  port_t              dest,
  input  word_t [NDATA-1:0]  data,
  input  logic               err_inject,
  output logic               busy,
  output logic               tgl,
  output word_t              word
);
  typedef enum logic [1:0] {S_IDLE, S_CRC, S_SEND} state_t;
  state_t state;

  word_t [PKT_WORDS-1:0] frame;
  port_t                 dest_q;
  logic                  inj_q;
  logic [3:0]            widx;
  logic [$clog2(WORD_GAP+1)-1:0] gap;

  logic [NDATA*WORD_W-1:0] msg_in;
  logic [15:0] crc;
  logic        crc_done, crc_busy;

  // data word 0 is the most significant part of the message (sent first)
  always_comb
    for (int i = 0; i < NDATA; i++) msg_in[(NDATA-1-i)*WORD_W +: WORD_W] = data[i];

  crc_gen #(.DATA_BITS(NDATA*WORD_W)) u_crc (
    .clk, .rst, .start(state == S_IDLE && start), .data_in(msg_in),
    .crcout(crc), .done(crc_done), .busy(crc_busy)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      frame  <= '0;
      dest_q <= '0;
      inj_q  <= 1'b0;
      widx   <= '0;
      gap    <= '0;
      tgl    <= 1'b0;
      word   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          dest_q <= dest;
          inj_q  <= err_inject;
          for (int i = 0; i < NDATA; i++) frame[2+i] <= data[i];
          state  <= S_CRC;
        end
        S_CRC: if (crc_done) begin
          frame[0] <= make_preamble(dest_q);
          frame[1] <= crc;
          if (inj_q) frame[2][0] <= ~frame[2][0];
          widx  <= '0;
          gap   <= '0;
          state <= S_SEND;
        end
        S_SEND: begin
          if (gap == 0) begin
            word <= frame[widx];
            tgl  <= ~tgl;
          end
          if (gap == ($bits(gap))'(WORD_GAP - 1)) begin
            gap <= '0;
            if (widx == 4'(PKT_WORDS - 1)) state <= S_IDLE;
            else widx <= widx + 1'b1;
          end else begin
            gap <= gap + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = crc_busy;
endmodule
