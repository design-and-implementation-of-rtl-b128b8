// tcontroller: transmit controller of an output port.
//
// Takes the oldest request record {port, ploc} (`next` pops it), then reads
// that input port's buffer word by word, issuing a read for word k as soon as
// the buffer's fill count shows it has been stored, so reading overlaps the
// packet's arrival (cut-through). Read data comes back one clock later.
// Word 1 (the received CRC) and words 2..11 (data) are kept in an 11-word
// frame register while the data words feed the CRC check unit. After word 11
// the buffer is released (one-hot rel for one clock) and the CRC is compared:
// on a mismatch the packet is dropped and crc_err pulses; otherwise the 11
// words after the header (CRC word, then the ten data words) are sent on the
// output channel, one per clock while `hold` (Wait from the next router) is
// low, with out_sop/out_eop on the first/last word. The order receive ->
// check -> remove header -> send follows the specification's output flow;
// the channel signals, the dropping of failed packets and the cut-through
// read are this design's.
module tcontroller
  import router_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  // request records
  input  logic                  more,
  input  req_rec_t              rec,
  output logic                  next,
  // buffer read, one set of enables/releases per input port
  output logic   [NPORTS-1:0]   rd_en,
  output bufno_t                rd_buf,
  output widx_t                 rd_word,
  input  word_t  [NPORTS-1:0]   din,
  input  widx_t  [NPORTS-1:0]   fill,
  output logic   [NPORTS-1:0][NBUF-1:0] rel,
  // output channel
  input  logic                  hold,
  output logic                  out_valid,
  output word_t                 out_word,
  output logic                  out_sop,
  output logic                  out_eop,
  output logic                  crc_err
);
  typedef enum logic [1:0] {T_IDLE, T_READ, T_CHECK, T_SEND} tstate_t;
  tstate_t state;

  req_rec_t cur;
  widx_t    k, pidx, j;
  logic     pend;
  word_t    frame [OUT_WORDS];
  logic     issue, crc_ok, crc_en;
  word_t    rword;

  assign next    = (state == T_IDLE) && more;
  assign issue   = (state == T_READ) && (k < widx_t'(PKT_WORDS)) && (fill[cur.port] > k);
  assign rd_buf  = cur.ploc;
  assign rd_word = k;
  assign rword   = din[cur.port];
  assign crc_en  = pend && (pidx >= widx_t'(2));

  always_comb begin
    rd_en = '0;
    rel   = '0;
    rd_en[cur.port] = issue;
    if (state == T_CHECK) rel[cur.port] = NBUF'(1) << cur.ploc;
  end

  crc_check u_check (.clk, .rst, .clr(next), .en(crc_en), .word(rword), .rx_crc(frame[0]), .ok(crc_ok));

  assign out_valid = (state == T_SEND) && !hold;
  assign out_word  = frame[j];
  assign out_sop   = out_valid && (j == 0);
  assign out_eop   = out_valid && (j == widx_t'(OUT_WORDS - 1));
  assign crc_err   = (state == T_CHECK) && !crc_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= T_IDLE;
      cur   <= '0;
      k     <= '0;
      pidx  <= '0;
      j     <= '0;
      pend  <= 1'b0;
      for (int i = 0; i < OUT_WORDS; i++) frame[i] <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (more) begin
          cur   <= rec;
          k     <= '0;
          pend  <= 1'b0;
          state <= T_READ;
        end
        T_READ: begin
          pend <= issue;
          pidx <= k;
          if (issue) k <= k + 1'b1;
          if (pend) begin
            if (pidx != 0) frame[pidx - 1] <= rword;  // header word is dropped
            if (pidx == widx_t'(PKT_WORDS - 1)) state <= T_CHECK;
          end
        end
        T_CHECK: begin
          j     <= '0;
          state <= crc_ok ? T_SEND : T_IDLE;
        end
        T_SEND: if (!hold) begin
          if (j == widx_t'(OUT_WORDS - 1)) state <= T_IDLE;
          else j <= j + 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
