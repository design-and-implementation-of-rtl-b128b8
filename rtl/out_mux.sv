// out_mux: display multiplexer and its select-line control.
//
// Picks one of the three output channels for the display and registers it:
// disp_valid/disp_word follow the chosen channel one clock later. With sel =
// 0..2 the select lines name the channel directly. With sel = 3 the select
// lines are set automatically, a whole packet at a time: when no packet is
// being shown, the lowest-numbered channel that starts a packet (valid and
// sop) is chosen and kept until that channel's end-of-packet word, so packets
// from different outputs are never interleaved on the display. Choosing one
// output for the display by select lines follows the specification; the
// automatic packet-at-a-time mode and the output register are this design's.
module out_mux
  import router_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  port_t               sel,
  input  logic  [NPORTS-1:0]  valid,
  input  logic  [NPORTS-1:0]  sop,
  input  logic  [NPORTS-1:0]  eop,
  input  word_t [NPORTS-1:0]  word,
  output logic                disp_valid,
  output word_t               disp_word
);
  localparam port_t AUTO = port_t'(NPORTS);

  logic  locked;      // automatic mode is showing a packet
  port_t lock_ch;
  port_t ch;          // channel shown in this clock
  logic  show;

  always_comb begin
    show = 1'b0;
    ch   = '0;
    if (sel != AUTO) begin
      ch   = sel;
      show = 1'b1;
    end else if (locked) begin
      ch   = lock_ch;
      show = 1'b1;
    end else begin
      for (int c = NPORTS - 1; c >= 0; c--)
        if (valid[c] && sop[c]) begin
          ch   = port_t'(c);
          show = 1'b1;
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      disp_valid <= 1'b0;
      disp_word  <= '0;
      locked     <= 1'b0;
      lock_ch    <= '0;
    end else begin
      disp_valid <= show && valid[ch];
      if (show) disp_word <= word[ch];
      if (sel != AUTO) begin
        locked <= 1'b0;
      end else if (show && valid[ch]) begin
        locked  <= !eop[ch];
        lock_ch <= ch;
      end
    end
  end
endmodule
