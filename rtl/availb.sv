// availb: buffer availability of an input port.
//
// Keeps one busy bit per packet buffer. When a packet starts (`first`) with a
// valid destination, the lowest free buffer is allocated in the same clock:
// alloc and ploc (its number) are combinational; selram (one-hot buffer being
// written), accepted and the one-clock `start` pulse that clears the buffer's
// fill count are registered. If all buffers are busy the packet is dropped and
// roomerr pulses. wait_o is high while all buffers are busy, telling the
// feeder to hold its next packet. makeavail (one-hot) frees buffers once an
// output has read them. The busy/full/wait behaviour follows the
// specification's flow; lowest-first allocation is this design's choice.
module availb
  import router_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            first,
  input  logic            dest_ok,
  input  logic [NBUF-1:0] makeavail,
  output logic            alloc,
  output bufno_t          ploc,
  output logic [NBUF-1:0] selram,
  output logic [NBUF-1:0] start,
  output logic            accepted,
  output logic            wait_o,
  output logic            roomerr
);
  logic [NBUF-1:0] busy;
  logic            any_free;

  always_comb begin
    any_free = 1'b0;
    ploc     = '0;
    for (int b = NBUF - 1; b >= 0; b--)
      if (!busy[b]) begin
        any_free = 1'b1;
        ploc     = bufno_t'(b);
      end
  end

  assign alloc  = first && dest_ok && any_free;
  assign wait_o = &busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= '0;
      selram   <= '0;
      start    <= '0;
      accepted <= 1'b0;
      roomerr  <= 1'b0;
    end else begin
      start   <= '0;
      roomerr <= first && dest_ok && !any_free;
      busy    <= (busy & ~makeavail) | (alloc ? NBUF'(1) << ploc : '0);
      if (first) begin
        accepted <= alloc;
        selram   <= alloc ? NBUF'(1) << ploc : '0;
        start    <= alloc ? NBUF'(1) << ploc : '0;
      end
    end
  end

  a_free_only_busy : assert property (@(posedge clk) disable iff (rst) (makeavail & ~busy) == '0);
endmodule
