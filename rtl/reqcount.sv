// reqcount: number of request records waiting in the SFifo of an output port.
//
// Counts up on a record write (inc) and down when the transmit controller
// takes one (dec); both in one clock leave it unchanged. `more` says at least
// one record waits, `room` that another fits. The block's role is the
// specification's; an occupancy counter is this design's realisation.
module reqcount #(
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic inc,
  input  logic dec,
  output logic more,
  output logic room
);
  logic [$clog2(DEPTH+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)              cnt <= '0;
    else if (inc && !dec) cnt <= cnt + 1'b1;
    else if (dec && !inc) cnt <= cnt - 1'b1;
  end

  assign more = (cnt != 0);
  assign room = (cnt < ($clog2(DEPTH+1))'(DEPTH));

  a_no_overflow  : assert property (@(posedge clk) disable iff (rst) inc |-> room || dec);
  a_no_underflow : assert property (@(posedge clk) disable iff (rst) dec |-> more);
endmodule
