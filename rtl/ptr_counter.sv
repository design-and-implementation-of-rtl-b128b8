// ptr_counter: SFifo address counter (CountIn gives the write address
// ADWrite, CountOut the read address ADRead).
//
// Increments by one on each clock with `en` high and wraps from DEPTH-1 to 0.
// Reset to 0. The two counters are named by the specification; their width
// and wrap-around are this design's.
module ptr_counter #(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  output logic [$clog2(DEPTH)-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (en) count <= (count == ($clog2(DEPTH))'(DEPTH - 1)) ? '0 : count + 1'b1;
  end
endmodule
