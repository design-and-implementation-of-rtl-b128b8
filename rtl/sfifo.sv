// sfifo: request record store of an output port.
//
// A DEPTH x W memory written at adwrite on `we` (clock edge) and read
// combinationally at adread. With the CountIn/CountOut address counters and
// the occupancy counter around it, it keeps the records in arrival order, so
// packets leave an output in the order their requests were granted. Names
// follow the specification; the depth is this design's choice.
module sfifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] adwrite,
  input  logic [W-1:0]             data,
  input  logic [$clog2(DEPTH)-1:0] adread,
  output logic [W-1:0]             data_out
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) if (we) mem[adwrite] <= data;

  assign data_out = mem[adread];
endmodule
