// selreq: request arbiter of an output port.
//
// Looks at the requests of the three input ports and, when the request FIFO
// has room, grants one per clock in round-robin order starting after the last
// granted port. The grant is combinational: ackreqs (one-hot) acknowledges the
// winner in the same clock, and gnt = {valid, one-hot} goes to seldata. The
// block's role and widths follow the specification; round-robin order is this
// design's choice of priority mechanism.
module selreq
  import router_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [NPORTS-1:0] req,
  input  logic              room,
  output logic [NPORTS-1:0] ackreqs,
  output logic [NPORTS:0]   gnt
);
  port_t last;   // last granted port
  port_t pick;
  logic  found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= NPORTS; k++) begin
      automatic port_t p = port_t'((int'(last) + k) % NPORTS);
      if (!found && req[p]) begin
        found = 1'b1;
        pick  = port_t'(p);
      end
    end
    ackreqs = (found && room) ? NPORTS'(1) << pick : '0;
    gnt     = {found && room, ackreqs};
  end

  always_ff @(posedge clk) begin
    if (rst)                last <= port_t'(NPORTS - 1);
    else if (found && room) last <= pick;
  end
endmodule
