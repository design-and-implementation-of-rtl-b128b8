// selport: routing decision of an input port.
//
// The destination output port is the low two bits of the preamble; dest_ok
// (combinational) says whether it names one of the three outputs. When the
// buffer allocator accepts the packet (`alloc`), a one-hot `request` to that
// output is raised together with `rinfo`, the buffer number (PLOC) holding
// the packet, and both are held until the output acknowledges with ackreq.
// Because the request is issued on the header, the output can start reading
// the packet before it has fully arrived (cut-through). Routing by a header
// field is this design's encoding; request/acknowledge widths follow the
// specification.
module selport
  import router_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  word_t               in_word,
  input  logic                alloc,
  input  bufno_t              ploc,
  output logic                dest_ok,
  output logic [NPORTS-1:0]   request,
  input  logic [NPORTS-1:0]   ackreq,
  output bufno_t              rinfo
);
  assign dest_ok = (in_word[1:0] < port_t'(NPORTS));

  always_ff @(posedge clk) begin
    if (rst) begin
      request <= '0;
      rinfo   <= '0;
    end else if (alloc) begin
      request <= NPORTS'(1) << in_word[1:0];
      rinfo   <= ploc;
    end else begin
      request <= request & ~ackreq;
    end
  end

  // a new packet is never routed while the previous request is unanswered
  a_one_req : assert property (@(posedge clk) disable iff (rst) alloc |-> request == '0);
endmodule
