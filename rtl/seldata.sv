// seldata: forms the request record of an output port.
//
// From the grant {valid, one-hot} of selreq it encodes the input port number,
// takes that port's buffer number (PLOC), and presents the record {port, ploc}
// with a write enable. The record is meaningful, and written, only when the
// grant is valid with exactly one bit set. Combinational. The record contents
// follow the specification; its bit layout is this design's.
module seldata
  import router_pkg::*;
(
  input  logic   [NPORTS:0]   gnt,
  input  bufno_t [NPORTS-1:0] ploc,
  output req_rec_t            rec,
  output logic                we
);
  logic [1:0] nset;

  always_comb begin
    rec = '0;
    for (int p = 0; p < NPORTS; p++)
      if (gnt[p]) begin
        rec.port = port_t'(p);
        rec.ploc = ploc[p];
      end
    nset = '0;
    for (int p = 0; p < NPORTS; p++) nset = nset + 2'(gnt[p]);
    we = gnt[NPORTS] && (nset == 2'd1);
  end
endmodule
