// frame_ram: synchronous single-write, single-read RAM used for packet frames.
//
// While reset is high nothing is written or read and dataout is cleared.
// Otherwise, with wr high, datain is written at addr on the clock edge; with
// rd high, the word at addr1 is registered onto dataout (one clock read
// latency), and dataout keeps its value while rd is low. Signal names and the
// reset/write/read behaviour follow the specification's RAM simulation; the
// registered read and the sizes are this design's choices.
module frame_ram #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              wr,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] datain,
  input  logic              rd,
  input  logic [ADDR_W-1:0] addr1,
  output logic [DATA_W-1:0] dataout
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (!reset && wr) mem[addr] <= datain;
  end

  always_ff @(posedge clk) begin
    if (reset)   dataout <= '0;
    else if (rd) dataout <= mem[addr1];
  end
endmodule
