// crc_gen: bit-serial CRC-16 generator.
//
// On start the DATA_BITS-wide message is loaded into a shift register and the
// working register crc_temp is cleared. Every following clock one message bit,
// MSB first, is shifted through the CRC-16 LFSR (polynomial 0x1021) and the bit
// counter is incremented; when the counter reaches DATA_BITS the working value
// is copied to crcout and done pulses for one clock. A result is therefore
// ready DATA_BITS+1 clocks after start. The bit-per-clock structure, the
// counter and the default of 32 message bits follow the specification's CRC
// simulation; the polynomial and the zero initial value are this design's choice.
module crc_gen
  import router_pkg::*;
#(
  parameter int unsigned DATA_BITS = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] data_in,
  output logic [15:0]          crcout,
  output logic                 done,
  output logic                 busy
);
  localparam int unsigned CW = $clog2(DATA_BITS + 1);

  logic [DATA_BITS-1:0] shreg;
  logic [15:0]          crc_temp;
  logic [CW-1:0]        counter;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg    <= '0;
      crc_temp <= CRC_INIT;
      counter  <= '0;
      crcout   <= '0;
      done     <= 1'b0;
      busy     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        shreg    <= data_in;
        crc_temp <= CRC_INIT;
        counter  <= '0;
        busy     <= 1'b1;
      end else if (busy) begin
        if (counter == CW'(DATA_BITS)) begin
          crcout <= crc_temp;
          done   <= 1'b1;
          busy   <= 1'b0;
        end else begin
          crc_temp <= crc16_bit(crc_temp, shreg[DATA_BITS-1]);
          shreg    <= {shreg[DATA_BITS-2:0], 1'b0};
          counter  <= counter + 1'b1;
        end
      end
    end
  end
endmodule
