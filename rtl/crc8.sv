// crc8: byte-serial CRC accumulator for DAQ loop messages.
//
// Every message on the DAQ loop ends with a CRC byte computed over all bytes
// before it. The document does not give the polynomial; this design uses
// CRC-8 x^8+x^2+x+1 with initial value 0, bytes taken MSB first
// (minerva_pkg::crc8_byte). 'clear' restarts the sum, 'en' adds 'data'.
// 'crc' is the registered sum of all bytes added since the last clear;
// 'crc_next' is the sum including the byte presented in this cycle.
module crc8
  import minerva_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic [7:0] data,
  output logic [7:0] crc,
  output logic [7:0] crc_next
);
  always_comb crc_next = en ? crc8_byte(clear ? 8'h00 : crc, data) : (clear ? 8'h00 : crc);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) crc <= 8'h00;
    else        crc <= crc_next;
endmodule
