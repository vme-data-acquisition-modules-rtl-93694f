// minerva_pkg: types and constants shared by the CROC and CRIM modules.
//
// The DAQ loop carries 10-bit words at RF/4 (13.28 MHz): two control bits that
// mark the beginning and the end of a message, and one data byte. The control
// code values and the valid bit (standing for the serializer's data enable)
// are this design's choice. The register bus is the internal side of the VME
// slave: a one-cycle read or write strobe with a 16-bit byte address inside
// the module's 64 KB window; read data is returned one cycle later.
package minerva_pkg;

  // control bits of a DAQ loop word
  typedef enum logic [1:0] {
    CTL_DATA  = 2'b00,   // byte inside a message
    CTL_BEGIN = 2'b01,   // first word of a message (front-end address)
    CTL_END   = 2'b10,   // CRC byte, last word of a message
    CTL_TRIG  = 2'b11    // single-word front-end trigger word
  } link_ctl_e;

  typedef struct packed {
    logic       valid;   // a word is present in this word slot
    link_ctl_e  ctl;
    logic [7:0] data;
  } link_word_t;

  localparam link_word_t LINK_IDLE = '{valid: 1'b0, ctl: CTL_DATA, data: 8'h00};

  typedef struct packed {
    logic        wr;     // write strobe, one clock
    logic        rd;     // read strobe, one clock; rdata valid the next clock
    logic [15:0] addr;   // byte address within the module's 64 KB window
    logic [15:0] wdata;
  } rbus_req_t;

  localparam rbus_req_t RBUS_IDLE = '{wr: 1'b0, rd: 1'b0, addr: 16'h0, wdata: 16'h0};

  // encoded timing commands (Table 1 and Table 6 of the specification)
  localparam logic [7:0] TC_SGATE_H    = 8'hB1;
  localparam logic [7:0] TC_SGATE_L    = 8'hD1;
  localparam logic [7:0] TC_CNRST_H    = 8'hC5;
  localparam logic [7:0] TC_TCALB_H    = 8'h89;
  localparam logic [7:0] TC_FPGA_RST   = 8'h8D;
  localparam logic [7:0] TC_LOAD_TIMER = 8'hC9;

  // command words written to command registers
  localparam logic [15:0] CMD_SEND     = 16'h0101;
  localparam logic [15:0] CMD_CHRESET  = 16'h0202;
  localparam logic [15:0] CMD_PULSE    = 16'h0404;

  // CRC-8, polynomial x^8 + x^2 + x + 1, one byte, MSB first
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] d);
    logic [7:0] c;
    c = crc ^ d;
    for (int i = 0; i < 8; i++)
      c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

endpackage
