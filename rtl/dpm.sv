// dpm: receive Dual Port Memory of a DAQ loop channel (3K x 16 = 6 KB).
//
// The receiver writes through port A with two byte enables (wbe[1] selects
// bits 15:8, the byte received first); the VME side reads through port B
// with one clock of latency. Size follows the document; the byte enables are
// this design's choice so that odd-length trigger data can be stored byte by
// byte.
module dpm #(
  parameter int unsigned DEPTH = 3072,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [1:0]    wbe,
  input  logic [15:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata
);
  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) begin
      if (wbe[1]) mem[waddr][15:8] <= wdata[15:8];
      if (wbe[0]) mem[waddr][7:0]  <= wdata[7:0];
    end
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : 16'h0000;
  end
endmodule
