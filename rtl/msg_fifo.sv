// msg_fifo: 16-bit message FIFO of a DAQ loop channel (1K x 16 by default).
//
// The VME master writes a message into it, 16 bits at a time, and the
// transmitter reads it out. Read data is first-word fall-through: 'rdata' is
// the head word whenever 'empty' is low, and 'rd' pops it. 'flush' empties
// the FIFO. 'mark' saves the read pointer and the count; 'rewind' restores
// them, so the same message can be sent again without reloading (the CRIM
// front-end simulator uses this). Depth follows the document (1Kx16);
// flush/mark/rewind are this design's way of doing what the document states.
module msg_fifo #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr,
  input  logic [15:0]   wdata,
  input  logic          rd,
  output logic [15:0]   rdata,
  input  logic          flush,
  input  logic          mark,
  input  logic          rewind,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count
);
  logic [15:0] mem [DEPTH];
  logic [AW-1:0] wp, rp, rp_mark;
  logic [AW:0]   cnt_mark;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign rdata = mem[rp];

  logic do_wr, do_rd;
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk)
    if (do_wr) mem[wp] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; rp_mark <= '0; cnt_mark <= '0;
    end else if (flush) begin
      wp <= '0; rp <= '0; count <= '0; rp_mark <= '0; cnt_mark <= '0;
    end else if (rewind) begin
      rp    <= rp_mark;
      count <= cnt_mark + (AW+1)'(do_wr);
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
    end else begin
      if (mark) begin rp_mark <= rp; cnt_mark <= count; end
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
