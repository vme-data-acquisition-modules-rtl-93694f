// timing_decoder: recovers timing commands from the "RF & Timing" line.
//
// Counterpart of timing_encoder, used by the CRIM DAQ loop test module. It
// takes one timing bit per RF period ('tm_bit'). While idle a 1 is a start
// bit; the next 8 bits are the command, MSB first, and the bit after them
// must be the closing 1, else the frame is dropped. 'cmd' holds the last
// good command (start bit not included) and 'cmd_valid' pulses for one clock
// in the cycle after the closing bit. The frame follows the document; the
// rejection of a frame without closing bit is this design's choice.
module timing_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tm_bit,
  output logic [7:0] cmd,
  output logic       cmd_valid
);
  logic [3:0] cnt;     // 0 idle, 1..8 command bits, 9 closing bit
  logic [7:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; sh <= '0; cmd <= '0; cmd_valid <= 1'b0;
    end else begin
      cmd_valid <= 1'b0;
      if (cnt == 0) begin
        if (tm_bit) cnt <= 4'd1;
      end else if (cnt <= 4'd8) begin
        sh  <= {sh[6:0], tm_bit};
        cnt <= cnt + 1'b1;
      end else begin
        cnt <= '0;
        if (tm_bit) begin
          cmd       <= sh;
          cmd_valid <= 1'b1;
        end
      end
    end
  end
endmodule
