// timing_encoder: encodes timing commands into the "RF & Timing" DAQ loop line.
//
// The line is the accelerator RF clock (53.1 MHz, one period per 'clk')
// carrying one timing bit per RF period. A command is sent as a 10-bit frame
// MSB first: a start 1, the 8 command bits (whose MSB, always 1, is the second
// start bit, followed by the 7-bit pattern), and a closing 1. Between frames
// the line carries 0s, and at least one 0 separates two frames.
// Sources, highest priority first: rising and falling edge of the MTM SGATE
// level (0xB1, 0xD1), rising edge of CNRST (0xC5), rising edge of TCALB
// (0x89), and a command written to the Fast Command register ('fc_wr',
// 'fc_data'). A request waiting while a frame is on the line is kept and sent
// next; a second request of the same source in that time is merged.
// 'tm_bit' is the bit of the current RF period, registered; 'line_ph' is the
// line level in the four quarters of that period, quarter 0 first: a 0 bit is
// a normal clock (1100), a 1 bit stretches the high phase (1110), so every RF
// rising edge stays where it is. The command values and frame follow the
// document; the way a bit sits in the clock waveform and the queueing are
// this design's choice.
module timing_encoder
  import minerva_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mtm_sgate,
  input  logic       mtm_cnrst,
  input  logic       mtm_tcalb,
  input  logic       fc_wr,
  input  logic [7:0] fc_data,
  output logic       tm_bit,
  output logic [3:0] line_ph,
  output logic       busy,
  output logic [7:0] sent_cmd,    // command whose frame just started
  output logic       sent
);
  logic sg_q, cn_q, tc_q;
  logic p_sgh, p_sgl, p_cn, p_tc, p_fc;
  logic [7:0] fc_hold;
  logic [9:0] shreg;
  logic [3:0] bits_left;   // 10 frame bits + 1 gap bit

  logic       pick;
  logic [7:0] pick_cmd;
  always_comb begin
    pick = !busy;
    pick_cmd = 8'h00;
    if      (p_sgh) pick_cmd = TC_SGATE_H;
    else if (p_sgl) pick_cmd = TC_SGATE_L;
    else if (p_cn)  pick_cmd = TC_CNRST_H;
    else if (p_tc)  pick_cmd = TC_TCALB_H;
    else if (p_fc)  pick_cmd = fc_hold;
    else            pick = 1'b0;
  end

  assign busy    = (bits_left != 0);
  assign line_ph = tm_bit ? 4'b1110 : 4'b1100;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sg_q <= 1'b0; cn_q <= 1'b0; tc_q <= 1'b0;
      p_sgh <= 1'b0; p_sgl <= 1'b0; p_cn <= 1'b0; p_tc <= 1'b0; p_fc <= 1'b0;
      fc_hold <= 8'h00; shreg <= '0; bits_left <= '0; tm_bit <= 1'b0;
      sent <= 1'b0; sent_cmd <= 8'h00;
    end else begin
      sg_q <= mtm_sgate; cn_q <= mtm_cnrst; tc_q <= mtm_tcalb;
      sent <= 1'b0;
      // serialise
      if (busy) begin
        tm_bit    <= shreg[9];
        shreg     <= {shreg[8:0], 1'b0};
        bits_left <= bits_left - 1'b1;
      end else begin
        tm_bit <= 1'b0;
      end
      // choose the next frame
      if (pick) begin
        shreg     <= {1'b1, pick_cmd, 1'b1};
        bits_left <= 4'd11;
        sent      <= 1'b1;
        sent_cmd  <= pick_cmd;
      end
      // request flags: set by source events, cleared when picked
      p_sgh <= (p_sgh && !(pick && p_sgh))                                   || (mtm_sgate && !sg_q);
      p_sgl <= (p_sgl && !(pick && !p_sgh && p_sgl))                         || (!mtm_sgate && sg_q);
      p_cn  <= (p_cn  && !(pick && !p_sgh && !p_sgl && p_cn))                || (mtm_cnrst && !cn_q);
      p_tc  <= (p_tc  && !(pick && !p_sgh && !p_sgl && !p_cn && p_tc))       || (mtm_tcalb && !tc_q);
      p_fc  <= (p_fc  && !(pick && !p_sgh && !p_sgl && !p_cn && !p_tc))      || fc_wr;
      if (fc_wr) fc_hold <= fc_data;
    end
  end
endmodule
