// croc_timing: registers and timing logic common to the four CROC channels.
//
// The MINOS timing inputs SGATE, CNRST and TCALB (asynchronous levels) are
// brought in through two flip-flops and handed to the RF & Timing encoder,
// which turns their edges into encoded commands on the DAQ loops. On a rising
// edge of the external SGATE, if the Test Pulse delay is enabled (TE), a test
// pulse is sent after D9..D0 RF clocks (18.9 ns steps) to the channels whose
// test mask bit is set. A software SGATE sent as a fast command does not
// cause it, as it never reaches this edge detector.
// Registers (byte offsets in the module window):
//   0xF000 R/W  TS0: bit 15 CM clock mode (1 external), bit 12 TE, bits 9:0 delay
//   0xF010 R/W  RT0: bits 11:8 reset mask R4..R1, bits 3:0 test mask T4..T1
//   0xF020 W    CR0: 0x0202 sends a reset pulse to channels with R set
//   0xF030 W    FC0: bits 7:0 are sent as an encoded timing command
//   0xF040 W    TP0: 0x0404 sends a test pulse to channels with T set
// 'ch_test' and 'ch_reset' are one-clock requests per channel; 'clk_ext'
// is the CM bit for the clock-source selector outside the logic.
// The register layout follows the document; the decoding of the command
// words as exact 16-bit values is this design's choice.
module croc_timing
  import minerva_pkg::*;
#(
  parameter int unsigned NCH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  rbus_req_t      req,
  output logic [15:0]    rdata,
  input  logic           mtm_sgate,
  input  logic           mtm_cnrst,
  input  logic           mtm_tcalb,
  output logic           tm_bit,
  output logic [3:0]     line_ph,
  output logic [NCH-1:0] ch_test,
  output logic [NCH-1:0] ch_reset,
  output logic           clk_ext
);
  logic [1:0] sg_s, cn_s, tc_s;
  logic       sg_q;
  logic [15:0] ts0;
  logic [NCH-1:0] tmask, rmask;
  logic        dly_run;
  logic [9:0]  dly_cnt;

  logic wr_ts, wr_rt, wr_cr, wr_fc, wr_tp;
  assign wr_ts = req.wr && req.addr == 16'hF000;
  assign wr_rt = req.wr && req.addr == 16'hF010;
  assign wr_cr = req.wr && req.addr == 16'hF020 && req.wdata == CMD_CHRESET;
  assign wr_fc = req.wr && req.addr == 16'hF030;
  assign wr_tp = req.wr && req.addr == 16'hF040 && req.wdata == CMD_PULSE;

  assign clk_ext = ts0[15];

  timing_encoder u_enc (
    .clk, .rst_n, .mtm_sgate(sg_s[1]), .mtm_cnrst(cn_s[1]), .mtm_tcalb(tc_s[1]),
    .fc_wr(wr_fc), .fc_data(req.wdata[7:0]), .tm_bit, .line_ph,
    .busy(), .sent_cmd(), .sent());

  logic sg_rise, dly_fire;
  assign sg_rise  = sg_s[1] && !sg_q;
  assign dly_fire = dly_run && dly_cnt == 10'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sg_s <= '0; cn_s <= '0; tc_s <= '0; sg_q <= 1'b0;
      ts0 <= 16'h0000; tmask <= '0; rmask <= '0;
      dly_run <= 1'b0; dly_cnt <= '0; ch_test <= '0; ch_reset <= '0;
    end else begin
      sg_s <= {sg_s[0], mtm_sgate};
      cn_s <= {cn_s[0], mtm_cnrst};
      tc_s <= {tc_s[0], mtm_tcalb};
      sg_q <= sg_s[1];
      if (wr_ts) ts0 <= req.wdata & 16'h93FF;
      if (wr_rt) begin
        rmask <= req.wdata[8 +: NCH];
        tmask <= req.wdata[0 +: NCH];
      end
      if (sg_rise && ts0[12]) begin
        dly_run <= 1'b1; dly_cnt <= ts0[9:0];
      end else if (dly_run) begin
        if (dly_cnt == 10'd0) dly_run <= 1'b0;
        else                  dly_cnt <= dly_cnt - 1'b1;
      end
      ch_test  <= (wr_tp || dly_fire) ? tmask : '0;
      ch_reset <= wr_cr ? rmask : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= 16'h0;
    else if (req.rd && req.addr == 16'hF000) rdata <= ts0;
    else if (req.rd && req.addr == 16'hF010) rdata <= {4'h0, 4'(rmask), 4'h0, 4'(tmask)};
    else rdata <= 16'h0;
  end
endmodule
