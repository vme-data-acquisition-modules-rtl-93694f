// croc_channel: one DAQ loop channel of the Chain Readout Controller.
//
// The VME master loads a message into the FIFO through MData (16 bits per
// write, first byte in bits 15:8) and writes 0x0101 to SM; the transmitter
// sends it down the loop with a CRC byte. The addressed front-end's answer
// comes back through the deserializer and is stored in the DPM as a length
// word followed by the data; Message Received and, on a bad CRC, CRC Error
// are set. If no answer has ended within TIMEOUT_CYCLES RF clocks (~480 us)
// of the Send command, Timeout is set. The channel also drives the loop's
// Reset & Test line and measures the loop delay of the test pulse.
//
// Channel-local register map (byte offsets, as in the module VME map):
//   0x0000-0x17FF  R  RData: DPM, 16-bit words
//   0x2000         W  MData: FIFO input
//   0x2010         W  SM: 0x0101 sends the message
//   0x2020         R  SR: {0,0,PL1,PL0,0,LS,SY,RF,0,DF,FF,EF,TO,CE,MR,MS}
//   0x2030         W  CS: bit 1 or 9 Clear Status, bit 3 or 11 Reset DPM pointer
//   0x2040         R  LD: loop delay D6..D0 in bits 14:8
//   0x2050         R  MP: DPM pointer, bytes swapped {P7..P0, P15..P8}
// Clear Status clears MS, MR, CE, TO and DF, empties the FIFO (EF and FF are
// live FIFO flags, so emptying it is how they are cleared) and clears the
// loop delay. 'req' strobes are one clock; read data is valid one clock later.
// Register layout and behaviour follow the document; FIFO flush on Clear
// Status and the exact command-word decoding are this design's choices.
module croc_channel
  import minerva_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH     = 1024,
  parameter int unsigned DPM_BYTES      = 6144,
  parameter int unsigned TIMEOUT_CYCLES = 25488,
  parameter int unsigned RESET_CYCLES   = 5310
) (
  input  logic        clk,
  input  logic        clk8,
  input  logic        rst_n,
  input  logic        word_en,
  input  rbus_req_t   req,        // already qualified for this channel
  output logic [15:0] rdata,
  output link_word_t  tx_link,
  input  link_word_t  rx_link,
  output logic        rt_line,
  input  logic        rt_ret,
  input  logic        test_req,
  input  logic        reset_req,
  input  logic        rf_present,
  input  logic        ser_sync,
  input  logic        des_lock,
  input  logic [1:0]  pll_lock,
  output logic [15:0] status
);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  localparam int unsigned DAW = $clog2(DPM_BYTES/2);
  localparam int unsigned TW  = $clog2(TIMEOUT_CYCLES + 1);

  logic [13:0] a;
  assign a = req.addr[13:0];

  logic wr_mdata, wr_send, wr_cs, cs_clear, cs_rp;
  assign wr_mdata = req.wr && a == 14'h2000;
  assign wr_send  = req.wr && a == 14'h2010 && req.wdata == CMD_SEND;
  assign wr_cs    = req.wr && a == 14'h2030;
  assign cs_clear = wr_cs && (req.wdata[1] || req.wdata[9]);
  assign cs_rp    = wr_cs && (req.wdata[3] || req.wdata[11]);

  // FIFO and transmitter
  logic          f_empty, f_full, f_rd, f_mark;
  logic [15:0]   f_rdata;
  logic [FAW:0]  f_count;
  logic          tx_busy, tx_done;

  msg_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr(wr_mdata), .wdata(req.wdata), .rd(f_rd), .rdata(f_rdata),
    .flush(cs_clear), .mark(f_mark), .rewind(1'b0), .empty(f_empty), .full(f_full), .count(f_count));

  msg_tx #(.CW(FAW+1)) u_tx (
    .clk, .rst_n, .word_en, .start(wr_send), .fifo_empty(f_empty), .fifo_count(f_count),
    .fifo_rdata(f_rdata), .fifo_rd(f_rd), .fifo_mark(f_mark), .link_o(tx_link),
    .busy(tx_busy), .done(tx_done));

  // receiver and DPM
  logic           d_we;
  logic [DAW-1:0] d_waddr;
  logic [1:0]     d_wbe;
  logic [15:0]    d_wdata, d_rdata, ptr;
  logic           rx_in_msg, rx_done, rx_crc_err, rx_full, rx_trig;

  msg_rx #(.DPM_BYTES(DPM_BYTES)) u_rx (
    .clk, .rst_n, .word_en, .link_i(rx_link), .trig_mode(1'b0), .reset_ptr(cs_rp),
    .dpm_we(d_we), .dpm_waddr(d_waddr), .dpm_wbe(d_wbe), .dpm_wdata(d_wdata), .ptr,
    .in_msg(rx_in_msg), .msg_done(rx_done), .crc_err(rx_crc_err), .dpm_full(rx_full),
    .trig_det(rx_trig));

  dpm #(.DEPTH(DPM_BYTES/2)) u_dpm (
    .clk, .we(d_we), .waddr(d_waddr), .wbe(d_wbe), .wdata(d_wdata),
    .raddr(a[DAW:1]), .rdata(d_rdata));

  // Reset & Test line and loop delay
  logic       depart;
  logic [6:0] ldelay;
  logic       ld_running;

  rst_test_gen #(.RESET_CYCLES(RESET_CYCLES)) u_rtg (
    .clk, .rst_n, .test(test_req), .reset(reset_req), .line(rt_line), .depart);

  loop_delay #(.WIDTH(7)) u_ld (
    .clk8, .rst_n, .depart, .arrive_line(rt_ret), .clear(cs_clear), .delay(ldelay),
    .running(ld_running));

  // status bits and response timeout
  logic st_ms, st_mr, st_ce, st_to, st_df, waiting;
  logic [TW-1:0] tcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_ms <= 1'b0; st_mr <= 1'b0; st_ce <= 1'b0; st_to <= 1'b0; st_df <= 1'b0;
      waiting <= 1'b0; tcnt <= '0;
    end else begin
      if (cs_clear) begin
        st_ms <= 1'b0; st_mr <= 1'b0; st_ce <= 1'b0; st_to <= 1'b0; st_df <= 1'b0;
      end else begin
        if (tx_done)    st_ms <= 1'b1;
        if (rx_done)    st_mr <= 1'b1;
        if (rx_crc_err) st_ce <= 1'b1;
        if (rx_full)    st_df <= 1'b1;
        if (waiting && tcnt == TW'(TIMEOUT_CYCLES - 1) && !rx_done) st_to <= 1'b1;
      end
      if (wr_send && !f_empty && !tx_busy) begin
        waiting <= 1'b1; tcnt <= '0;
      end else if (waiting) begin
        if (rx_done || tcnt == TW'(TIMEOUT_CYCLES - 1)) waiting <= 1'b0;
        tcnt <= tcnt + 1'b1;
      end
    end
  end

  assign status = {2'b00, pll_lock[1], pll_lock[0], 1'b0, des_lock, ser_sync, rf_present,
                   1'b0, st_df, f_full, !f_empty, st_to, st_ce, st_mr, st_ms};

  // read data, one clock after the strobe
  logic        rd_dpm_q;
  logic [15:0] reg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_dpm_q <= 1'b0; reg_q <= 16'h0;
    end else begin
      rd_dpm_q <= req.rd && a < 14'(DPM_BYTES);
      unique case (a)
        14'h2020: reg_q <= status;
        14'h2040: reg_q <= {1'b0, ldelay, 8'h00};
        14'h2050: reg_q <= {ptr[7:0], ptr[15:8]};
        default:  reg_q <= 16'h0000;
      endcase
    end
  end
  assign rdata = rd_dpm_q ? d_rdata : reg_q;

  a_send_needs_idle: assert property (@(posedge clk) disable iff (!rst_n)
    tx_done |-> !tx_busy);
endmodule
