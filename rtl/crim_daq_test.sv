// crim_daq_test: DAQ loop test module of the CRIM.
//
// Plugged into a CROC DAQ loop, it either watches the loop or stands in for a
// front-end. Every message arriving from the deserializer is stored in the
// DPM in the same format as in the CROC (length word, then the bytes) and
// its CRC is checked.
//  * Pass-through (control bit TR): each received word is sent on downstream
//    through the serializer one word slot later.
//  * Front-end (control bit SM): when a message's CRC byte has arrived, the
//    FIFO contents are sent back as a response message; after any message is
//    sent the FIFO read pointer returns to its start, so the same response is
//    repeated without reloading. SM takes the place of pass-through.
//  * Front-end trigger (control bit FE): a trigger word raises 'trig' for the
//    interrupter and its byte is stored in the DPM instead of messages.
// The RF & Timing line is decoded (DT register, EC status bit) and pulses on
// the Reset & Test line are classed by length as reset (RS, longer than
// RST_THRESH clocks) or test (DS).
// Registers (byte offsets): 0x0000-0x17FF RD (DPM), 0x2000 FD FIFO input,
// 0x2008 FR (0x0808 empties the FIFO), 0x2010 SM (0x0101 sends the FIFO),
// 0x2020 SR {EC,RS,DS,PL0,CM,LS,SY,RF,0,DF,FF,EF,0,CE,MR,MS}, 0x2030 CS
// (bit 1/9 clear status, bit 3/11 reset DPM pointer), 0x2040 SS (0x0101 SYNC
// pulse to the serializer), 0x2050 MP (pointer, bytes swapped), 0x2060 DT
// (last timing command), 0x2070 CR {TR,SM,CE,FE,12'b0}. CE status is set only
// while control bit CE is 1. Read data one clock after the strobe.
// Registers and modes follow the document; the trigger-word coding, the
// reset/test length threshold and Clear Status also clearing EC/RS/DS are
// this design's choices.
module crim_daq_test
  import minerva_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned DPM_BYTES  = 6144,
  parameter int unsigned RST_THRESH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        word_en,
  input  rbus_req_t   req,
  output logic [15:0] rdata,
  input  link_word_t  des_link,
  output link_word_t  ser_link,
  output logic        ser_sync_pulse,
  input  logic        tm_bit,
  input  logic        rt_line,
  input  logic        rf_present,
  input  logic        ser_sync,
  input  logic        des_lock,
  input  logic        pll_lock,
  input  logic        cm_viol,
  output logic        trig
);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  localparam int unsigned DAW = $clog2(DPM_BYTES/2);
  localparam int unsigned RW  = $clog2(RST_THRESH + 2);

  logic [15:0] a;
  assign a = req.addr;
  logic [3:0] ctrl;   // TR, SM, CE, FE
  logic c_tr, c_sm, c_ce, c_fe;
  assign {c_tr, c_sm, c_ce, c_fe} = ctrl;

  logic wr_fd, wr_fr, wr_sm, wr_cs, cs_clear, cs_rp, wr_ss, wr_cr;
  assign wr_fd    = req.wr && a == 16'h2000;
  assign wr_fr    = req.wr && a == 16'h2008 && req.wdata == 16'h0808;
  assign wr_sm    = req.wr && a == 16'h2010 && req.wdata == CMD_SEND;
  assign wr_cs    = req.wr && a == 16'h2030;
  assign cs_clear = wr_cs && (req.wdata[1] || req.wdata[9]);
  assign cs_rp    = wr_cs && (req.wdata[3] || req.wdata[11]);
  assign wr_ss    = req.wr && a == 16'h2040 && req.wdata == CMD_SEND;
  assign wr_cr    = req.wr && a == 16'h2070;

  // FIFO and response transmitter
  logic          f_empty, f_full, f_rd, f_mark;
  logic [15:0]   f_rdata;
  logic [FAW:0]  f_count;
  logic          tx_busy, tx_done, tx_start;
  link_word_t    tx_link;

  msg_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr(wr_fd), .wdata(req.wdata), .rd(f_rd), .rdata(f_rdata),
    .flush(wr_fr), .mark(f_mark), .rewind(tx_done), .empty(f_empty), .full(f_full),
    .count(f_count));

  msg_tx #(.CW(FAW+1)) u_tx (
    .clk, .rst_n, .word_en, .start(tx_start), .fifo_empty(f_empty), .fifo_count(f_count),
    .fifo_rdata(f_rdata), .fifo_rd(f_rd), .fifo_mark(f_mark), .link_o(tx_link),
    .busy(tx_busy), .done(tx_done));

  // receiver and DPM
  logic           d_we;
  logic [DAW-1:0] d_waddr;
  logic [1:0]     d_wbe;
  logic [15:0]    d_wdata, d_rdata, ptr;
  logic           rx_in_msg, rx_done, rx_crc_err, rx_full, rx_trig;

  msg_rx #(.DPM_BYTES(DPM_BYTES)) u_rx (
    .clk, .rst_n, .word_en, .link_i(des_link), .trig_mode(c_fe), .reset_ptr(cs_rp),
    .dpm_we(d_we), .dpm_waddr(d_waddr), .dpm_wbe(d_wbe), .dpm_wdata(d_wdata), .ptr,
    .in_msg(rx_in_msg), .msg_done(rx_done), .crc_err(rx_crc_err), .dpm_full(rx_full),
    .trig_det(rx_trig));

  dpm #(.DEPTH(DPM_BYTES/2)) u_dpm (
    .clk, .we(d_we), .waddr(d_waddr), .wbe(d_wbe), .wdata(d_wdata),
    .raddr(a[DAW:1]), .rdata(d_rdata));

  assign tx_start = wr_sm || (c_sm && rx_done);
  assign trig     = c_fe && rx_trig;

  // downstream: own message while it is on the line, else forwarded words
  link_word_t fwd;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       fwd <= LINK_IDLE;
    else if (word_en) fwd <= (c_tr && !c_sm) ? des_link : LINK_IDLE;
  assign ser_link = tx_link.valid ? tx_link : fwd;

  // timing command decoder
  logic [7:0] dt_cmd;
  logic       dt_valid;
  timing_decoder u_dec (.clk, .rst_n, .tm_bit, .cmd(dt_cmd), .cmd_valid(dt_valid));

  // status
  logic st_ms, st_mr, st_ce, st_df, st_ec, st_rs, st_ds, rt_q;
  logic [RW-1:0] rt_len;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0; st_ms <= 1'b0; st_mr <= 1'b0; st_ce <= 1'b0; st_df <= 1'b0;
      st_ec <= 1'b0; st_rs <= 1'b0; st_ds <= 1'b0; rt_q <= 1'b0; rt_len <= '0;
      ser_sync_pulse <= 1'b0;
    end else begin
      ser_sync_pulse <= wr_ss;
      if (wr_cr) ctrl <= req.wdata[15:12];
      rt_q <= rt_line;
      if (rt_line) rt_len <= (rt_len == '1) ? rt_len : rt_len + 1'b1;
      else         rt_len <= '0;
      if (cs_clear) begin
        st_ms <= 1'b0; st_mr <= 1'b0; st_ce <= 1'b0; st_df <= 1'b0;
        st_ec <= 1'b0; st_rs <= 1'b0; st_ds <= 1'b0;
      end else begin
        if (tx_done)             st_ms <= 1'b1;
        if (rx_done)             st_mr <= 1'b1;
        if (rx_crc_err && c_ce)  st_ce <= 1'b1;
        if (rx_full)             st_df <= 1'b1;
        if (dt_valid)            st_ec <= 1'b1;
        if (rt_q && !rt_line) begin
          if (rt_len > RW'(RST_THRESH)) st_rs <= 1'b1;
          else                          st_ds <= 1'b1;
        end
      end
    end
  end

  logic [15:0] status;
  assign status = {st_ec, st_rs, st_ds, pll_lock, cm_viol, des_lock, ser_sync, rf_present,
                   1'b0, st_df, f_full, !f_empty, 1'b0, st_ce, st_mr, st_ms};

  logic        rd_dpm_q;
  logic [15:0] reg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_dpm_q <= 1'b0; reg_q <= 16'h0;
    end else begin
      rd_dpm_q <= req.rd && a < 16'(DPM_BYTES);
      unique case (a)
        16'h2020: reg_q <= status;
        16'h2050: reg_q <= {ptr[7:0], ptr[15:8]};
        16'h2060: reg_q <= {8'h00, dt_cmd};
        16'h2070: reg_q <= {ctrl, 12'h000};
        default:  reg_q <= 16'h0000;
      endcase
    end
  end
  assign rdata = rd_dpm_q ? d_rdata : reg_q;
endmodule
