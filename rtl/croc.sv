// croc: Chain Readout Controller, a VME module with four DAQ loop channels.
//
// Each channel serves a chain of up to 12 front-ends over one CAT5e loop:
// messages go out through a serializer (10-bit words at RF/4, 160 Mbit/s on
// the wire), answers come back through a deserializer into the channel's
// 6 KB DPM, and the loop's Reset & Test line is driven and its delay
// measured. The common timing block encodes the MINOS timing signals and
// software fast commands onto the RF & Timing line, shared by all loops.
// VME map (byte offsets in the board's 64 KB window, A23..A16 = switch):
//   channel n (n = 0..NCH-1) at n*0x4000: DPM 0x0000-0x17FF, registers 0x2000-0x2050
//   common registers 0xF000-0xF040
// Accepted address modifiers: 0x39, 0x3D, 0x3E, 0x3A, and the block
// transfer modifiers 0x3B, 0x3F; D16 transfers, and D32 reads (LWORD* low)
// with D31..D16 on 'vme_dat_hi_o' carrying the word at the lower address.
// Clocks: 'clk' is the 53.1 MHz main clock, 'clk8' its 8x multiple for the
// loop delay counters; word slots are every fourth 'clk' (internal divider).
// Status inputs (RF present, serializer sync, deserializer lock, PLL locks)
// come from the line receivers and clock parts outside the logic.
// Map, functions and the 16/32-bit DPM access follow the document; D32
// writes are not answered, as everything 32-bit wide here is read-only.
module croc
  import minerva_pkg::*;
#(
  parameter int unsigned NCH            = 4,
  parameter int unsigned FIFO_DEPTH     = 1024,
  parameter int unsigned DPM_BYTES      = 6144,
  parameter int unsigned TIMEOUT_CYCLES = 25488,
  parameter int unsigned RESET_CYCLES   = 5310
) (
  input  logic           clk,
  input  logic           clk8,
  input  logic           rst_n,
  input  logic [7:0]     board_sel,
  // VME
  input  logic           vme_as_n,
  input  logic [1:0]     vme_ds_n,
  input  logic           vme_write_n,
  input  logic [5:0]     vme_am,
  input  logic           vme_lword_n,
  input  logic [23:1]    vme_addr,
  input  logic [15:0]    vme_dat_i,
  input  logic           vme_iack_n,
  input  logic           vme_iackin_n,
  output logic [15:0]    vme_dat_o,
  output logic [15:0]    vme_dat_hi_o,  // D31..D16
  output logic           vme_dat_oe,
  output logic           vme_dtack_n,
  output logic           vme_iackout_n,
  // MINOS timing inputs
  input  logic           mtm_sgate,
  input  logic           mtm_cnrst,
  input  logic           mtm_tcalb,
  output logic           clk_ext,
  // DAQ loops
  output logic           rftm_bit,
  output logic [3:0]     rftm_ph,
  output link_word_t     ser_link [NCH],
  input  link_word_t     des_link [NCH],
  output logic [NCH-1:0] rt_line,
  input  logic [NCH-1:0] rt_ret,
  input  logic [NCH-1:0] rf_present,
  input  logic [NCH-1:0] ser_sync,
  input  logic [NCH-1:0] des_lock,
  input  logic [1:0]     pll_lock
);
  rbus_req_t   req;
  logic [15:0] rdata, t_rdata;
  logic [15:0] c_rdata [NCH];
  logic [1:0]  wdiv;
  logic        word_en;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wdiv <= '0;
    else        wdiv <= wdiv + 1'b1;
  assign word_en = (wdiv == 2'd3);

  vme_slave #(.AM_MASK(64'hEE00_0000_0000_0000), .HAS_IRQ(1'b0), .HAS_D32(1'b1)) u_vme (
    .clk, .rst_n, .board_sel, .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n),
    .am(vme_am), .addr(vme_addr), .dat_i(vme_dat_i), .iack_n(vme_iack_n),
    .iackin_n(vme_iackin_n), .dat_o(vme_dat_o),
    .dat_hi_o(vme_dat_hi_o), .lword_n(vme_lword_n), .dat_oe(vme_dat_oe), .dtack_n(vme_dtack_n),
    .iackout_n(vme_iackout_n), .req, .rdata, .iack_req(), .iack_lvl(),
    .iack_hit(1'b0), .iack_vec(8'h00));

  logic [NCH-1:0] ch_test, ch_reset;

  croc_timing #(.NCH(NCH)) u_timing (
    .clk, .rst_n, .req, .rdata(t_rdata), .mtm_sgate, .mtm_cnrst, .mtm_tcalb,
    .tm_bit(rftm_bit), .line_ph(rftm_ph), .ch_test, .ch_reset, .clk_ext);

  for (genvar n = 0; n < NCH; n++) begin : g_ch
    rbus_req_t creq;
    always_comb begin
      creq = req;
      creq.wr = req.wr && req.addr[15:14] == 2'(n) && req.addr[13:12] != 2'b11;
      creq.rd = req.rd && req.addr[15:14] == 2'(n) && req.addr[13:12] != 2'b11;
    end
    croc_channel #(.FIFO_DEPTH(FIFO_DEPTH), .DPM_BYTES(DPM_BYTES),
                   .TIMEOUT_CYCLES(TIMEOUT_CYCLES), .RESET_CYCLES(RESET_CYCLES)) u_ch (
      .clk, .clk8, .rst_n, .word_en, .req(creq), .rdata(c_rdata[n]),
      .tx_link(ser_link[n]), .rx_link(des_link[n]), .rt_line(rt_line[n]), .rt_ret(rt_ret[n]),
      .test_req(ch_test[n]), .reset_req(ch_reset[n]), .rf_present(rf_present[n]),
      .ser_sync(ser_sync[n]), .des_lock(des_lock[n]), .pll_lock, .status());
  end

  // read mux: the block addressed by the read strobe answers one clock later
  logic [15:0] last_addr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      last_addr <= '0;
    else if (req.rd) last_addr <= req.addr;

  always_comb begin
    rdata = t_rdata;
    for (int n = 0; n < NCH; n++)
      if (last_addr[15:14] == 2'(n) && last_addr[13:12] != 2'b11) rdata = c_rdata[n];
  end
endmodule
