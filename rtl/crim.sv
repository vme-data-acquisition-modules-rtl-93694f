// crim: Chain Readout Interface Module, the CROC's companion VME module.
//
// It supplies what a CROC does not do itself: it distributes MINOS-style
// timing (SGATE, CNRST, TCALB) to up to four CROCs, either from an MTM, from
// LEMO inputs, from software or from its own sequencer (crim_timing); it
// raises VME interrupts on timing signals, an external trigger or a
// front-end trigger word (crim_interrupter); and its DAQ loop test port can
// monitor a CROC loop or answer like a front-end (crim_daq_test).
// Interrupter inputs: 0 trigger input T, 1 SGATE rising, 2 SGATE falling
// (rising edge of its inverse), 3 CNRST, 4 TCALB (all from the timing
// module's signal multiplexer), 5 front-end trigger word, 6-7 unused.
// VME map (byte offsets in the board's 64 KB window): 0x0000-0x2070 DAQ loop
// test module, 0xC010-0xC0C0 timing module, 0xF000-0xF81E interrupter.
// Address modifiers 0x39, 0x3D, 0x3E, 0x3A; D16 transfers and D08(O)
// interrupt acknowledge. 'clk' is the 53.1047 MHz clock; DAQ loop word slots
// are every fourth clock. The PLL that locks the oscillator to an external
// reference and the LVDS/LVTTL buffers lie outside this logic.
module crim
  import minerva_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned DPM_BYTES  = 6144,
  parameter int unsigned FAST_SHIFT = 10,
  parameter int unsigned SLOW_SHIFT = 23
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_sel,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic        vme_lword_n,
  input  logic [23:1] vme_addr,
  input  logic [15:0] vme_dat_i,
  input  logic        vme_iack_n,
  input  logic        vme_iackin_n,
  output logic [15:0] vme_dat_o,
  output logic [15:0] vme_dat_hi_o,  // D31..D16
  output logic        vme_dat_oe,
  output logic        vme_dtack_n,
  output logic        vme_iackout_n,
  output logic [6:0]  vme_irq_n,
  input  logic        mtm_sgate,
  input  logic        mtm_cnrst,
  input  logic        mtm_tcalb,
  input  logic [3:0]  lemo_in,
  output logic [3:0]  lemo_out,
  output logic        out_sgate,
  output logic        out_cnrst,
  output logic        out_tcalb,
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
  output logic        daq_mode
);
  rbus_req_t   req;
  logic [15:0] rdata, d_rdata, t_rdata, i_rdata;
  logic        iack_req, iack_hit;
  logic [2:0]  iack_lvl;
  logic [7:0]  iack_vec;
  logic [1:0]  wdiv;
  logic        word_en;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wdiv <= '0;
    else        wdiv <= wdiv + 1'b1;
  assign word_en = (wdiv == 2'd3);

  vme_slave #(.AM_MASK(64'h6600_0000_0000_0000), .HAS_IRQ(1'b1), .HAS_D32(1'b0)) u_vme (
    .clk, .rst_n, .board_sel, .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n),
    .am(vme_am), .addr(vme_addr), .dat_i(vme_dat_i), .iack_n(vme_iack_n),
    .iackin_n(vme_iackin_n), .dat_o(vme_dat_o),
    .dat_hi_o(vme_dat_hi_o), .lword_n(vme_lword_n), .dat_oe(vme_dat_oe), .dtack_n(vme_dtack_n),
    .iackout_n(vme_iackout_n), .req, .rdata, .iack_req, .iack_lvl, .iack_hit, .iack_vec);

  logic trig_in, mux_sgate, mux_cnrst, mux_tcalb, fe_trig;

  crim_timing #(.FAST_SHIFT(FAST_SHIFT), .SLOW_SHIFT(SLOW_SHIFT)) u_timing (
    .clk, .rst_n, .req, .rdata(t_rdata), .mtm_sgate, .mtm_cnrst, .mtm_tcalb, .lemo_in,
    .lemo_out, .out_sgate, .out_cnrst, .out_tcalb, .trig_in, .mux_sgate, .mux_cnrst,
    .mux_tcalb, .daq_mode);

  crim_daq_test #(.FIFO_DEPTH(FIFO_DEPTH), .DPM_BYTES(DPM_BYTES)) u_daq (
    .clk, .rst_n, .word_en, .req, .rdata(d_rdata), .des_link, .ser_link, .ser_sync_pulse,
    .tm_bit, .rt_line, .rf_present, .ser_sync, .des_lock, .pll_lock, .cm_viol, .trig(fe_trig));

  crim_interrupter u_int (
    .clk, .rst_n, .req, .rdata(i_rdata),
    .irq_in({2'b00, fe_trig, mux_tcalb, mux_cnrst, !mux_sgate, mux_sgate, trig_in}),
    .irq_n(vme_irq_n), .iack_req, .iack_lvl, .iack_hit, .iack_vec);

  logic [3:0] last_blk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      last_blk <= '0;
    else if (req.rd) last_blk <= req.addr[15:12];

  always_comb begin
    unique case (last_blk)
      4'hC:    rdata = t_rdata;
      4'hF:    rdata = i_rdata;
      default: rdata = d_rdata;
    endcase
  end
endmodule
