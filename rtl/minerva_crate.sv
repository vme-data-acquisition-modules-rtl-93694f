// minerva_crate: a MINERvA readout crate: one CRIM and NUM_CROC CROCs on a
// shared VME bus.
//
// The CRIM's timing outputs (SGATE, CNRST, TCALB) drive the external timing
// inputs of every CROC, as its RJ-45 timing ports do in the crate. The VME
// bus is shared: each board answers only in its own 64 KB window, chosen by
// its 8-bit switch ('crim_sel', 'croc_sel'); data outputs are combined by
// their output enables and DTACK* is the wired-OR (AND of active-low) of all
// boards; 'vme_dat_hi_o' carries D31..D16 of D32 reads (CROC DPM only). The interrupt acknowledge daisy chain runs from 'vme_iackin_n'
// through the CRIM, then CROC 0, 1, ... to 'vme_iackout_n'.
// All DAQ loops of all CROCs, the CRIM test port and the CRIM LEMO and MTM
// connections are brought out, since the front-ends, serializers,
// deserializers and cables lie outside the logic. All boards share one
// 53.1 MHz clock ('clk', CROCs in external clock mode) and its 8x multiple
// ('clk8') for the CROC loop delay counters; reset is active low.
module minerva_crate
  import minerva_pkg::*;
#(
  parameter int unsigned NUM_CROC = 4
) (
  input  logic        clk,
  input  logic        clk8,
  input  logic        rst_n,
  input  logic [7:0]  crim_sel,
  input  logic [7:0]  croc_sel [NUM_CROC],
  // VME backplane
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
  output logic [15:0] vme_dat_hi_o,     // D31..D16 (D32 reads of a CROC DPM)
  output logic        vme_dat_oe,
  output logic        vme_dtack_n,
  output logic        vme_iackout_n,
  output logic [6:0]  vme_irq_n,
  // CRIM front panel
  input  logic        mtm_sgate,
  input  logic        mtm_cnrst,
  input  logic        mtm_tcalb,
  input  logic [3:0]  lemo_in,
  output logic [3:0]  lemo_out,
  input  link_word_t  crim_des_link,
  output link_word_t  crim_ser_link,
  output logic        crim_ser_sync_pulse,
  output logic        crim_daq_mode,      // CRIM timing in DAQ mode (test port in use)
  input  logic        crim_tm_bit,
  input  logic        crim_rt_line,
  input  logic [4:0]  crim_line_status,   // {cm_viol, pll_lock, des_lock, ser_sync, rf_present}
  // CROC DAQ loops
  output logic        croc_rftm_bit [NUM_CROC],
  output logic [3:0]  croc_rftm_ph  [NUM_CROC],
  output link_word_t  croc_ser_link [NUM_CROC][4],
  input  link_word_t  croc_des_link [NUM_CROC][4],
  output logic [3:0]  croc_rt_line  [NUM_CROC],
  input  logic [3:0]  croc_rt_ret   [NUM_CROC],
  input  logic [3:0]  croc_rf_present [NUM_CROC],
  input  logic [3:0]  croc_ser_sync   [NUM_CROC],
  input  logic [3:0]  croc_des_lock   [NUM_CROC],
  input  logic [1:0]  croc_pll_lock   [NUM_CROC],
  output logic        croc_clk_ext    [NUM_CROC]
);
  logic        t_sgate, t_cnrst, t_tcalb;
  logic [15:0] crim_dat, crim_dat_hi;
  logic        crim_oe, crim_dtack_n, crim_iackout_n;
  logic [15:0] croc_dat     [NUM_CROC];
  logic [15:0] croc_dat_hi  [NUM_CROC];
  logic        croc_oe      [NUM_CROC];
  logic        croc_dtack_n [NUM_CROC];
  logic        chain        [NUM_CROC+1];

  crim u_crim (
    .clk, .rst_n, .board_sel(crim_sel), .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am,
    .vme_lword_n, .vme_addr, .vme_dat_i, .vme_iack_n, .vme_iackin_n, .vme_dat_o(crim_dat),
    .vme_dat_hi_o(crim_dat_hi),
    .vme_dat_oe(crim_oe), .vme_dtack_n(crim_dtack_n), .vme_iackout_n(crim_iackout_n),
    .vme_irq_n, .mtm_sgate, .mtm_cnrst, .mtm_tcalb, .lemo_in, .lemo_out,
    .out_sgate(t_sgate), .out_cnrst(t_cnrst), .out_tcalb(t_tcalb),
    .des_link(crim_des_link), .ser_link(crim_ser_link), .ser_sync_pulse(crim_ser_sync_pulse),
    .tm_bit(crim_tm_bit), .rt_line(crim_rt_line), .rf_present(crim_line_status[0]),
    .ser_sync(crim_line_status[1]), .des_lock(crim_line_status[2]),
    .pll_lock(crim_line_status[3]), .cm_viol(crim_line_status[4]), .daq_mode(crim_daq_mode));

  assign chain[0] = crim_iackout_n;

  for (genvar c = 0; c < NUM_CROC; c++) begin : g_croc
    croc u_croc (
      .clk, .clk8, .rst_n, .board_sel(croc_sel[c]), .vme_as_n, .vme_ds_n, .vme_write_n,
      .vme_am, .vme_lword_n, .vme_addr, .vme_dat_i, .vme_iack_n, .vme_iackin_n(chain[c]),
      .vme_dat_o(croc_dat[c]), .vme_dat_hi_o(croc_dat_hi[c]), .vme_dat_oe(croc_oe[c]), .vme_dtack_n(croc_dtack_n[c]),
      .vme_iackout_n(chain[c+1]), .mtm_sgate(t_sgate), .mtm_cnrst(t_cnrst),
      .mtm_tcalb(t_tcalb), .clk_ext(croc_clk_ext[c]), .rftm_bit(croc_rftm_bit[c]),
      .rftm_ph(croc_rftm_ph[c]), .ser_link(croc_ser_link[c]), .des_link(croc_des_link[c]),
      .rt_line(croc_rt_line[c]), .rt_ret(croc_rt_ret[c]), .rf_present(croc_rf_present[c]),
      .ser_sync(croc_ser_sync[c]), .des_lock(croc_des_lock[c]), .pll_lock(croc_pll_lock[c]));
  end

  assign vme_iackout_n = chain[NUM_CROC];

  always_comb begin
    vme_dat_o   = crim_oe ? crim_dat : 16'h0000;
    vme_dat_hi_o = crim_oe ? crim_dat_hi : 16'h0000;
    vme_dat_oe  = crim_oe;
    vme_dtack_n = crim_dtack_n;
    for (int c = 0; c < NUM_CROC; c++) begin
      if (croc_oe[c]) vme_dat_o = vme_dat_o | croc_dat[c];
      if (croc_oe[c]) vme_dat_hi_o = vme_dat_hi_o | croc_dat_hi[c];
      vme_dat_oe  = vme_dat_oe | croc_oe[c];
      vme_dtack_n = vme_dtack_n & croc_dtack_n[c];
    end
  end
endmodule
