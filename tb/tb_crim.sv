// tb_crim: the whole CRIM through VME cycles. An external trigger on LEMO T
// raises IRQ5 and the IACK cycle returns vector 0x08; a software single
// sequence in INT mode produces SGATE on the CROC outputs and an SGATE
// interrupt (vector 0x09); a front-end trigger word on the test port raises
// the input 5 interrupt (vector 0x0D) and is stored in the test DPM; the
// acknowledge for another level is passed down the daisy chain; registers
// of all three blocks read back through the module map.
module tb_crim;
  import minerva_pkg::*;
  logic clk = 0, rst_n = 0;
  logic as_n, write_n, iack_n, iackin_n, dat_oe, dtack_n, iackout_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [23:1] addr;
  logic lword_n;
  logic [15:0] s_dat_hi;
  logic [15:0] m_dat, s_dat;
  logic [6:0] irq_n;
  logic [3:0] lemo_in = 0, lemo_out;
  logic out_sgate, out_cnrst, out_tcalb, ser_sync_pulse, daq_mode;
  link_word_t des_link = LINK_IDLE, ser_link;
  int checks = 0, failures = 0, n_sg = 0;
  logic sg_q = 0;
  logic [1:0] div = 0;
  localparam logic [23:0] B = 24'h770000;

  always #8 clk = ~clk;
  always @(posedge clk) div <= div + 1;
  always @(posedge clk) begin if (rst_n && out_sgate && !sg_q) n_sg++; sg_q <= out_sgate; end

  vme_master_bfm bfm (.clk, .as_n, .ds_n, .write_n, .am, .lword_n, .addr, .dat_o(m_dat), .iack_n,
                      .iackin_n, .dat_i(s_dat), .dat_hi_i(s_dat_hi), .dtack_n);
  crim dut (.clk, .rst_n, .board_sel(8'h77), .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
    .vme_am(am), .vme_lword_n(lword_n), .vme_dat_hi_o(s_dat_hi), .vme_addr(addr), .vme_dat_i(m_dat), .vme_iack_n(iack_n), .vme_iackin_n(iackin_n),
    .vme_dat_o(s_dat), .vme_dat_oe(dat_oe), .vme_dtack_n(dtack_n), .vme_iackout_n(iackout_n),
    .vme_irq_n(irq_n), .mtm_sgate(1'b0), .mtm_cnrst(1'b0), .mtm_tcalb(1'b0), .lemo_in, .lemo_out,
    .out_sgate, .out_cnrst, .out_tcalb, .des_link, .ser_link, .ser_sync_pulse, .tm_bit(1'b0),
    .rt_line(1'b0), .rf_present(1'b1), .ser_sync(1'b1), .des_lock(1'b1), .pll_lock(1'b1),
    .cm_viol(1'b0), .daq_mode);

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic [15:0] d; logic ok; logic [7:0] v;
    repeat (4) @(negedge clk); rst_n = 1;
    bfm.write(B + 24'hF000, 16'h00FF);
    bfm.write(B + 24'hF040, 16'h0085);
    bfm.read(B + 24'hF040, d); chk(d == 16'h0085, "IC read back");
    lemo_in[0] = 1; repeat (4) @(negedge clk); lemo_in[0] = 0;
    repeat (4) @(negedge clk);
    chk(irq_n == 7'b1101111, "IRQ5 on external trigger");
    bfm.iack(3'd3, ok, v); chk(!ok, "level 3 not answered");
    bfm.iack(3'd5, ok, v); chk(ok && v == 8'h08, $sformatf("vector %h", v));
    chk(irq_n == 7'h7F, "IRQ released");
    // INT single sequence
    bfm.write(B + 24'hC010, 16'h4000); bfm.write(B + 24'hC020, 16'h0004);
    bfm.write(B + 24'hF040, 16'h0085);
    bfm.write(B + 24'hF010, 16'h00FF);
    bfm.write(B + 24'hC080, 16'h0808);
    repeat (60) @(negedge clk);
    chk(n_sg == 1, "SGATE from sequencer");
    bfm.read(B + 24'hF010, d); chk(d[1] && d[2] && d[3], $sformatf("SGATE rise/fall, CNRST pending %h", d));
    bfm.iack(3'd5, ok, v); chk(ok && v == 8'h09, "SGATE rising vector");
    bfm.write(B + 24'hF020, 16'h0081);
    // front-end trigger word
    bfm.write(B + 24'hC010, 16'h1000);
    bfm.write(B + 24'h2070, 16'h1000);
    bfm.write(B + 24'h2030, 16'h0808);
    bfm.write(B + 24'hF040, 16'h0085);
    @(negedge clk); while (div != 3) @(negedge clk);
    des_link = '{valid: 1'b1, ctl: CTL_TRIG, data: 8'h9C};
    @(negedge clk); des_link = LINK_IDLE;
    repeat (6) @(negedge clk);
    bfm.iack(3'd5, ok, v); chk(ok && v == 8'h0D, "front-end trigger vector");
    bfm.read(B + 24'h0000, d); chk(d[15:8] == 8'h9C, "trigger byte in DPM");
    bfm.read(B + 24'h2070, d); chk(d == 16'h1000, "control register");
    chk(daq_mode, "DAQ mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
