// tb_minerva_crate: end-to-end test of a full crate (one CRIM, four CROCs,
// default parameters) driven only through VME cycles.
//
// Fifteen DAQ loops are closed by front-end chain models; loop 0 of CROC 3
// is closed by the CRIM's DAQ loop test port instead, and CROC 3's RF &
// Timing and Reset & Test lines feed the CRIM's receivers. The test walks
// through the mechanisms of the system and counts how often each one was
// seen to work: message round trips, VME block and D32 transfers of the DPM,
// CRC error, timeout, DPM full, test pulse with loop delay measurement, channel reset, software fast command,
// the CRIM sequencer driving the CROC timing encoders (and the CROC delayed
// test pulse), CRIM interrupt with IACK, IACK daisy-chain pass-through, the
// CRIM standing in for a front-end, the CRIM pass-through mode, the CRIM
// timing decoder and reset/test classifier, and a front-end trigger word.
// Every mechanism with a count of zero at the end is a failure.
module tb_minerva_crate;
  import minerva_pkg::*;
  localparam int NC = 4;
  localparam logic [23:0] CRIM = 24'h800000;
  logic clk = 0, clk8 = 0, rst_n = 0;
  logic as_n, write_n, iack_n, iackin_n, dat_oe, dtack_n, iackout_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [23:1] addr;
  logic lword_n;
  logic [15:0] s_dat_hi;
  logic [15:0] m_dat, s_dat;
  logic [6:0] irq_n;
  logic [3:0] lemo_in = 0, lemo_out;
  logic [7:0] croc_sel [NC];
  link_word_t crim_des, crim_ser, inj = LINK_IDLE;
  logic crim_sync, crim_daq_mode, use_inj = 0;
  logic       rftm_bit [NC];
  logic [3:0] rftm_ph  [NC];
  link_word_t ser_link [NC][4], des_link [NC][4];
  logic [3:0] rt_line [NC], rt_ret [NC], rfp [NC], ssy [NC], dlk [NC];
  logic [1:0] plk [NC];
  logic       clk_ext [NC];
  logic [1:0] div = 0;
  int checks = 0, failures = 0;
  int mech [string];
  string MECHS [19] = '{"vme_block_transfer", "vme_d32_read", "message_round_trip", "crc_error", "timeout", "dpm_full", "loop_delay",
    "channel_reset", "crim_reset_detect", "crim_test_detect", "fast_command",
    "crim_timing_decode", "sequencer_to_croc_frames", "sgate_test_pulse",
    "interrupt_iack", "iack_daisy_chain", "crim_front_end", "crim_pass_through",
    "frontend_trigger"};

  always #1.177 clk8 = ~clk8;     // 424.8 MHz
  always #9.416 clk  = ~clk;      // 53.1 MHz
  always @(posedge clk) div <= div + 1;

  for (genvar c = 0; c < NC; c++) begin : g_sel
    assign croc_sel[c] = 8'(8'h10 + c);
    assign rfp[c] = 4'hF; assign ssy[c] = 4'hF; assign dlk[c] = 4'hF; assign plk[c] = 2'b11;
  end

  vme_master_bfm bfm (.clk, .as_n, .ds_n, .write_n, .am, .lword_n, .addr, .dat_o(m_dat), .iack_n,
                      .iackin_n, .dat_i(s_dat), .dat_hi_i(s_dat_hi), .dtack_n);

  minerva_crate dut (
    .clk, .clk8, .rst_n, .crim_sel(8'h80), .croc_sel, .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_am(am), .vme_lword_n(lword_n), .vme_dat_hi_o(s_dat_hi), .vme_addr(addr), .vme_dat_i(m_dat), .vme_iack_n(iack_n),
    .vme_iackin_n(iackin_n), .vme_dat_o(s_dat), .vme_dat_oe(dat_oe), .vme_dtack_n(dtack_n),
    .vme_iackout_n(iackout_n), .vme_irq_n(irq_n), .mtm_sgate(1'b0), .mtm_cnrst(1'b0),
    .mtm_tcalb(1'b0), .lemo_in, .lemo_out, .crim_des_link(crim_des), .crim_ser_link(crim_ser),
    .crim_ser_sync_pulse(crim_sync), .crim_daq_mode, .crim_tm_bit(rftm_bit[3]),
    .crim_rt_line(rt_line[3][0]), .crim_line_status(5'b01111), .croc_rftm_bit(rftm_bit),
    .croc_rftm_ph(rftm_ph), .croc_ser_link(ser_link), .croc_des_link(des_link),
    .croc_rt_line(rt_line), .croc_rt_ret(rt_ret), .croc_rf_present(rfp), .croc_ser_sync(ssy),
    .croc_des_lock(dlk), .croc_pll_lock(plk), .croc_clk_ext(clk_ext));

  // front-end chains on every loop except CROC 3 loop 0 (the CRIM test port)
  for (genvar c = 0; c < NC; c++) begin : g_c
    for (genvar n = 0; n < 4; n++) begin : g_n
      if (c == 3 && n == 0) begin : g_crim
        assign crim_des = use_inj ? inj : ser_link[3][0];
        assign des_link[3][0] = crim_ser;
        assign rt_ret[3][0] = rt_line[3][0];
      end else begin : g_fe
        fe_model #(.NFE(12), .RESP_DELAY(30 + 7 * n), .LOOP_DELAY_NS(20 + 8 * n)) fe (
          .clk, .word_en(div == 3), .rx(ser_link[c][n]), .tx(des_link[c][n]),
          .rt_in(rt_line[c][n]), .rt_out(rt_ret[c][n]), .bad_crc(c == 1 && n == 0));
      end
    end
  end

  // RF & Timing frame decoders (one per CROC) and Reset & Test pulse meters
  int frames [NC][bit [7:0]];
  int rt_len [NC][4], rt_long [NC][4], rt_short [NC][4];
  for (genvar c = 0; c < NC; c++) begin : g_mon
    int st = 0; logic [7:0] sh;
    always @(posedge clk) begin
      #1;
      if (st == 0) begin if (rftm_bit[c]) st = 1; end
      else if (st <= 8) begin sh = {sh[6:0], rftm_bit[c]}; st++; end
      else begin frames[c][sh] = frames[c].exists(sh) ? frames[c][sh] + 1 : 1; st = 0; end
    end
    for (genvar n = 0; n < 4; n++) begin : g_rt
      always @(posedge clk) begin
        if (rt_line[c][n]) rt_len[c][n]++;
        else if (rt_len[c][n] != 0) begin
          if (rt_len[c][n] > 1000) rt_long[c][n]++; else rt_short[c][n]++;
          rt_len[c][n] = 0;
        end
      end
    end
  end

  int iackout_seen = 0;
  always @(negedge iackout_n) iackout_seen++;

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic saw(input string m);
    mech[m] = mech.exists(m) ? mech[m] + 1 : 1;
  endtask

  function automatic logic [23:0] chb(int c, int n);
    return {8'(8'h10 + c), 16'h0} + 24'(n) * 24'h4000;
  endfunction

  task automatic load_send(int c, int n, byte unsigned m[$]);
    for (int i = 0; i < m.size(); i += 2)
      bfm.write(chb(c, n) + 24'h2000, {m[i], (i + 1 < m.size()) ? m[i+1] : 8'h00});
    bfm.write(chb(c, n) + 24'h2010, 16'h0101);
  endtask

  task automatic wait_sr(int c, int n, logic [15:0] mask, int tries, output logic [15:0] d);
    for (int k = 0; k < tries; k++) begin
      bfm.read(chb(c, n) + 24'h2020, d);
      if ((d & mask) != 0) break;
      repeat (20) @(negedge clk);
    end
  endtask

  initial begin
    logic [15:0] d, sr; logic ok; logic [7:0] v;
    byte unsigned m[$];
    int nf;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);

    // 1. message round trip on every CROC loop served by a front-end model
    for (int c = 0; c < NC; c++)
      for (int n = 0; n < 4; n++) if (!(c == 3 && n == 0) && !(c == 1 && n == 0)) begin
        m = '{8'(1 + n), 8'(8'h40 + c), 8'h11, 8'h22, 8'h33, 8'(8'h60 + n)};
        load_send(c, n, m);
        wait_sr(c, n, 16'h000A, 100, sr);
        bfm.read(chb(c, n), d);
        chk(sr[1] && !sr[2] && d == 16'd8, $sformatf("round trip c%0d n%0d sr=%h len=%0d", c, n, sr, d));
        bfm.read(chb(c, n) + 6, d);
        chk(d == {8'h33, ~8'(8'h60 + n)}, "answer data");
        if (sr[1] && !sr[2] && d == {8'h33, ~8'(8'h60 + n)}) saw("message_round_trip");
      end

    // 1b. the same answer read back by a block transfer
    begin
      automatic logic [15:0] q [$];
      bfm.blt_read(chb(0, 2), 4, q);
      chk(q[0] == 16'd8 && q[1] == 16'h0340 && q[3] == {8'h33, ~8'h62}, "block transfer of the DPM");
      if (q[0] == 16'd8 && q[1] == 16'h0340 && q[3] == {8'h33, ~8'h62}) saw("vme_block_transfer");
    end
    begin
      automatic logic [31:0] d32;
      bfm.read32(chb(0, 2) + 4, d32);
      chk(d32 == 32'h1122_3362 ^ 32'h0000_00FF, $sformatf("D32 read of the DPM %h", d32));
      if (d32 == 32'h1122_33_9D) saw("vme_d32_read");
      bfm.read32(CRIM + 24'h2020, d32);
      chk(bfm.timeouts == 1, "CRIM does not answer D32");
    end

    // 2. CRC error (CROC 1 loop 0 answers with a bad CRC)
    load_send(1, 0, '{8'h05, 8'h01, 8'h02, 8'h03});
    wait_sr(1, 0, 16'h0002, 100, sr);
    chk(sr[1] && sr[2], $sformatf("CRC error sr=%h", sr));
    if (sr[1] && sr[2]) saw("crc_error");

    // 3. timeout: nobody answers address 0x7F
    bfm.write(chb(0, 1) + 24'h2030, 16'h0A0A);
    load_send(0, 1, '{8'h7F, 8'h00});
    repeat (20000) @(negedge clk);
    bfm.read(chb(0, 1) + 24'h2020, sr); chk(!sr[3], "no timeout before 480 us");
    repeat (6000) @(negedge clk);
    bfm.read(chb(0, 1) + 24'h2020, sr); chk(sr[3] && !sr[1], $sformatf("timeout sr=%h", sr));
    if (sr[3] && !sr[1]) saw("timeout");

    // 4. DPM full: four long answers on CROC 2 loop 1 without resetting the pointer
    bfm.write(chb(2, 1) + 24'h2030, 16'h0A0A);
    for (int k = 0; k < 4; k++) begin
      m.delete(); m.push_back(8'h02);
      for (int i = 1; i < 2046; i++) m.push_back(8'(i + k));
      load_send(2, 1, m);
      wait_sr(2, 1, 16'h0002, 2000, sr);
      chk(sr[1], $sformatf("long message %0d answered", k));
      if (k < 2) chk(!sr[6], "DPM not yet full");
      bfm.write(chb(2, 1) + 24'h2030, 16'h0202);
    end
    bfm.read(chb(2, 1) + 24'h2020, sr);
    bfm.read(chb(2, 1) + 24'h2050, d);
    chk(sr[6] && {d[7:0], d[15:8]} <= 16'd6144, $sformatf("DPM full sr=%h ptr=%0d", sr, {d[7:0], d[15:8]}));
    if (sr[6]) saw("dpm_full");
    bfm.write(chb(2, 1) + 24'h2030, 16'h0A0A);
    bfm.read(chb(2, 1) + 24'h2050, d); chk(d == 16'h0200, "pointer reset");

    // 5. test pulse and loop delay on CROC 0 (all four loops)
    bfm.write(chb(0, 0) + 24'hF010, 16'h000F);
    for (int n = 0; n < 4; n++) bfm.write(chb(0, n) + 24'h2030, 16'h0202);
    bfm.write(chb(0, 0) + 24'hF040, 16'h0404);
    repeat (30) @(negedge clk);
    for (int n = 0; n < 4; n++) begin
      automatic real t = (20.0 + 8 * n) / 2.354;
      bfm.read(chb(0, n) + 24'h2040, d);
      chk(real'(d[14:8]) >= t + 0.5 && real'(d[14:8]) <= t + 3.5,
          $sformatf("loop delay n%0d = %0d (%f)", n, d[14:8], t));
      if (rt_short[0][n] > 0 && d[14:8] != 0) saw("loop_delay");
    end

    // 6. channel reset on CROC 3 loops 0 and 2 (5310 clocks = 100 us)
    bfm.write(chb(3, 0) + 24'hF010, 16'h0500);
    bfm.write(chb(3, 0) + 24'hF020, 16'h0202);
    repeat (5400) @(negedge clk);
    chk(rt_long[3][0] == 1 && rt_long[3][2] == 1 && rt_long[3][1] == 0, "reset pulses");
    if (rt_long[3][0] == 1 && rt_long[3][2] == 1) saw("channel_reset");
    bfm.read(CRIM + 24'h2020, d); chk(d[14], $sformatf("CRIM saw reset (RS) %h", d));
    if (d[14]) saw("crim_reset_detect");
    bfm.write(chb(3, 0) + 24'hF010, 16'h0001);
    bfm.write(chb(3, 0) + 24'hF040, 16'h0404);
    repeat (20) @(negedge clk);
    bfm.read(CRIM + 24'h2020, d); chk(d[13], $sformatf("CRIM saw test (DS) %h", d));
    if (d[13]) saw("crim_test_detect");

    // 7. software fast command on CROC 3, decoded by the CRIM
    nf = frames[3].exists(8'h89) ? frames[3][8'h89] : 0;
    bfm.write(chb(3, 0) + 24'hF030, 16'h0089);
    repeat (30) @(negedge clk);
    chk(frames[3][8'h89] == nf + 1, "fast command frame");
    bfm.read(CRIM + 24'h2060, d); chk(d == 16'h0089, $sformatf("CRIM DT %h", d));
    if (frames[3][8'h89] == nf + 1) saw("fast_command");
    if (d == 16'h0089) saw("crim_timing_decode");

    // 8. CRIM sequencer (INT, single) -> all CROCs encode CNRST, SGATE on/off;
    //    CROC 2 sends its delayed test pulse; CRIM raises the SGATE interrupt
    bfm.write(chb(2, 0) + 24'hF000, 16'h1000 | 16'd40);
    bfm.write(chb(2, 0) + 24'hF010, 16'h0008);
    bfm.write(CRIM + 24'hF000, 16'h0002);
    bfm.write(CRIM + 24'hF040, 16'h0085);
    bfm.write(CRIM + 24'hC010, 16'h4000);
    bfm.write(CRIM + 24'hC020, 16'h0004);
    nf = rt_short[2][3];
    bfm.write(CRIM + 24'hC080, 16'h0808);
    repeat (120) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      automatic bit ok3 = frames[c].exists(8'hC5) && frames[c].exists(8'hB1) && frames[c].exists(8'hD1);
      chk(ok3, $sformatf("CROC %0d timing frames", c));
      if (ok3) saw("sequencer_to_croc_frames");
    end
    chk(rt_short[2][3] == nf + 1, "delayed test pulse after SGATE");
    if (rt_short[2][3] == nf + 1) saw("sgate_test_pulse");
    chk(irq_n == 7'b1101111, $sformatf("IRQ5 %b", irq_n));
    bfm.iack(3'd5, ok, v);
    chk(ok && v == 8'h09, $sformatf("SGATE vector %h", v));
    if (ok && v == 8'h09) saw("interrupt_iack");
    // 9. IACK at a level the CRIM does not drive travels down the chain
    nf = iackout_seen;
    bfm.iack(3'd2, ok, v);
    chk(!ok && iackout_seen == nf + 1, "IACK passed through CRIM and CROCs");
    if (!ok && iackout_seen == nf + 1) saw("iack_daisy_chain");

    // 10. CRIM as front-end on CROC 3 loop 0
    bfm.write(CRIM + 24'hC010, 16'h1000);
    bfm.write(CRIM + 24'h2008, 16'h0808);
    bfm.write(CRIM + 24'h2000, 16'h03A5);
    bfm.write(CRIM + 24'h2000, 16'h5A77);
    bfm.write(CRIM + 24'h2070, 16'h4000);
    bfm.write(chb(3, 0) + 24'h2030, 16'h0A0A);
    load_send(3, 0, '{8'h03, 8'h10, 8'h20, 8'h30});
    wait_sr(3, 0, 16'h0002, 100, sr);
    bfm.read(chb(3, 0) + 2, d);
    chk(sr[1] && !sr[2] && d == 16'h03A5, $sformatf("CRIM answered %h %h", sr, d));
    if (sr[1] && !sr[2] && d == 16'h03A5) saw("crim_front_end");
    bfm.read(CRIM + 24'h0002, d); chk(d == 16'h0310, "CRIM stored the request");

    // 11. CRIM pass-through: the CROC receives its own message back
    bfm.write(CRIM + 24'h2070, 16'h8000);
    bfm.write(chb(3, 0) + 24'h2030, 16'h0A0A);
    load_send(3, 0, '{8'h09, 8'h08, 8'h07});
    wait_sr(3, 0, 16'h0002, 100, sr);
    bfm.read(chb(3, 0), d); chk(d == 16'd6, $sformatf("echo length (3 bytes + pad) %0d", d));
    bfm.read(chb(3, 0) + 2, d);
    chk(sr[1] && !sr[2] && d == 16'h0908, $sformatf("pass-through echo %h %h", sr, d));
    if (sr[1] && !sr[2] && d == 16'h0908) saw("crim_pass_through");

    // 12. front-end trigger word at the CRIM test port
    bfm.write(CRIM + 24'h2070, 16'h1000);
    bfm.write(CRIM + 24'h2030, 16'h0808);
    bfm.write(CRIM + 24'hF000, 16'h0020);
    bfm.write(CRIM + 24'hF040, 16'h0085);
    use_inj = 1;
    @(negedge clk); while (div != 3) @(negedge clk);
    inj = '{valid: 1'b1, ctl: CTL_TRIG, data: 8'hC3};
    @(negedge clk); inj = LINK_IDLE;
    repeat (6) @(negedge clk);
    use_inj = 0;
    bfm.iack(3'd5, ok, v); chk(ok && v == 8'h0D, $sformatf("trigger vector %h", v));
    bfm.read(CRIM + 24'h0000, d); chk(d[15:8] == 8'hC3, "trigger byte stored");
    if (ok && v == 8'h0D && d[15:8] == 8'hC3) saw("frontend_trigger");

    chk(bfm.timeouts == 2, $sformatf("VME timeouts %0d", bfm.timeouts));
    chk(crim_daq_mode, "CRIM in DAQ mode");
    foreach (mech[k]) $display("mechanism %-26s %0d", k, mech[k]);
    foreach (MECHS[i]) begin
      checks++;
      if (!mech.exists(MECHS[i])) begin failures++; $display("FAIL mechanism %s never happened", MECHS[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
