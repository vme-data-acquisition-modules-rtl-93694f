// tb_croc: the whole CROC through VME cycles, each of the four loops closed
// by a front-end chain model. For every channel: load a message at its
// Table-7 address, send it, wait for Message Received, read the answer from
// the channel's DPM window (also by a D32 read) and the pointer register;
// then check the common registers, a broadcast test pulse measuring each
// loop's delay, that channels do not disturb each other and the encoded
// SGATE frame from the MTM input.
module tb_croc;
  import minerva_pkg::*;
  logic clk = 0, clk8 = 0, rst_n = 0, sg = 0;
  logic as_n, write_n, iack_n, iackin_n, dat_oe, dtack_n, iackout_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [23:1] addr;
  logic lword_n;
  logic [15:0] s_dat_hi;
  logic [15:0] m_dat, s_dat;
  link_word_t ser_link [4], des_link [4];
  logic [3:0] rt_line, rt_ret, rftm_ph;
  logic rftm_bit, clk_ext;
  logic [1:0] div = 0;
  int checks = 0, failures = 0, sg_frames = 0;
  localparam logic [23:0] BASE = 24'h120000;

  always #1 clk8 = ~clk8;
  always #8 clk = ~clk;
  always @(posedge clk) div <= div + 1;

  vme_master_bfm bfm (.clk, .as_n, .ds_n, .write_n, .am, .lword_n, .addr, .dat_o(m_dat), .iack_n,
                      .iackin_n, .dat_i(s_dat), .dat_hi_i(s_dat_hi), .dtack_n);
  croc #(.TIMEOUT_CYCLES(3000), .RESET_CYCLES(200)) dut (
    .clk, .clk8, .rst_n, .board_sel(8'h12), .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
    .vme_am(am), .vme_lword_n(lword_n), .vme_dat_hi_o(s_dat_hi), .vme_addr(addr), .vme_dat_i(m_dat), .vme_iack_n(iack_n), .vme_iackin_n(iackin_n),
    .vme_dat_o(s_dat), .vme_dat_oe(dat_oe), .vme_dtack_n(dtack_n), .vme_iackout_n(iackout_n),
    .mtm_sgate(sg), .mtm_cnrst(1'b0), .mtm_tcalb(1'b0), .clk_ext, .rftm_bit, .rftm_ph, .ser_link,
    .des_link, .rt_line, .rt_ret, .rf_present(4'hF), .ser_sync(4'hF), .des_lock(4'hF), .pll_lock(2'b11));

  for (genvar n = 0; n < 4; n++) begin : g_fe
    fe_model #(.NFE(12), .RESP_DELAY(20 + 10 * n), .LOOP_DELAY_NS(10 + 4 * n)) fe (
      .clk, .word_en(div == 3), .rx(ser_link[n]), .tx(des_link[n]), .rt_in(rt_line[n]),
      .rt_out(rt_ret[n]), .bad_crc(1'b0));
  end

  // decoder for the RF & Timing line
  int st = 0; logic [7:0] sh;
  always @(posedge clk) begin
    #1;
    if (st == 0) begin if (rftm_bit) st = 1; end
    else if (st <= 8) begin sh = {sh[6:0], rftm_bit}; st++; end
    else begin if (sh == 8'hB1) sg_frames++; st = 0; end
  end

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic [15:0] d;
    repeat (4) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      automatic logic [23:0] cb = BASE + 24'(n) * 24'h4000;
      automatic byte unsigned m[$] = '{8'(n + 1), 8'h20, 8'h21, 8'h22, 8'h23, 8'h24, 8'h25, 8'h26,
                                       8'h27, 8'(8'h50 + n), 8'h51, 8'h52};
      for (int i = 0; i < m.size(); i += 2) bfm.write(cb + 24'h2000, {m[i], m[i+1]});
      bfm.write(cb + 24'h2010, 16'h0101);
      for (int k = 0; k < 200; k++) begin bfm.read(cb + 24'h2020, d); if (d[1]) break; end
      chk(d[0] && d[1] && !d[2] && !d[3], $sformatf("ch%0d MS MR %h", n, d));
      chk(d[15:8] == 8'h37, "line status bits");
      bfm.read(cb, d); chk(d == 16'd14, "length word");
      bfm.read(cb + 2, d); chk(d == {8'(n + 1), 8'h20}, "first answer word");
      bfm.read(cb + 12, d); chk(d == {8'h51, ~8'h52}, "last answer word");
      begin
        automatic logic [31:0] d32;
        bfm.read32(cb, d32); chk(d32 == {16'd14, 8'(n + 1), 8'h20}, $sformatf("D32 read %h", d32));
      end
      bfm.read(cb + 24'h2050, d); chk(d == 16'h1000, "pointer 16 (swapped)");
      for (int k = 0; k < 4; k++) if (k != n) begin
        bfm.read(BASE + 24'(k) * 24'h4000 + 24'h2050, d);
        chk(d == (k < n ? 16'h1000 : 16'h0200), "other channels untouched");
      end
    end
    // common registers and test pulses
    bfm.write(BASE + 24'hF000, 16'h8000); bfm.read(BASE + 24'hF000, d);
    chk(d == 16'h8000 && clk_ext, "TS0 and clock mode");
    bfm.write(BASE + 24'hF010, 16'h000F);
    for (int n = 0; n < 4; n++) bfm.write(BASE + 24'(n) * 24'h4000 + 24'h2030, 16'h0202);
    bfm.write(BASE + 24'hF040, 16'h0404);
    repeat (20) @(negedge clk);
    for (int n = 0; n < 4; n++) begin
      bfm.read(BASE + 24'(n) * 24'h4000 + 24'h2040, d);
      chk(int'(d[14:8]) >= (10 + 4 * n) / 2 + 1 && int'(d[14:8]) <= (10 + 4 * n) / 2 + 3,
          $sformatf("ch%0d loop delay %0d", n, d[14:8]));
    end
    sg = 1; repeat (30) @(negedge clk);
    chk(sg_frames == 1, "SGATE frame on RF & Timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
