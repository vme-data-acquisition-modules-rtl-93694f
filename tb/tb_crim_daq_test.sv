// tb_crim_daq_test: the CRIM DAQ loop test module, with the testbench acting
// as the upstream CROC. Checks pass-through (words re-sent one slot later and
// stored in the DPM), front-end mode (response from the FIFO after the CRC
// byte, repeated without reloading), CRC error reporting only with CE, front
// -end trigger words (interrupt pulse, bytes stored), the timing command
// decoder (DT, EC), reset/test pulse classification (RS, DS), the SYNC pulse
// and FIFO reset.
module tb_crim_daq_test;
  import minerva_pkg::*;
  logic clk = 0, rst_n = 0, tm_bit = 0, rt_line = 0;
  rbus_req_t req = RBUS_IDLE;
  logic [15:0] rdata;
  link_word_t des_link = LINK_IDLE, ser_link;
  logic ser_sync_pulse, trig;
  logic [1:0] div = 0;
  logic word_en;
  int checks = 0, failures = 0, ntrig = 0, nsync = 0;
  link_word_t out_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) div <= div + 1;
  assign word_en = div == 3;

  crim_daq_test dut (.clk, .rst_n, .word_en, .req, .rdata, .des_link, .ser_link, .ser_sync_pulse,
    .tm_bit, .rt_line, .rf_present(1'b1), .ser_sync(1'b1), .des_lock(1'b1), .pll_lock(1'b1),
    .cm_viol(1'b0), .trig);

  always @(posedge clk) begin
    if (trig) ntrig++;
    if (ser_sync_pulse) nsync++;
    if (word_en && ser_link.valid) out_q.push_back(ser_link);
  end

  function automatic byte unsigned ref_crc(input byte unsigned q[$]);
    byte unsigned c = 0;
    foreach (q[i]) begin
      c ^= q[i];
      repeat (8) c = ((c & 8'h80) != 0) ? byte'((c << 1) ^ 8'h07) : byte'(c << 1);
    end
    return c;
  endfunction
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); req = '{wr: 1'b1, rd: 1'b0, addr: a, wdata: d};
    @(negedge clk); req = RBUS_IDLE;
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); req = '{wr: 1'b0, rd: 1'b1, addr: a, wdata: 16'h0};
    @(negedge clk); req = RBUS_IDLE; d = rdata;
  endtask
  task automatic put(input link_ctl_e c, input byte unsigned d);
    do @(negedge clk); while (!word_en);
    des_link = '{valid: 1'b1, ctl: c, data: d};
    @(negedge clk); des_link = LINK_IDLE;
  endtask
  task automatic send(input byte unsigned q[$], input bit bad);
    foreach (q[i]) put(i == 0 ? CTL_BEGIN : CTL_DATA, q[i]);
    put(CTL_END, bad ? ~ref_crc(q) : ref_crc(q));
  endtask
  task automatic expect_msg(input byte unsigned q[$], input string s);
    bit ok = out_q.size() == q.size() + 1;
    if (ok) begin
      foreach (q[i]) ok &= out_q[i].data == q[i] && out_q[i].ctl == (i == 0 ? CTL_BEGIN : CTL_DATA);
      ok &= out_q[q.size()].ctl == CTL_END && out_q[q.size()].data == ref_crc(q);
    end
    chk(ok, $sformatf("%s (%0d words)", s, out_q.size()));
    out_q.delete();
  endtask

  initial begin
    automatic byte unsigned m[$] = '{8'h04, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08, 8'h33};
    automatic byte unsigned r[$] = '{8'h04, 8'hAA, 8'hBB, 8'hCC, 8'hDD, 8'hEE};
    logic [15:0] d;
    repeat (3) @(negedge clk); rst_n = 1;
    // pass-through
    wr(16'h2070, 16'h8000);
    send(m, 0); repeat (12) @(negedge clk);
    expect_msg(m, "pass-through copy");
    rd(16'h0000, d); chk(d == 16'd12, "stored length");
    rd(16'h0002, d); chk(d == 16'h0401, "stored data");
    rd(16'h2020, d); chk(d[1] && !d[0], "MR set, MS clear");
    // front-end mode
    wr(16'h2030, 16'h0A0A);
    for (int i = 0; i < r.size(); i += 2) wr(16'h2000, {r[i], r[i+1]});
    wr(16'h2070, 16'h4000); out_q.delete();
    send(m, 0); repeat (40) @(negedge clk);
    expect_msg(r, "front-end response");
    rd(16'h2020, d); chk(d[0] && d[1] && d[4], "MS, MR, FIFO kept");
    send(m, 0); repeat (40) @(negedge clk);
    expect_msg(r, "repeated response");
    // CRC error enable
    wr(16'h2070, 16'h0000); wr(16'h2030, 16'h0202);
    send(m, 1); repeat (8) @(negedge clk);
    rd(16'h2020, d); chk(!d[2], "no CE when disabled");
    wr(16'h2070, 16'h2000);
    send(m, 1); repeat (8) @(negedge clk);
    rd(16'h2020, d); chk(d[2], "CE when enabled");
    // software send and FIFO reset
    out_q.delete(); wr(16'h2010, 16'h0101); repeat (40) @(negedge clk);
    expect_msg(r, "software send");
    wr(16'h2008, 16'h0808); rd(16'h2020, d); chk(!d[4], "FIFO reset");
    // trigger words
    wr(16'h2070, 16'h1000); wr(16'h2030, 16'h0808);
    put(CTL_TRIG, 8'h5A); put(CTL_TRIG, 8'hC3); put(CTL_TRIG, 8'h11);
    send(m, 0); repeat (8) @(negedge clk);
    chk(ntrig == 3, "trigger interrupts");
    rd(16'h0000, d); chk(d == 16'h5AC3, "trigger bytes stored");
    rd(16'h2050, d); chk(d == 16'h0300, "pointer 3");
    // timing command decoder
    begin
      automatic logic [9:0] f = {1'b1, 8'hC9, 1'b1};
      for (int i = 9; i >= 0; i--) begin @(negedge clk); tm_bit = f[i]; end
      @(negedge clk); tm_bit = 0; repeat (3) @(negedge clk);
    end
    rd(16'h2060, d); chk(d == 16'h00C9, "decoded command");
    rd(16'h2020, d); chk(d[15] && !d[14] && !d[13], "EC");
    // reset and test pulses
    rt_line = 1; @(negedge clk); rt_line = 0; repeat (3) @(negedge clk);
    rd(16'h2020, d); chk(d[13] && !d[14], "test pulse -> DS");
    rt_line = 1; repeat (100) @(negedge clk); rt_line = 0; repeat (3) @(negedge clk);
    rd(16'h2020, d); chk(d[14], "reset pulse -> RS");
    wr(16'h2040, 16'h0101); @(negedge clk); chk(nsync == 1, "SYNC pulse");
    wr(16'h2030, 16'h0202); rd(16'h2020, d); chk(d[15:13] == 0 && d[7:0] == 0, "clear status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
