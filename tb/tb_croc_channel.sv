// tb_croc_channel: one CROC channel on its register bus with a front-end
// chain model on the loop. Sends messages through MData/SM and checks the
// answers in the DPM (length word, data, appending), the pointer register
// (byte-swapped), status bits MS/MR/CE/TO/EF/FF/DF and the line status
// inputs, Clear Status, Reset DPM pointer, the response timeout (set between
// TIMEOUT_CYCLES and TIMEOUT_CYCLES+20 clocks after Send), and the loop delay
// of a test pulse. Small FIFO, DPM and timeout keep it short.
module tb_croc_channel;
  import minerva_pkg::*;
  localparam int TMO = 2000;
  logic clk = 0, clk8 = 0, rst_n = 0, test_req = 0, reset_req = 0, bad_crc = 0;
  rbus_req_t req = RBUS_IDLE;
  logic [15:0] rdata, status;
  link_word_t tx_link, rx_link;
  logic rt_line, rt_ret;
  logic [1:0] div = 0;
  logic word_en;
  int checks = 0, failures = 0;

  always #1 clk8 = ~clk8;
  always #8 clk = ~clk;
  always @(posedge clk) div <= div + 1;
  assign word_en = div == 3;

  croc_channel #(.FIFO_DEPTH(16), .DPM_BYTES(64), .TIMEOUT_CYCLES(TMO), .RESET_CYCLES(100)) dut (
    .clk, .clk8, .rst_n, .word_en, .req, .rdata, .tx_link, .rx_link, .rt_line, .rt_ret,
    .test_req, .reset_req, .rf_present(1'b1), .ser_sync(1'b0), .des_lock(1'b1), .pll_lock(2'b10),
    .status);
  fe_model #(.NFE(12), .RESP_DELAY(30), .LOOP_DELAY_NS(20)) fe (.clk, .word_en, .rx(tx_link),
    .tx(rx_link), .rt_in(rt_line), .rt_out(rt_ret), .bad_crc);

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
  task automatic load(input byte unsigned m[$]);
    for (int i = 0; i < m.size(); i += 2) wr(16'h2000, {m[i], m[i+1]});
  endtask
  task automatic wait_sr(input int bitn, input int maxc);
    logic [15:0] s;
    for (int i = 0; i < maxc; i++) begin rd(16'h2020, s); if (s[bitn]) break; end
  endtask
  task automatic check_answer(input byte unsigned m[$], input int base);
    logic [15:0] d;
    rd(16'(base), d);
    chk(d == 16'(m.size() + 2), $sformatf("length word %h", d));
    for (int i = 0; i < m.size(); i += 2) begin
      automatic logic [7:0] lo = (i + 2 == m.size()) ? ~m[i+1] : m[i+1];
      rd(16'(base + 2 + i), d);
      chk(d == {m[i], lo}, "answer data");
    end
  endtask

  initial begin
    byte unsigned m[$];
    logic [15:0] d;
    int t0;
    repeat (3) @(negedge clk); rst_n = 1;
    rd(16'h2020, d);
    chk(d == 16'h2500, $sformatf("status after reset %h", d));
    rd(16'h2050, d);
    chk(d == 16'h0200, "pointer 2, bytes swapped");
    m = '{8'h03, 8'h10, 8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16, 8'h17, 8'hA1, 8'hA2, 8'hA3};
    load(m);
    rd(16'h2020, d);
    chk(d[4] && !d[5], "FIFO not empty, not full");
    wr(16'h2010, 16'h0101);
    wait_sr(1, 400);
    rd(16'h2020, d);
    chk(d[0] && d[1] && !d[2] && !d[3], $sformatf("MS MR set %h", d));
    chk(!d[4], "FIFO emptied by sending");
    check_answer(m, 0);
    // second message appended
    m[0] = 8'h07;
    load(m); wr(16'h2010, 16'h0101);
    repeat (250) @(negedge clk);
    check_answer(m, 14);
    rd(16'h2050, d);
    chk(d == {8'd30, 8'd0}, $sformatf("pointer after two %h", d));
    // clear status and reset pointer
    wr(16'h2030, 16'h0A0A);
    rd(16'h2020, d);
    chk(d[7:0] == 8'h00, "status cleared");
    rd(16'h2050, d);
    chk(d == 16'h0200, "pointer reset");
    // bad CRC
    bad_crc = 1; load(m); wr(16'h2010, 16'h0101); wait_sr(1, 400); bad_crc = 0;
    rd(16'h2020, d);
    chk(d[2], "CRC error");
    wr(16'h2030, 16'h0A0A);
    // timeout: address with no front-end
    m[0] = 8'h20; load(m);
    wr(16'h2010, 16'h0101); t0 = 0;
    repeat (TMO - 20) @(negedge clk);
    rd(16'h2020, d); chk(!d[3], "no timeout before the limit");
    repeat (40) @(negedge clk);
    rd(16'h2020, d); chk(d[3] && !d[1], "timeout");
    wr(16'h2030, 16'h0202);
    // FIFO full
    for (int i = 0; i < 16; i++) wr(16'h2000, 16'(i));
    rd(16'h2020, d); chk(d[5], "FIFO full");
    wr(16'h2030, 16'h0202);
    rd(16'h2020, d); chk(!d[5] && !d[4], "Clear Status empties FIFO");
    // fill the 64-byte DPM
    wr(16'h2030, 16'h0808);
    m[0] = 8'h02;
    for (int k = 0; k < 5; k++) begin load(m); wr(16'h2010, 16'h0101); repeat (250) @(negedge clk); end
    rd(16'h2020, d); chk(d[6], "DPM full");
    // loop delay
    wr(16'h2030, 16'h0202);
    @(negedge clk); test_req = 1; @(negedge clk); test_req = 0;
    repeat (20) @(negedge clk);
    rd(16'h2040, d);
    chk(d[14:8] >= 11 && d[14:8] <= 13 && d[7:0] == 0, $sformatf("loop delay %0d", d[14:8]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
