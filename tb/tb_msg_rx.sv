// tb_msg_rx: feeds messages into the receiver (64-byte DPM to reach the end)
// and checks the DPM image against a model: length word (counting itself)
// in front of each message, bytes in order, CRC byte not stored, pointer =
// stored bytes + 2, CRC error pulse on a bad CRC, DPM full at the last
// address, pointer reset, and trigger mode storing trigger bytes only.
module tb_msg_rx;
  import minerva_pkg::*;
  localparam int DB = 64;
  logic clk = 0, rst_n = 0, trig_mode = 0, reset_ptr = 0;
  link_word_t link_i = LINK_IDLE;
  logic dpm_we, in_msg, msg_done, crc_err, dpm_full, trig_det;
  logic [4:0] dpm_waddr, raddr = 0;
  logic [1:0] dpm_wbe;
  logic [15:0] dpm_wdata, ptr, rdata;
  logic [1:0] div = 0;
  logic word_en;
  int checks = 0, failures = 0, n_done = 0, n_err = 0, n_trig = 0;
  byte unsigned model [DB];

  always #5 clk = ~clk;
  always @(posedge clk) div <= div + 1;
  assign word_en = div == 3;
  always @(posedge clk) if (rst_n) begin
    if (msg_done) n_done++;
    if (crc_err) n_err++;
    if (trig_det) n_trig++;
  end

  msg_rx #(.DPM_BYTES(DB)) dut (.*);
  dpm #(.DEPTH(DB/2)) u_dpm (.clk, .we(dpm_we), .waddr(dpm_waddr), .wbe(dpm_wbe), .wdata(dpm_wdata),
    .raddr, .rdata);

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic byte unsigned ref_crc(input byte unsigned q[$]);
    byte unsigned c = 0;
    foreach (q[i]) begin
      c ^= q[i];
      repeat (8) c = ((c & 8'h80) != 0) ? byte'((c << 1) ^ 8'h07) : byte'(c << 1);
    end
    return c;
  endfunction

  task automatic put(input link_ctl_e c, input byte unsigned d);
    do @(negedge clk); while (!word_en);
    link_i = '{valid: 1'b1, ctl: c, data: d};
    @(negedge clk); link_i = LINK_IDLE;
  endtask

  task automatic send(input byte unsigned q[$], input bit bad);
    foreach (q[i]) put(i == 0 ? CTL_BEGIN : CTL_DATA, q[i]);
    put(CTL_END, bad ? ~ref_crc(q) : ref_crc(q));
    repeat (6) @(negedge clk);
  endtask

  task automatic check_dpm(input int upto);
    for (int w = 0; w < upto / 2; w++) begin
      raddr = 5'(w); @(negedge clk); @(negedge clk);
      chk(rdata == {model[2*w], model[2*w+1]}, $sformatf("DPM word %0d got %h exp %h", w, rdata, {model[2*w], model[2*w+1]}));
    end
  endtask

  initial begin
    automatic int base = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(ptr == 2, "pointer 2 after reset");
    for (int m = 0; m < 2; m++) begin
      automatic byte unsigned q[$];
      automatic int n = (m == 0) ? 10 : 6;
      repeat (n) q.push_back(8'($urandom));
      send(q, 0);
      model[base] = 8'((n + 2) >> 8); model[base + 1] = 8'(n + 2);
      foreach (q[i]) model[base + 2 + i] = q[i];
      base += n + 2;
      chk(ptr == 16'(base + 2), "pointer after message");
    end
    chk(n_done == 2 && n_err == 0, "two good messages");
    check_dpm(base);
    chk(!dpm_full, "not full");
    begin
      automatic byte unsigned q[$] = '{8'h05, 8'h11, 8'h22, 8'h33};
      send(q, 1);
      chk(n_err == 1 && n_done == 3, "bad CRC flagged");
    end
    // fill up
    begin
      automatic byte unsigned q[$];
      repeat (40) q.push_back(8'($urandom));
      send(q, 0);
      chk(dpm_full, "DPM full at last address");
    end
    // pointer reset
    @(negedge clk); reset_ptr = 1; @(negedge clk); reset_ptr = 0;
    chk(ptr == 2 && !dpm_full, "pointer reset");
    // trigger mode
    trig_mode = 1;
    @(negedge clk); reset_ptr = 1; @(negedge clk); reset_ptr = 0;
    chk(ptr == 0, "trigger mode pointer starts at 0");
    for (int i = 0; i < 5; i++) begin
      put(CTL_TRIG, 8'(8'hA0 + i)); model[i] = 8'(8'hA0 + i);
    end
    begin
      automatic byte unsigned q[$] = '{8'h01, 8'h02};
      send(q, 0);
    end
    repeat (4) @(negedge clk);
    chk(n_trig == 5, "trigger words detected");
    chk(ptr == 5, "only trigger bytes stored");
    check_dpm(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
