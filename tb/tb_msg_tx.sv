// tb_msg_tx: loads messages of random length into a FIFO, sends them and
// checks the words on the link: begin code on the first byte, data codes,
// upper byte first, a CRC (reference computed here) with the end code, one
// word per word slot (2N+1 slots for N FIFO words), the 'done' pulse, and
// that an empty FIFO sends nothing.
module tb_msg_tx;
  import minerva_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, fwr = 0;
  logic [15:0] fwdata = 0, f_rdata;
  logic f_empty, f_full, f_rd, f_mark, busy, done;
  logic [6:0] f_count;
  link_word_t link_o;
  logic [1:0] div = 0;
  logic word_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) div <= div + 1;
  assign word_en = div == 3;

  msg_fifo #(.DEPTH(64)) u_f (.clk, .rst_n, .wr(fwr), .wdata(fwdata), .rd(f_rd), .rdata(f_rdata),
    .flush(1'b0), .mark(f_mark), .rewind(1'b0), .empty(f_empty), .full(f_full), .count(f_count));
  msg_tx #(.CW(7)) dut (.clk, .rst_n, .word_en, .start, .fifo_empty(f_empty), .fifo_count(f_count),
    .fifo_rdata(f_rdata), .fifo_rd(f_rd), .fifo_mark(f_mark), .link_o, .busy, .done);

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic logic [7:0] ref_crc(input byte unsigned q[$]);
    logic [7:0] r = 0;
    foreach (q[i]) for (int b = 7; b >= 0; b--) begin
      logic fb = r[7] ^ q[i][b];
      r = {r[6:0], 1'b0};
      if (fb) r = r ^ 8'h07;
    end
    return r;
  endfunction

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // empty FIFO: nothing happens
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (20) begin @(negedge clk); chk(!link_o.valid && !busy, "idle on empty FIFO"); end
    for (int t = 0; t < 8; t++) begin
      automatic byte unsigned exp[$];
      automatic int n = $urandom_range(1, 20), slots = 0, got = 0;
      automatic bit seen_end = 0, saw_done = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk); fwr = 1; fwdata = 16'($urandom);
        exp.push_back(fwdata[15:8]); exp.push_back(fwdata[7:0]);
      end
      @(negedge clk); fwr = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!seen_end && slots < 200) begin
        @(posedge clk); if (done) saw_done = 1;
        if (word_en) begin
          slots++;
          #1;
          if (link_o.valid) begin
            if (got < exp.size()) begin
              chk(link_o.data == exp[got], "byte order/value");
              chk(link_o.ctl == (got == 0 ? CTL_BEGIN : CTL_DATA), "control code");
            end else begin
              chk(link_o.ctl == CTL_END, "end code");
              chk(link_o.data == ref_crc(exp), "CRC");
              seen_end = 1;
            end
            got++;
          end
        end
      end
      @(posedge clk); if (done) saw_done = 1;
      chk(seen_end && got == 2 * n + 1, "word count");
      chk(slots == 2 * n + 1, "one word per slot");
      chk(saw_done, "done pulse");
      chk(f_empty, "FIFO drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
