// tb_timing_encoder: drives MTM level changes and fast commands and decodes
// the bit stream independently: frames are a 1, eight command bits and a
// closing 1. Checks the Table 1 codes for SGATE rise/fall, CNRST, TCALB, the
// priority order when requests coincide, fast commands, the latency (start
// bit 3 clocks after the input edge) and the 4-phase line waveform.
module tb_timing_encoder;
  logic clk = 0, rst_n = 0, sg = 0, cn = 0, tc = 0, fc_wr = 0;
  logic [7:0] fc_data = 0, sent_cmd;
  logic tm_bit, busy, sent;
  logic [3:0] line_ph;
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  int first_start = -1, cyc = 0;

  timing_encoder dut (.clk, .rst_n, .mtm_sgate(sg), .mtm_cnrst(cn), .mtm_tcalb(tc), .fc_wr, .fc_data,
                      .tm_bit, .line_ph, .busy, .sent_cmd, .sent);
  always #5 clk = ~clk;

  // independent frame decoder
  int st = 0; logic [7:0] sh;
  always @(posedge clk) if (rst_n) begin
    #1; cyc++;
    if (st == 0) begin if (tm_bit) begin st = 1; if (first_start < 0) first_start = cyc; end end
    else if (st <= 8) begin sh = {sh[6:0], tm_bit}; st++; end
    else begin if (tm_bit) got.push_back(sh); else got.push_back(8'h00); st = 0; end
    checks++;
    if (line_ph !== (tm_bit ? 4'b1110 : 4'b1100)) begin failures++; $display("FAIL line_ph"); end
  end

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    cyc = 0; sg = 1;
    repeat (20) @(negedge clk);
    chk(first_start == 3, $sformatf("latency %0d", first_start));
    sg = 0; repeat (20) @(negedge clk);
    cn = 1; tc = 1; @(negedge clk); cn = 0; tc = 0;
    repeat (30) @(negedge clk);
    fc_wr = 1; fc_data = 8'h8D; @(negedge clk); fc_wr = 0;
    repeat (20) @(negedge clk);
    fc_wr = 1; fc_data = 8'hC9; sg = 1; @(negedge clk); fc_wr = 0;
    repeat (40) @(negedge clk);
    chk(got.size() == 7, $sformatf("frame count %0d", got.size()));
    if (got.size() == 7) begin
      chk(got[0] == 8'hB1, "SGATE_H");
      chk(got[1] == 8'hD1, "SGATE_L");
      chk(got[2] == 8'hC5, "CNRST_H first");
      chk(got[3] == 8'h89, "TCALB_H second");
      chk(got[4] == 8'h8D, "fast command");
      chk(got[5] == 8'hB1, "SGATE before fast command");
      chk(got[6] == 8'hC9, "queued fast command");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
