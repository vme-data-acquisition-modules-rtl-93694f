// tb_croc_timing: CROC common registers and timing. Checks TS0/RT0 read-back,
// channel reset and test pulses going only to masked channels, the fast
// command and MTM edges appearing as encoded frames, the delayed test pulse
// D+4 clocks after the external SGATE edge (2-flop synchroniser, edge
// detector, counter, output register) only when TE is set, no test pulse for
// a software SGATE, and the clock-mode output.
module tb_croc_timing;
  import minerva_pkg::*;
  logic clk = 0, rst_n = 0, sg = 0, cn = 0, tc = 0;
  rbus_req_t req = RBUS_IDLE;
  logic [15:0] rdata;
  logic tm_bit, clk_ext;
  logic [3:0] line_ph, ch_test, ch_reset;
  int checks = 0, failures = 0, cyc = 0, test_at = -1;
  logic [3:0] test_seen = 0, reset_seen = 0;
  logic [7:0] frames[$];

  croc_timing dut (.clk, .rst_n, .req, .rdata, .mtm_sgate(sg), .mtm_cnrst(cn), .mtm_tcalb(tc),
                   .tm_bit, .line_ph, .ch_test, .ch_reset, .clk_ext);
  always #5 clk = ~clk;

  int st = 0; logic [7:0] sh;
  always @(posedge clk) begin
    #1; cyc++;
    test_seen |= ch_test; reset_seen |= ch_reset;
    if (ch_test != 0 && test_at < 0) test_at = cyc;
    if (st == 0) begin if (tm_bit) st = 1; end
    else if (st <= 8) begin sh = {sh[6:0], tm_bit}; st++; end
    else begin frames.push_back(sh); st = 0; end
  end

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

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk); rst_n = 1;
    wr(16'hF000, 16'hFFFF); rd(16'hF000, d); chk(d == 16'h93FF && clk_ext, "TS0 bits");
    wr(16'hF000, 16'h1000 | 16'd20); rd(16'hF000, d); chk(d == 16'h1014 && !clk_ext, "TS0 value");
    wr(16'hF010, 16'h0305); rd(16'hF010, d); chk(d == 16'h0305, "RT0");
    wr(16'hF020, 16'h0202); repeat (3) @(negedge clk);
    chk(reset_seen == 4'b0011 && test_seen == 0, "reset to masked channels");
    wr(16'hF040, 16'h0404); repeat (3) @(negedge clk);
    chk(test_seen == 4'b0101, "test to masked channels");
    wr(16'hF020, 16'h0201); wr(16'hF040, 16'h0400);
    chk(reset_seen == 4'b0011, "wrong command word ignored");
    // external SGATE with TE: delayed test pulse
    test_at = -1; repeat (5) @(negedge clk);
    cyc = 0; sg = 1;
    repeat (40) @(negedge clk);
    chk(test_at == 20 + 4, $sformatf("test pulse delay %0d", test_at));
    sg = 0; repeat (20) @(negedge clk);
    // TE off
    wr(16'hF000, 16'd20); test_at = -1;
    sg = 1; repeat (40) @(negedge clk); sg = 0; repeat (20) @(negedge clk);
    chk(test_at < 0, "no test pulse with TE off");
    // software SGATE via fast command
    wr(16'hF000, 16'h1000 | 16'd5); test_at = -1;
    wr(16'hF030, 16'h00B1); repeat (30) @(negedge clk);
    chk(test_at < 0, "software SGATE gives no test pulse");
    cn = 1; @(negedge clk); cn = 0; repeat (20) @(negedge clk);
    tc = 1; @(negedge clk); tc = 0; repeat (20) @(negedge clk);
    chk(frames.size() == 7, $sformatf("frames %0d", frames.size()));
    if (frames.size() == 7)
      chk(frames[0] == 8'hB1 && frames[1] == 8'hD1 && frames[2] == 8'hB1 && frames[3] == 8'hD1 &&
          frames[4] == 8'hB1 && frames[5] == 8'hC5 && frames[6] == 8'h89, "frame codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
