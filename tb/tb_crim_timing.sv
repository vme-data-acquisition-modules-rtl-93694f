// tb_crim_timing: the CRIM timing module in each mode, with short repetition
// shifts (2^4 and 2^8 clocks per step). INT single sequence: CNRST one clock,
// SGATE GW x 8 clocks, TCALB TP clocks after the SGATE edge; periodic
// sequences at F x 16 and F x 256 clocks; MTM: sequence started by TCALB, no
// TCALB on the CROC output but on LEMO C, T input copied; EXT: LEMO inputs
// and software pulses to the outputs; DAQ: nothing; the gate time counter
// difference between two SGATEs; GR read/write.
module tb_crim_timing;
  import minerva_pkg::*;
  logic clk = 0, rst_n = 0, msg = 0, mcn = 0, mtc = 0;
  rbus_req_t req = RBUS_IDLE;
  logic [15:0] rdata;
  logic [3:0] lemo_in = 0, lemo_out;
  logic out_sgate, out_cnrst, out_tcalb, trig_in, mux_sgate, mux_cnrst, mux_tcalb, daq_mode;
  int checks = 0, failures = 0, cyc = 0;
  int cn_at[$], sg_rise_at[$], sg_fall_at[$], tc_at[$], lc_at[$], t_at[$];
  logic sg_q = 0;

  crim_timing #(.FAST_SHIFT(4), .SLOW_SHIFT(8)) dut (.clk, .rst_n, .req, .rdata, .mtm_sgate(msg),
    .mtm_cnrst(mcn), .mtm_tcalb(mtc), .lemo_in, .lemo_out, .out_sgate, .out_cnrst, .out_tcalb,
    .trig_in, .mux_sgate, .mux_cnrst, .mux_tcalb, .daq_mode);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    #1; cyc++;
    if (out_cnrst) cn_at.push_back(cyc);
    if (out_sgate && !sg_q) sg_rise_at.push_back(cyc);
    if (!out_sgate && sg_q) sg_fall_at.push_back(cyc);
    if (out_tcalb) tc_at.push_back(cyc);
    if (lemo_out[3]) lc_at.push_back(cyc);
    if (lemo_out[0]) t_at.push_back(cyc);
    sg_q = out_sgate;
  end

  task automatic clr();
    cn_at.delete(); sg_rise_at.delete(); sg_fall_at.delete(); tc_at.delete(); lc_at.delete(); t_at.delete();
  endtask
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
    logic [15:0] d, g0, g1;
    int t1, t2;
    repeat (3) @(negedge clk); rst_n = 1;
    chk(daq_mode, "no mode after reset");
    wr(16'hC0A0, 16'hBEEF); rd(16'hC0A0, d); chk(d == 16'hBEEF, "GR");
    // INT, single sequence
    wr(16'hC010, 16'h4000); wr(16'hC020, 16'h8003); wr(16'hC030, 16'd5);
    clr(); wr(16'hC080, 16'h0808); repeat (60) @(negedge clk);
    chk(cn_at.size() == 1 && sg_rise_at.size() == 1 && sg_fall_at.size() == 1 && tc_at.size() == 1,
        "one sequence");
    if (sg_rise_at.size() == 1 && cn_at.size() == 1 && sg_fall_at.size() == 1 && tc_at.size() == 1) begin
      chk(sg_rise_at[0] == cn_at[0] + 1, "SGATE after CNRST");
      chk(sg_fall_at[0] - sg_rise_at[0] == 24, $sformatf("gate width %0d", sg_fall_at[0] - sg_rise_at[0]));
      chk(tc_at[0] - sg_rise_at[0] == 6, $sformatf("TCALB delay %0d", tc_at[0] - sg_rise_at[0]));
    end
    chk(t_at.size() == 1, "trigger output at sequence start");
    // INT, periodic fast and slow
    clr(); wr(16'hC010, 16'h4003); repeat (200) @(negedge clk);
    chk(cn_at.size() >= 3 && cn_at[2] - cn_at[1] == 48, "period 3 x 16");
    clr(); wr(16'hC010, 16'h4200); repeat (1100) @(negedge clk);
    chk(cn_at.size() >= 2 && cn_at[1] - cn_at[0] == 512, "period 2 x 256");
    // MTM
    wr(16'hC010, 16'h8000); clr();
    mtc = 1; repeat (3) @(negedge clk); mtc = 0; repeat (60) @(negedge clk);
    chk(cn_at.size() == 1 && sg_rise_at.size() == 1, "MTM TCALB starts sequence");
    chk(tc_at.size() == 0 && lc_at.size() == 1, "TCALB only on LEMO C in MTM mode");
    clr(); lemo_in[0] = 1; repeat (5) @(negedge clk); lemo_in[0] = 0; repeat (60) @(negedge clk);
    chk(cn_at.size() == 1 && t_at.size() >= 5, "T input starts sequence and is copied");
    // gate time counter
    mcn = 1; @(negedge clk); mcn = 0;
    repeat (100) @(negedge clk); msg = 1; t1 = cyc; @(negedge clk); msg = 0;
    repeat (5) @(negedge clk); rd(16'hC0B0, g0);
    repeat (1000) @(negedge clk); msg = 1; t2 = cyc; @(negedge clk); msg = 0;
    repeat (5) @(negedge clk); rd(16'hC0B0, d); rd(16'hC0C0, g1);
    chk(d - g0 == 16'(t2 - t1) && g1 == 0 && g0 >= 99 && g0 <= 102, $sformatf("gate time difference %0d exp %0d g0 %0d g1 %0d", d - g0, t2 - t1, g0, g1));
    // EXT
    wr(16'hC010, 16'h2000); clr();
    lemo_in[1] = 1; repeat (10) @(negedge clk); lemo_in[1] = 0; repeat (5) @(negedge clk);
    chk(sg_rise_at.size() == 1 && sg_fall_at.size() == 1 && sg_fall_at[0] - sg_rise_at[0] == 10, "LEMO G to SGATE");
    clr(); wr(16'hC060, 16'h0401); repeat (7) @(negedge clk); wr(16'hC060, 16'h0402); repeat (3) @(negedge clk);
    chk(sg_rise_at.size() == 1 && sg_fall_at.size() == 1, "software SGATE");
    wr(16'hC080, 16'h0202); wr(16'hC050, 16'h0404); wr(16'hC040, 16'h0404); repeat (3) @(negedge clk);
    chk(cn_at.size() == 1 && tc_at.size() == 1 && t_at.size() == 1, "software CNRST, TCALB, trigger");
    // DAQ
    wr(16'hC010, 16'h1000); clr();
    lemo_in[1] = 1; wr(16'hC080, 16'h0808); repeat (40) @(negedge clk); lemo_in[1] = 0;
    chk(daq_mode && cn_at.size() == 0 && sg_rise_at.size() == 0, "DAQ mode: no outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
