// tb_vme_slave: VME master cycles against the slave with a register model
// behind it. Checks write strobes (one per cycle, address and data), read
// data, DTACK* timing (read answered within 8 clocks), no answer for another
// board address or a modifier outside the list, the IACK response with the
// status ID for a matching level, IACKOUT* for a level not served, and a
// 16-beat block transfer whose address is counted by the slave, and D32
// reads (two words, the first on D31..D16).
module tb_vme_slave;
  import minerva_pkg::*;
  logic clk = 0, rst_n = 0;
  logic as_n, write_n, iack_n, iackin_n, dat_oe, dtack_n, iackout_n, iack_req, iack_hit;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [23:1] addr;
  logic lword_n;
  logic [15:0] s_dat_hi;
  logic [15:0] m_dat, s_dat, rdata;
  logic [2:0] iack_lvl;
  rbus_req_t req;
  int checks = 0, failures = 0, nwr = 0, niack = 0, iackout_seen = 0;
  logic [15:0] regs [256];
  logic [15:0] last_wa, last_wd;

  always #5 clk = ~clk;

  vme_master_bfm bfm (.clk, .as_n, .ds_n, .write_n, .am, .lword_n, .addr, .dat_o(m_dat), .iack_n,
                      .iackin_n, .dat_i(s_dat), .dat_hi_i(s_dat_hi), .dtack_n);
  vme_slave #(.HAS_IRQ(1'b1), .HAS_D32(1'b1)) dut (.clk, .rst_n, .board_sel(8'h5A), .as_n, .ds_n,
    .write_n, .am, .lword_n, .addr, .dat_hi_o(s_dat_hi),
    .dat_i(m_dat), .iack_n, .iackin_n, .dat_o(s_dat), .dat_oe, .dtack_n, .iackout_n, .req, .rdata,
    .iack_req, .iack_lvl, .iack_hit, .iack_vec(8'hC3));

  assign iack_hit = iack_lvl == 3'd5;
  always @(posedge clk) begin
    rdata <= regs[req.addr[8:1]];
    if (req.wr) begin nwr++; regs[req.addr[8:1]] <= req.wdata; last_wa <= req.addr; last_wd <= req.wdata; end
    if (iack_req && iack_hit) niack++;
    if (!iackout_n) iackout_seen++;
  end

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic [15:0] d, exp [256];
    logic ok; logic [7:0] vec;
    for (int i = 0; i < 256; i++) regs[i] = 16'h0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      automatic logic [7:0] w = 8'($urandom);
      automatic logic [15:0] v = 16'($urandom);
      bfm.write({8'h5A, 7'h0, w, 1'b0}, v, (i % 2) ? 6'h3D : 6'h39);
      chk(nwr == i + 1 && last_wa == {7'h0, w, 1'b0} && last_wd == v, "write strobe");
      bfm.read({8'h5A, 7'h0, w, 1'b0}, d);
      chk(d == v, "read back");
      chk(bfm.cycles <= 8, "read latency");
    end
    bfm.write(24'h5B0010, 16'h1234);
    chk(nwr == 20 && bfm.timeouts == 1, "other board ignored");
    bfm.write(24'h5A0010, 16'h1234, 6'h29);
    chk(nwr == 20 && bfm.timeouts == 2, "A16 modifier ignored");
    bfm.iack(3'd5, ok, vec);
    chk(ok && vec == 8'hC3 && niack == 1, "IACK answered with status ID");
    bfm.iack(3'd3, ok, vec);
    chk(!ok && iackout_seen > 0, "IACK passed down the chain");
    // block transfer: 16 beats from word 0x40, address counted in the slave
    for (int i = 0; i < 16; i++) bfm.write({8'h5A, 7'h0, 8'(8'h40 + i), 1'b0}, 16'(16'hB000 + i));
    begin
      automatic logic [15:0] q [$];
      automatic int t0 = bfm.timeouts;
      bfm.blt_read(24'h5A0080, 16, q);
      for (int i = 0; i < 16; i++) chk(q[i] == 16'(16'hB000 + i), $sformatf("block beat %0d got %h", i, q[i]));
      chk(bfm.timeouts == t0, "block transfer acknowledged");
      bfm.blt_read(24'h5B0080, 2, q);
      chk(bfm.timeouts == t0 + 2, "block transfer to another board ignored");
      bfm.read(24'h5A0082, d);
      chk(d == 16'hB001, "single cycle after block transfer");
      begin
        automatic logic [31:0] d32;
        bfm.read32(24'h5A0084, d32);
        chk(d32 == 32'hB002_B003 && bfm.timeouts == t0 + 2, $sformatf("D32 read %h", d32));
        bfm.read32(24'h5A0086, d32);
        chk(bfm.timeouts == t0 + 3, "D32 read at an odd word not answered");
        bfm.read(24'h5A0088, d);
        chk(d == 16'hB004 && s_dat_hi == 16'h0, "D16 read after D32");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
