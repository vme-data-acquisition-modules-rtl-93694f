// vme_master_bfm: simple VME bus master for the testbenches.
//
// Runs single D16 read and write cycles and D08(O) interrupt acknowledge
// cycles: address, modifier and data are set up, AS* falls, then both data
// strobes; the cycle ends when DTACK* arrives (or after 'TMO' clocks, counted
// in 'timeouts'); then the strobes are released and the master waits for
// DTACK* to rise. 'cycles' counts clocks from strobe to DTACK* of the last
// cycle. 'read32' is a D32 read (LWORD* low), D31..D16 on 'dat_hi_i'.
// 'blt_read' runs a D16 block transfer (modifier 0x3B): the address is
// driven only for the first beat and then set to an unrelated value, AS*
// stays low, and each beat is one data-strobe handshake. Signals change on
// the falling clock edge.
module vme_master_bfm #(
  parameter int TMO = 200
) (
  input  logic        clk,
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic [5:0]  am,
  output logic        lword_n,
  output logic [23:1] addr,
  output logic [15:0] dat_o,
  output logic        iack_n,
  output logic        iackin_n,
  input  logic [15:0] dat_i,
  input  logic        dtack_n,
  input  logic [15:0] dat_hi_i
);
  int timeouts = 0;
  int cycles   = 0;
  logic [15:0] dat_hi_q;

  initial begin
    as_n = 1'b1; ds_n = 2'b11; write_n = 1'b1; am = 6'h39; addr = '0; dat_o = '0;
    iack_n = 1'b1; iackin_n = 1'b1; lword_n = 1'b1;
  end

  task automatic run(output logic ok, output logic [15:0] rd);
    int n = 0;
    @(negedge clk) as_n = 1'b0;
    @(negedge clk) ds_n = iack_n ? 2'b00 : 2'b10;
    while (dtack_n && n < TMO) begin @(negedge clk); n++; end
    ok = !dtack_n; cycles = n; rd = dat_i; dat_hi_q = dat_hi_i;
    if (!ok) timeouts++;
    @(negedge clk) begin ds_n = 2'b11; as_n = 1'b1; end
    n = 0;
    while (!dtack_n && n < TMO) begin @(negedge clk); n++; end
    write_n = 1'b1; iack_n = 1'b1; iackin_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic write(input logic [23:0] a, input logic [15:0] d, input logic [5:0] m = 6'h39);
    logic ok; logic [15:0] rd;
    @(negedge clk);
    addr = a[23:1]; dat_o = d; write_n = 1'b0; am = m;
    run(ok, rd);
  endtask

  task automatic read(input logic [23:0] a, output logic [15:0] d, input logic [5:0] m = 6'h39);
    logic ok;
    @(negedge clk);
    addr = a[23:1]; write_n = 1'b1; am = m;
    run(ok, d);
  endtask

  task automatic blt_read(input logic [23:0] a, input int n, output logic [15:0] d [$]);
    int k;
    d.delete();
    @(negedge clk);
    addr = a[23:1]; write_n = 1'b1; am = 6'h3B;
    @(negedge clk) as_n = 1'b0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) ds_n = 2'b00;
      k = 0;
      while (dtack_n && k < TMO) begin @(negedge clk); k++; end
      if (dtack_n) timeouts++;
      d.push_back(dat_i);
      addr = '1;
      @(negedge clk) ds_n = 2'b11;
      k = 0;
      while (!dtack_n && k < TMO) begin @(negedge clk); k++; end
    end
    @(negedge clk) as_n = 1'b1; am = 6'h39;
    @(negedge clk);
  endtask

  task automatic read32(input logic [23:0] a, output logic [31:0] d, input logic [5:0] m = 6'h39);
    logic ok; logic [15:0] lo;
    @(negedge clk);
    addr = a[23:1]; write_n = 1'b1; am = m; lword_n = 1'b0;
    run(ok, lo);
    d = {dat_hi_q, lo};
    lword_n = 1'b1;
  endtask

  task automatic iack(input logic [2:0] lvl, output logic ok, output logic [7:0] vec);
    logic [15:0] rd;
    @(negedge clk);
    addr = {20'h0, lvl}; write_n = 1'b1; iack_n = 1'b0; iackin_n = 1'b0;
    run(ok, rd);
    vec = rd[7:0];
  endtask
endmodule
