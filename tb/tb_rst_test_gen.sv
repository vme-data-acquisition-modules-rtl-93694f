// tb_rst_test_gen: measures the line pulse widths: test pulse 1 clock with a
// 'depart' marker, reset pulse RESET_CYCLES clocks (100 us at 53.1 MHz =
// 5310 at the default); requests during a pulse are ignored.
module tb_rst_test_gen;
  logic clk = 0, rst_n = 0, test = 0, reset = 0, line, depart;
  int checks = 0, failures = 0, width = 0, last_width = 0, ndep = 0, npulse = 0;

  rst_test_gen dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst_n) width = 0;
    else if (line) width++;
    else if (width != 0) begin last_width = width; width = 0; npulse++; end
    if (depart) ndep++;
  end

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); test = 1; @(negedge clk); test = 0;
    repeat (5) @(negedge clk);
    chk(last_width == 1 && ndep == 1, $sformatf("test width %0d", last_width));
    @(negedge clk); reset = 1; @(negedge clk); reset = 0;
    repeat (100) @(negedge clk);
    test = 1; @(negedge clk); test = 0;
    repeat (5400) @(negedge clk);
    chk(last_width == 5310, $sformatf("reset width %0d", last_width));
    chk(npulse == 2 && ndep == 1, "request during pulse ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
