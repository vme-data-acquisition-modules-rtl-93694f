// tb_loop_delay: clk8 is 8x the RF clock. A test pulse departs on the RF
// clock and the line comes back after a known number of clk8 periods; the
// count must be that number plus two (synchroniser offset), must add up over
// several pulses, saturate at 127 and clear on 'clear'.
module tb_loop_delay;
  logic clk = 0, clk8 = 0, rst_n = 0, depart = 0, arrive_line = 0, clear = 0;
  logic [6:0] delay;
  logic running;
  int checks = 0, failures = 0;

  loop_delay dut (.clk8, .rst_n, .depart, .arrive_line, .clear, .delay, .running);
  always #1 clk8 = ~clk8;
  always #8 clk = ~clk;

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // pulse leaves at an RF rising edge, returns 'd' clk8 periods later
  task automatic shot(input int d);
    @(posedge clk); #0.1 depart = 1;
    fork
      begin #(2.0 * d); arrive_line = 1; #16 arrive_line = 0; end
      begin @(posedge clk); #0.1 depart = 0; end
    join
    repeat (4) @(posedge clk);
  endtask

  task automatic do_clear();
    @(posedge clk); #0.1 clear = 1; @(posedge clk); #0.1 clear = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      automatic int d = $urandom_range(3, 60);
      do_clear();
      shot(d);
      chk(delay == 7'(d + 2), $sformatf("single shot d=%0d got %0d", d, delay));
      chk(!running, "stopped");
    end
    do_clear();
    shot(10); shot(12); shot(14);
    chk(delay == 7'(12 + 14 + 16), $sformatf("accumulate got %0d", delay));
    shot(60); shot(60);
    chk(delay == 7'd127, "saturate");
    do_clear();
    @(posedge clk);
    chk(delay == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
