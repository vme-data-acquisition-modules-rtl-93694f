// tb_crc8: checks the CRC-8 accumulator against the standard check value
// (CRC-8/x^8+x^2+x+1 of "123456789" is 0xF4) and against a bit-serial
// reference on random byte strings, including restart with 'clear'.
module tb_crc8;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0] data = 0, crc, crc_next;
  int checks = 0, failures = 0;

  crc8 dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] ref_crc(input byte unsigned q[$]);
    logic [7:0] r = 0;
    foreach (q[i]) for (int b = 7; b >= 0; b--) begin
      logic fb = r[7] ^ q[i][b];
      r = {r[6:0], 1'b0};
      if (fb) r = r ^ 8'h07;
    end
    return r;
  endfunction

  task automatic check(input logic [7:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic run(input byte unsigned q[$]);
    foreach (q[i]) begin
      @(negedge clk); en = 1; data = q[i]; clear = (i == 0);
    end
    @(negedge clk); en = 0; clear = 0;
  endtask

  initial begin
    byte unsigned s[$];
    repeat (2) @(negedge clk); rst_n = 1;
    s = '{8'h31,8'h32,8'h33,8'h34,8'h35,8'h36,8'h37,8'h38,8'h39};
    run(s); check(crc, 8'hF4, "check value");
    for (int t = 0; t < 50; t++) begin
      s.delete();
      repeat ($urandom_range(1, 30)) s.push_back(8'($urandom));
      run(s); check(crc, ref_crc(s), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
