// tb_timing_decoder: sends frames bit by bit (start 1, 8 bits MSB first,
// closing 1) with random gaps and checks every command comes out once, in
// order, one clock after its closing bit; a frame without closing bit is
// dropped.
module tb_timing_decoder;
  logic clk = 0, rst_n = 0, tm_bit = 0;
  logic [7:0] cmd;
  logic cmd_valid;
  int checks = 0, failures = 0, nvalid = 0;
  logic [7:0] exp[$];

  timing_decoder dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic frame(input logic [7:0] c, input bit good);
    logic [9:0] f = {1'b1, c, good};
    for (int i = 9; i >= 0; i--) begin tm_bit = f[i]; @(negedge clk); end
    tm_bit = 0;
    chk(cmd_valid == good, "valid one clock after closing bit");
    if (good) chk(cmd == c, "command value");
    repeat ($urandom_range(1, 4)) @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n && cmd_valid) nvalid++;

  initial begin
    automatic logic [7:0] codes [6] = '{8'hB1, 8'hD1, 8'hC5, 8'h89, 8'h8D, 8'hC9};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 6; i++) frame(codes[i], 1);
    frame(8'hB1, 0);
    for (int i = 0; i < 20; i++) frame({1'b1, 7'($urandom)}, 1);
    chk(nvalid == 26, "one valid per good frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
