// tb_msg_fifo: random writes and reads against a queue model, full and empty
// flags at a small depth, flush, and mark/rewind replaying a message.
module tb_msg_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0, flush = 0, mark = 0, rewind = 0;
  logic [15:0] wdata = 0, rdata;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  msg_fifo #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      wr = $urandom_range(0, 1); rd = $urandom_range(0, 1); wdata = 16'($urandom);
      if (rd && q.size() > 0) chk(rdata == q[0], "head data");
      #1;
      @(posedge clk); #1;
      begin
        automatic bit acc_wr = wr && q.size() < D;
        if (rd && q.size() > 0) void'(q.pop_front());
        if (acc_wr) q.push_back(wdata);
      end
      chk(count == q.size(), "count");
      chk(empty == (q.size() == 0) && full == (q.size() == D), "flags");
    end
    @(negedge clk); wr = 0; rd = 0; flush = 1;
    @(negedge clk); flush = 0; q.delete();
    chk(empty && count == 0, "flush");
    for (int i = 0; i < D + 3; i++) begin @(negedge clk); wr = 1; wdata = 16'(i); end
    @(negedge clk); wr = 0;
    chk(full && count == D, "full at depth");
    // mark, read 5, rewind, read again
    @(negedge clk); mark = 1; @(negedge clk); mark = 0;
    for (int i = 0; i < 5; i++) begin chk(rdata == 16'(i), "first pass"); rd = 1; @(negedge clk); end
    rd = 0; rewind = 1; @(negedge clk); rewind = 0;
    chk(count == D, "count restored");
    for (int i = 0; i < 5; i++) begin chk(rdata == 16'(i), "replay"); rd = 1; @(negedge clk); end
    rd = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
