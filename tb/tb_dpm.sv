// tb_dpm: byte-enable writes and one-clock-latency reads against a model,
// at the full 3K x 16 size.
module tb_dpm;
  logic clk = 0, we = 0;
  logic [11:0] waddr = 0, raddr = 0;
  logic [1:0] wbe = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [3072];
  int checks = 0, failures = 0;

  dpm dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 3072; i++) begin
      @(negedge clk); we = 1; waddr = 12'(i); wbe = 2'b11; wdata = 16'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); we = 1; waddr = 12'($urandom_range(0, 3071)); wbe = 2'($urandom); wdata = 16'($urandom);
      if (wbe[1]) model[waddr][15:8] = wdata[15:8];
      if (wbe[0]) model[waddr][7:0]  = wdata[7:0];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3072; i += 7) begin
      raddr = 12'(i); @(negedge clk);
      checks++; if (rdata !== model[i]) begin failures++; $display("FAIL %0d %h %h", i, rdata, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
