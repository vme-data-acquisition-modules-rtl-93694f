// tb_crim_interrupter: register defaults (level 5, vectors 0x08..0x0F, GIE
// off), edge latching through the mask, IRQ line of the programmed level,
// priority order in IACK (input 0 first), clearing of the served bit and of
// GIE, write-one-to-clear, the 0x81 clear-all command, a level change and a
// reprogrammed vector.
module tb_crim_interrupter;
  import minerva_pkg::*;
  logic clk = 0, rst_n = 0, iack_req = 0, iack_hit;
  rbus_req_t req = RBUS_IDLE;
  logic [15:0] rdata;
  logic [7:0] irq_in = 0, iack_vec;
  logic [6:0] irq_n;
  logic [2:0] iack_lvl = 0;
  int checks = 0, failures = 0;

  crim_interrupter dut (.*);
  always #5 clk = ~clk;

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
  task automatic pulse(input int i);
    @(negedge clk); irq_in[i] = 1; @(negedge clk); irq_in[i] = 0;
  endtask
  task automatic ack(input logic [2:0] l, output bit hit, output logic [7:0] v);
    @(negedge clk); iack_lvl = l; #1 hit = iack_hit; v = iack_vec; iack_req = 1;
    @(negedge clk); iack_req = 0;
  endtask

  initial begin
    logic [15:0] d; bit hit; logic [7:0] v;
    repeat (3) @(negedge clk); rst_n = 1;
    rd(16'hF040, d); chk(d == 16'h0005, "IC default");
    for (int i = 0; i < 8; i++) begin rd(16'hF800 + 16'(2 * i), d); chk(d == 16'(8 + i), "VT default"); end
    pulse(3); rd(16'hF010, d); chk(d == 0, "masked input not latched");
    wr(16'hF000, 16'h00FF); wr(16'hF040, 16'h0085);
    chk(irq_n == 7'h7F, "no IRQ with nothing pending");
    pulse(3); pulse(1);
    rd(16'hF010, d); chk(d == 16'h000A, "pending bits");
    chk(irq_n == 7'b1101111, "IRQ5 low");
    ack(3'd4, hit, v); chk(!hit, "other level not served");
    ack(3'd5, hit, v); chk(hit && v == 8'h09, "input 1 served first");
    rd(16'hF040, d); chk(d == 16'h0005 && irq_n == 7'h7F, "GIE cleared after IACK");
    wr(16'hF040, 16'h0085);
    chk(irq_n == 7'b1101111, "IRQ again after re-enable");
    wr(16'hF806, 16'h00C7);
    ack(3'd5, hit, v); chk(hit && v == 8'hC7, "reprogrammed vector of input 3");
    rd(16'hF010, d); chk(d == 0, "all served");
    pulse(0); pulse(7); pulse(5);
    rd(16'hF010, d); chk(d == 16'h00A1, "three pending");
    wr(16'hF010, 16'h0080); rd(16'hF010, d); chk(d == 16'h0021, "write one clears");
    wr(16'hF020, 16'h0081); rd(16'hF010, d); chk(d == 0, "clear all");
    wr(16'hF040, 16'h0082); pulse(6);
    chk(irq_n == 7'b1111101, "IRQ2 after level change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
