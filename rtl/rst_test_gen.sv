// rst_test_gen: driver of the "Reset & Test" line of one DAQ loop channel.
//
// The controller sends two kinds of pulse on the same LVDS pair: a short test
// pulse (TEST_CYCLES RF periods, one period = 18.8 ns, about the document's
// 20 ns) and a long front-end reset pulse (RESET_CYCLES, 5310 periods =
// 100 us at 53.1 MHz). 'test' or 'reset' (one-clock requests) start a pulse
// when the line is idle; requests while a pulse is on the line are ignored,
// and reset wins if both come together. 'line' is registered; 'depart'
// is high in the first cycle the line carries a test pulse, for the loop
// delay counter. Durations follow the document; the arbitration is this
// design's choice.
module rst_test_gen #(
  parameter int unsigned RESET_CYCLES = 5310,
  parameter int unsigned TEST_CYCLES  = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test,
  input  logic reset,
  output logic line,
  output logic depart
);
  localparam int unsigned CW = $clog2(RESET_CYCLES + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; line <= 1'b0; depart <= 1'b0;
    end else begin
      depart <= 1'b0;
      if (cnt != 0) begin
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) line <= 1'b0;
      end else if (reset) begin
        cnt <= CW'(RESET_CYCLES); line <= 1'b1;
      end else if (test) begin
        cnt <= CW'(TEST_CYCLES); line <= 1'b1; depart <= 1'b1;
      end
    end
  end
endmodule
