// loop_delay: cable loop delay counter of one CROC DAQ loop channel.
//
// Runs on 'clk8', eight times the RF clock (about 2.35 ns per count) and
// phase-locked to it. A rising edge of 'depart' (the test pulse leaving on
// the Reset & Test line, an RF-domain pulse) starts counting; the rising edge
// of the returned line 'arrive_line', brought in through two flip-flops,
// stops it. Counts of successive measurements add up, so several pulses can
// be averaged by dividing by their number; 'delay' saturates at 2^WIDTH-1
// and is cleared by 'clear' (Clear Status, an RF-domain level or pulse).
// Because the arrival goes through the two-flop synchroniser and an edge
// detector, 'delay' exceeds the true loop delay by two counts per pulse; the
// fixed offset cancels against the front-end's internal delay term in the
// propagation-delay calculation or can be subtracted in software. The 8x RF rate and 7-bit result follow the document;
// accumulation and saturation are this design's reading of it.
module loop_delay #(
  parameter int unsigned WIDTH = 7
) (
  input  logic             clk8,
  input  logic             rst_n,
  input  logic             depart,
  input  logic             arrive_line,
  input  logic             clear,
  output logic [WIDTH-1:0] delay,
  output logic             running
);
  logic dep_q, arr_s1, arr_s2, arr_q;

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n) begin
      dep_q <= 1'b0; arr_s1 <= 1'b0; arr_s2 <= 1'b0; arr_q <= 1'b0;
      delay <= '0; running <= 1'b0;
    end else begin
      dep_q  <= depart;
      arr_s1 <= arrive_line;
      arr_s2 <= arr_s1;
      arr_q  <= arr_s2;
      if (clear) begin
        delay <= '0; running <= 1'b0;
      end else if (depart && !dep_q) begin
        running <= 1'b1;
      end else if (running) begin
        if (delay != '1) delay <= delay + 1'b1;
        if (arr_s2 && !arr_q) running <= 1'b0;
      end
    end
  end
endmodule
