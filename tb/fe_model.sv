// fe_model: behavioural model of a chain of MINERvA front-ends on one DAQ
// loop, for the testbenches.
//
// It receives the controller's words ('rx', sampled in 'word_en' clocks).
// When a message ends and its first byte (the front-end address) lies in
// 1..NFE, it waits RESP_DELAY clocks and answers with a message made of the
// same bytes except the last one inverted ("processed" data), followed by
// the CRC; if 'bad_crc' is set the CRC is inverted. Messages to other
// addresses get no answer. The Reset & Test line comes back after
// LOOP_DELAY_NS nanoseconds ('rt_in' to 'rt_out'). 'answers' counts answers.
module fe_model
  import minerva_pkg::*;
#(
  parameter int NFE        = 12,
  parameter int RESP_DELAY = 40,
  parameter int LOOP_DELAY_NS = 20
) (
  input  logic       clk,
  input  logic       word_en,
  input  link_word_t rx,
  output link_word_t tx,
  input  logic       rt_in,
  output logic       rt_out,
  input  logic       bad_crc
);
  byte unsigned buf_q[$];
  byte unsigned msg[$];
  int answers = 0;

  initial tx = LINK_IDLE;
  // delay line sampled every 0.25 ns
  logic [4*LOOP_DELAY_NS-1:0] dline = '0;
  always #0.25 dline = {dline[4*LOOP_DELAY_NS-2:0], rt_in};
  assign rt_out = dline[4*LOOP_DELAY_NS-1];

  function automatic byte unsigned crc_ref(byte unsigned q[$]);
    byte unsigned c = 0;
    foreach (q[i]) begin
      c ^= q[i];
      repeat (8) c = ((c & 8'h80) != 0) ? byte'((c << 1) ^ 8'h07) : byte'(c << 1);
    end
    return c;
  endfunction

  always @(posedge clk) if (word_en && rx.valid) begin
    if (rx.ctl == CTL_BEGIN) begin
      buf_q.delete(); buf_q.push_back(rx.data);
    end else if (rx.ctl == CTL_DATA) buf_q.push_back(rx.data);
    else if (rx.ctl == CTL_END) begin
      if (buf_q.size() > 0 && buf_q[0] >= 1 && buf_q[0] <= NFE) begin
        msg = buf_q;
        fork respond(msg); join_none
      end
    end
  end

  task automatic respond(byte unsigned m[$]);
    byte unsigned c;
    m[m.size()-1] = ~m[m.size()-1];
    c = crc_ref(m);
    if (bad_crc) c = ~c;
    repeat (RESP_DELAY) @(posedge clk);
    foreach (m[i]) begin
      do @(posedge clk); while (!word_en);
      tx <= '{valid: 1'b1, ctl: (i == 0) ? CTL_BEGIN : CTL_DATA, data: m[i]};
    end
    do @(posedge clk); while (!word_en);
    tx <= '{valid: 1'b1, ctl: CTL_END, data: c};
    do @(posedge clk); while (!word_en);
    tx <= LINK_IDLE;
    answers++;
  endtask
endmodule
