// msg_tx: DAQ loop message transmitter (controller to serializer).
//
// On 'start' with a non-empty FIFO it sends the number of 16-bit words the
// FIFO holds at that moment, upper byte first (the VME big-endian order the
// document prescribes), one byte per word slot. 'word_en' marks a word slot
// (RF/4, 13.28 MHz); 'link_o' changes only in such a cycle and holds for the
// slot. The first byte carries the begin-of-message code; after the last
// data byte the CRC of all sent bytes follows with the end-of-message code.
// 'busy' is high from start to the CRC slot, 'done' pulses for one clock
// when the CRC word goes out. 'fifo_mark' pulses at start so that the owner
// can rewind the FIFO to re-send the same message.
// Message layout and byte order follow the document; the control-code values
// and the CRC polynomial are this design's choice (see minerva_pkg).
module msg_tx
  import minerva_pkg::*;
#(
  parameter int unsigned CW = 11   // width of the FIFO word count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          word_en,
  input  logic          start,
  input  logic          fifo_empty,
  input  logic [CW-1:0] fifo_count,
  input  logic [15:0]   fifo_rdata,
  output logic          fifo_rd,
  output logic          fifo_mark,
  output link_word_t    link_o,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_CRC} state_e;
  state_e        state;
  logic [CW-1:0] words_left;
  logic          hi, first;
  logic [7:0]    byte_out, crc;
  logic          crc_en, crc_clr;

  assign byte_out = hi ? fifo_rdata[15:8] : fifo_rdata[7:0];
  assign busy     = (state != S_IDLE);
  assign crc_en   = word_en && state == S_SEND;
  assign crc_clr  = start && state == S_IDLE;
  assign fifo_rd  = word_en && state == S_SEND && !hi;
  assign fifo_mark = start && state == S_IDLE && !fifo_empty;

  crc8 u_crc (.clk, .rst_n, .clear(crc_clr), .en(crc_en), .data(byte_out), .crc, .crc_next());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; words_left <= '0; hi <= 1'b1; first <= 1'b0;
      link_o <= LINK_IDLE; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (word_en) link_o <= LINK_IDLE;
          if (start && !fifo_empty) begin
            state <= S_SEND; words_left <= fifo_count; hi <= 1'b1; first <= 1'b1;
          end
        end
        S_SEND: if (word_en) begin
          link_o <= '{valid: 1'b1, ctl: first ? CTL_BEGIN : CTL_DATA, data: byte_out};
          first  <= 1'b0;
          hi     <= !hi;
          if (!hi) begin
            words_left <= words_left - 1'b1;
            if (words_left == CW'(1)) state <= S_CRC;
          end
        end
        S_CRC: if (word_en) begin
          link_o <= '{valid: 1'b1, ctl: CTL_END, data: crc};
          state  <= S_IDLE;
          done   <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
