// msg_rx: DAQ loop message receiver (deserializer to Dual Port Memory).
//
// Every received byte of a message is stored in the DPM at the byte write
// pointer, first byte in bits 15:8 of a 16-bit word. Two bytes in front of
// each message are reserved: when the end-of-message word (the CRC byte)
// arrives, the message length in bytes, counting the length word itself, is
// written there, and the next message starts right behind. The CRC byte is
// compared with the CRC of the received bytes and is not stored. The pointer
// always points past the reserved slot of the next message, so after a
// pointer reset it reads 2, and the bytes of all stored messages are the
// pointer minus two. 'dpm_full' is high while the pointer is at or past the
// last DPM byte; bytes beyond the end are dropped.
// In trigger mode ('trig_mode') regular messages are not stored; the byte of
// each trigger word is stored at the pointer instead, with no length words,
// starting from 0 after a pointer reset. 'trig_det' pulses for every trigger
// word in any mode.
// Timing: 'link_i' is sampled in 'word_en' cycles; msg_done, crc_err and
// trig_det are one-clock pulses in the cycle after that sample.
// The storage format follows the document; trigger word coding and the
// trigger-mode pointer start are this design's choice.
module msg_rx
  import minerva_pkg::*;
#(
  parameter int unsigned DPM_BYTES = 6144,
  localparam int unsigned AW = $clog2(DPM_BYTES/2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          word_en,
  input  link_word_t    link_i,
  input  logic          trig_mode,
  input  logic          reset_ptr,
  output logic          dpm_we,
  output logic [AW-1:0] dpm_waddr,
  output logic [1:0]    dpm_wbe,
  output logic [15:0]   dpm_wdata,
  output logic [15:0]   ptr,
  output logic          in_msg,
  output logic          msg_done,
  output logic          crc_err,
  output logic          dpm_full,
  output logic          trig_det
);
  logic [15:0] base;
  logic [7:0]  crc;
  logic        take, is_begin, is_data, is_end, is_trig;
  logic [15:0] next_base;

  assign take     = word_en && link_i.valid;
  assign is_begin = take && link_i.ctl == CTL_BEGIN;
  assign is_data  = take && link_i.ctl == CTL_DATA && in_msg;
  assign is_end   = take && link_i.ctl == CTL_END && in_msg;
  assign is_trig  = take && link_i.ctl == CTL_TRIG;
  assign dpm_full = (ptr >= 16'(DPM_BYTES - 1));
  assign next_base = (ptr + 16'd1) & 16'hFFFE;

  crc8 u_crc (.clk, .rst_n, .clear(is_begin), .en(is_begin || is_data),
              .data(link_i.data), .crc, .crc_next());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= 16'd2; base <= 16'd0; in_msg <= 1'b0;
      dpm_we <= 1'b0; dpm_waddr <= '0; dpm_wbe <= 2'b00; dpm_wdata <= 16'h0;
      msg_done <= 1'b0; crc_err <= 1'b0; trig_det <= 1'b0;
    end else begin
      dpm_we <= 1'b0; msg_done <= 1'b0; crc_err <= 1'b0; trig_det <= 1'b0;
      if (reset_ptr) begin
        ptr    <= trig_mode ? 16'd0 : 16'd2;
        base   <= 16'd0;
        in_msg <= 1'b0;
      end else if (is_begin || is_data) begin
        in_msg <= 1'b1;
        if (!trig_mode) begin
          if (ptr < 16'(DPM_BYTES)) begin
            dpm_we    <= 1'b1;
            dpm_waddr <= ptr[AW:1];
            dpm_wbe   <= ptr[0] ? 2'b01 : 2'b10;
            dpm_wdata <= {link_i.data, link_i.data};
          end
          ptr <= (ptr < 16'(DPM_BYTES)) ? ptr + 16'd1 : ptr;
        end
      end else if (is_end) begin
        in_msg   <= 1'b0;
        msg_done <= 1'b1;
        crc_err  <= (link_i.data != crc);
        if (!trig_mode) begin
          dpm_we    <= 1'b1;
          dpm_waddr <= base[AW:1];
          dpm_wbe   <= 2'b11;
          dpm_wdata <= ptr - base;
          base      <= next_base;
          ptr       <= (next_base < 16'(DPM_BYTES - 1)) ? next_base + 16'd2 : 16'(DPM_BYTES);
        end
      end else if (is_trig) begin
        trig_det <= 1'b1;
        if (trig_mode) begin
          if (ptr < 16'(DPM_BYTES)) begin
            dpm_we    <= 1'b1;
            dpm_waddr <= ptr[AW:1];
            dpm_wbe   <= ptr[0] ? 2'b01 : 2'b10;
            dpm_wdata <= {link_i.data, link_i.data};
            ptr       <= ptr + 16'd1;
          end
        end
      end
    end
  end
endmodule
