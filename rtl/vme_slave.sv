// vme_slave: A24 VME slave interface shared by the CROC and the CRIM.
//
// The board answers in the 64 KB window whose A23..A16 equal the 8-bit
// switch 'board_sel', for the address modifiers set in AM_MASK (bit n set =
// modifier n accepted). AS* and DS1*/DS0* are brought in through two
// flip-flops; the address, data, WRITE* and AM lines are stable while a data
// strobe is low, as the VME protocol requires, and are read directly.
// A write gives a one-clock 'req.wr' with the address and data, then DTACK*.
// A read gives a one-clock 'req.rd'; 'rdata' is taken RD_LAT clocks later and
// driven on the data bus with DTACK*. DTACK* is released when both data
// strobes are high again. Only D16 transfers are decoded (the byte lanes are
// not looked at).
// Block transfers (modifiers 0x3B and 0x3F): the first data strobe of the
// cycle is decoded as above; while AS* stays low, each further data strobe
// addresses the next 16-bit word, counted inside the slave, since the
// master need not keep the address valid. A board not selected at the start
// of a cycle ignores the bus until AS* rises.
// D32 reads (HAS_D32 = 1): with LWORD* low, A1 low and both data strobes
// low, the slave makes two register reads, of the addressed word and the
// next one, and drives them on D31..D16 ('dat_hi_o') and D15..D0; in a block
// transfer the address then advances by four bytes per beat. D32 writes and,
// with HAS_D32 = 0, all D32 cycles are not answered.
// Interrupt acknowledge (HAS_IRQ = 1): when IACK* and IACKIN* are low and a
// data strobe falls, the level on A3..A1 is offered to the interrupter
// ('iack_req', 'iack_lvl'); if it answers 'iack_hit' in the same clock, its
// 8-bit status ID goes on D7..D0 with DTACK* (a D08(O) response), otherwise
// IACKOUT* is driven low until AS* rises, passing the acknowledge down the
// daisy chain. With HAS_IRQ = 0 every acknowledge is passed on.
// The addressing scheme and modifiers follow the document; the handshake
// timing is this design's own.
module vme_slave
  import minerva_pkg::*;
#(
  parameter logic [63:0] AM_MASK = 64'hEE00_0000_0000_0000, // 0x3F,0x3E,0x3D,0x3B,0x3A,0x39
  parameter bit          HAS_IRQ = 1'b0,
  parameter bit          HAS_D32 = 1'b0,
  parameter int unsigned RD_LAT  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_sel,
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic        lword_n,
  input  logic [23:1] addr,
  input  logic [15:0] dat_i,
  input  logic        iack_n,
  input  logic        iackin_n,
  output logic [15:0] dat_o,
  output logic [15:0] dat_hi_o,
  output logic        dat_oe,
  output logic        dtack_n,
  output logic        iackout_n,
  output rbus_req_t   req,
  input  logic [15:0] rdata,
  output logic        iack_req,
  output logic [2:0]  iack_lvl,
  input  logic        iack_hit,
  input  logic [7:0]  iack_vec
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_ACK, S_PASS, S_WAIT, S_RD2} state_e;
  state_e state;
  logic [1:0] as_s, ds0_s, ds1_s;
  logic       as_l, ds_l, ds_all_high, sel;
  logic [3:0] lat;
  logic       blt_on;       // inside a block transfer to this board
  logic [15:1] blt_addr;    // next word of the block transfer
  logic [15:1] a_use;
  logic       blk_am;
  logic       d32, d32_q;   // this data strobe is / the cycle was a D32 access
  logic [15:1] a2;          // second word of a D32 read

  assign d32    = !lword_n && !ds0_s[1] && !ds1_s[1];

  assign blk_am = (am == 6'h3B) || (am == 6'h3F);
  assign a_use  = blt_on ? blt_addr : addr[15:1];

  assign as_l        = !as_s[1];
  assign ds_l        = !ds0_s[1] || !ds1_s[1];
  assign ds_all_high = ds0_s[1] && ds1_s[1];
  assign sel         = (addr[23:16] == board_sel) && AM_MASK[am] && iack_n;
  assign iack_lvl    = addr[3:1];
  assign iack_req    = HAS_IRQ && state == S_IDLE && as_l && ds_l && !iack_n && !iackin_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= 2'b11; ds0_s <= 2'b11; ds1_s <= 2'b11;
      state <= S_IDLE; req <= RBUS_IDLE; dat_o <= 16'h0; dat_oe <= 1'b0;
      dtack_n <= 1'b1; iackout_n <= 1'b1; lat <= '0;
      blt_on <= 1'b0; blt_addr <= '0; dat_hi_o <= 16'h0; d32_q <= 1'b0; a2 <= '0;
    end else begin
      as_s  <= {as_s[0], as_n};
      ds0_s <= {ds0_s[0], ds_n[0]};
      ds1_s <= {ds1_s[0], ds_n[1]};
      req.wr <= 1'b0; req.rd <= 1'b0;
      case (state)
        S_IDLE: if (!as_l) blt_on <= 1'b0;
        else if (ds_l) begin
          if (!iack_n) begin
            if (iackin_n) state <= S_IDLE;   // wait for IACKIN* from the board ahead
            else if (iack_req && iack_hit) begin
              dat_o <= {8'h00, iack_vec}; state <= S_ACK; dat_oe <= 1'b1; dtack_n <= 1'b0;
            end else begin
              iackout_n <= 1'b0; state <= S_PASS;
            end
          end else if ((sel || blt_on) && d32 && (!HAS_D32 || !write_n || a_use[1])) begin
            state <= S_WAIT;            // D32 cycle this board does not answer
          end else if (sel || blt_on) begin
            req.addr  <= {a_use, 1'b0};
            blt_addr  <= a_use + (d32 ? 15'd2 : 15'd1);
            d32_q     <= d32;
            if (!d32) dat_hi_o <= 16'h0;
            a2        <= a_use + 1'b1;
            if (!blt_on) blt_on <= blk_am;
            req.wdata <= dat_i;
            if (!write_n) begin
              req.wr <= 1'b1; state <= S_ACK; dtack_n <= 1'b0;
            end else begin
              req.rd <= 1'b1; state <= S_RD; lat <= 4'(RD_LAT);
            end
          end else state <= S_WAIT;
        end
        S_RD: begin
          lat <= lat - 1'b1;
          if (lat == 4'd1) begin
            if (d32_q) begin
              dat_hi_o <= rdata; req.rd <= 1'b1; req.addr <= {a2, 1'b0};
              lat <= 4'(RD_LAT); state <= S_RD2;
            end else begin
              dat_o <= rdata; dat_oe <= 1'b1; dtack_n <= 1'b0; state <= S_ACK;
            end
          end
        end
        S_RD2: begin
          lat <= lat - 1'b1;
          if (lat == 4'd1) begin
            dat_o <= rdata; dat_oe <= 1'b1; dtack_n <= 1'b0; state <= S_ACK;
          end
        end
        S_ACK: if (ds_all_high) begin
          dtack_n <= 1'b1; dat_oe <= 1'b0; state <= S_IDLE;
        end
        S_PASS: if (!as_l) begin
          iackout_n <= 1'b1; state <= S_IDLE;
        end
        S_WAIT: if (!as_l) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
