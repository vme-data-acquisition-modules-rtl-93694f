// crim_interrupter: eight-input VME D08(O) interrupter of the CRIM.
//
// A rising edge on an input whose mask bit is set latches its pending bit.
// While the global enable GIE is set and any bit is pending, the IRQ line of
// the programmed level (1..7, 5 after reset) is pulled low. In the
// acknowledge cycle for that level the status ID of the highest-priority
// pending input (input 0 highest) is returned, that pending bit is cleared
// and GIE drops to 0; software re-enables it.
// Registers (byte offsets in the module window):
//   0xF000 R/W IM  bits 7:0 mask, 1 = input enabled (0 after reset)
//   0xF010 R/W IS  bits 7:0 pending; writing 1 to a bit clears it
//   0xF020 W   CP  0x81 clears all pending bits
//   0xF040 R/W IC  bit 7 GIE, bits 2:0 level
//   0xF800 + 2i R/W VT status ID of input i (8 + i after reset)
// 'irq_n[k]' is IRQ(k+1)*. 'iack_hit' and 'iack_vec' are combinational
// answers to 'iack_lvl'; 'iack_req' is the one-clock strobe of the cycle.
// Read data is valid one clock after 'req.rd'.
// The behaviour and registers follow the document; the vector table is placed
// at 0xF800 + 2i as in the module map (another table of the specification
// puts the entries 0x10 higher), and masked inputs are not latched.
module crim_interrupter
  import minerva_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  rbus_req_t   req,
  output logic [15:0] rdata,
  input  logic [7:0]  irq_in,
  output logic [6:0]  irq_n,
  input  logic        iack_req,
  input  logic [2:0]  iack_lvl,
  output logic        iack_hit,
  output logic [7:0]  iack_vec
);
  logic [7:0] im, is_q, in_q;
  logic       gie;
  logic [2:0] il;
  logic [7:0] vt [8];
  logic [2:0] top;
  logic       any;

  always_comb begin
    top = 3'd0;
    any = |is_q;
    for (int i = 7; i >= 0; i--)
      if (is_q[i]) top = 3'(i);
  end

  assign iack_hit = gie && any && iack_lvl == il;
  assign iack_vec = vt[top];

  always_comb begin
    irq_n = 7'h7F;
    if (gie && any && il != 3'd0) irq_n[il - 3'd1] = 1'b0;
  end

  logic wr_im, wr_is, wr_cp, wr_ic, wr_vt;
  assign wr_im = req.wr && req.addr == 16'hF000;
  assign wr_is = req.wr && req.addr == 16'hF010;
  assign wr_cp = req.wr && req.addr == 16'hF020 && req.wdata[7:0] == 8'h81;
  assign wr_ic = req.wr && req.addr == 16'hF040;
  assign wr_vt = req.wr && req.addr[15:4] == 12'hF80;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      im <= 8'h00; is_q <= 8'h00; in_q <= 8'h00; gie <= 1'b0; il <= 3'd5;
      for (int i = 0; i < 8; i++) vt[i] <= 8'(8 + i);
    end else begin
      logic [7:0] nxt;
      in_q <= irq_in;
      nxt = is_q | (irq_in & ~in_q & im);
      if (wr_is) nxt = nxt & ~req.wdata[7:0];
      if (wr_cp) nxt = 8'h00;
      if (iack_req && iack_hit) begin
        nxt[top] = 1'b0;
        gie <= 1'b0;
      end else if (wr_ic) begin
        gie <= req.wdata[7];
      end
      is_q <= nxt;
      if (wr_im) im <= req.wdata[7:0];
      if (wr_ic) il <= req.wdata[2:0];
      if (wr_vt) vt[req.addr[3:1]] <= req.wdata[7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= 16'h0;
    else if (req.rd) begin
      if      (req.addr == 16'hF000)        rdata <= {8'h00, im};
      else if (req.addr == 16'hF010)        rdata <= {8'h00, is_q};
      else if (req.addr == 16'hF040)        rdata <= {8'h00, gie, 4'h0, il};
      else if (req.addr[15:4] == 12'hF80)   rdata <= {8'h00, vt[req.addr[3:1]]};
      else                                  rdata <= 16'h0;
    end else rdata <= 16'h0;
  end
endmodule
