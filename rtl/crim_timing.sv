// crim_timing: timing module of the CRIM (mode select, sequencer, signal
// multiplexer, gate time counter).
//
// Four modes, set by TS bits 15:12: 0x8 MTM, 0x4 INT, 0x2 EXT, 0x1 DAQ (any
// other value behaves like DAQ: no timing output).
//  * MTM: the sequencer is started by a rising MTM TCALB, by the trigger input
//    T, or by the single-sequence command; SGATE and CNRST go to the CROC
//    outputs, TCALB only to LEMO output C (if GW bit 15 TC is set); LEMO
//    output T copies the T input.
//  * INT: the sequencer runs periodically at the rate set by TS bits 11:0, or
//    once per single-sequence command when they are zero; all three signals
//    go to the CROC outputs.
//  * EXT: SGATE, CNRST and TCALB come from LEMO inputs G, R, C (synchronised to
//    the clock, so widths become whole clock periods) or from the software
//    registers GS0, CR and SP.
//  * DAQ: no timing outputs (the DAQ loop test module is in use).
// A sequence is a one-clock CNRST, then SGATE for GW[6:0] x GATE_STEP clocks
// (150.6 ns steps), and, if TC is set, a one-clock TCALB TP[9:0] clocks after
// the SGATE rising edge when that falls inside the gate.
// Repetition period: TS[11:8] x 2^SLOW_SHIFT clocks when TS[11:8] is not 0
// (about 0.4-6 Hz), else TS[7:0] x 2^FAST_SHIFT clocks (52 kHz down to 200 Hz).
// A 28-bit counter runs on the clock, is cleared by the MTM CNRST rising
// edge and is latched by the MTM SGATE rising edge into GT0/GT1.
// Registers (byte offsets): 0xC010 TS, 0xC020 GW, 0xC030 TP, 0xC040 ST
// (0x0404: one-clock trigger output pulse), 0xC050 SP (0x0404: TCALB pulse,
// EXT), 0xC060 GS0 (0x0401 SGATE on, 0x0402 off, EXT), 0xC080 CR (0x0202
// CNRST pulse in EXT, 0x0808 single sequence in INT/MTM with TS[11:0] = 0),
// 0xC0A0 GR general purpose, 0xC0B0 GT0, 0xC0C0 GT1. Read data one clock
// after the strobe. Modes, registers and pulse steps follow the document; the
// rate formula and the sequence order are this design's reading of it.
module crim_timing
  import minerva_pkg::*;
#(
  parameter int unsigned FAST_SHIFT = 10,
  parameter int unsigned SLOW_SHIFT = 23,
  parameter int unsigned GATE_STEP  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rbus_req_t   req,
  output logic [15:0] rdata,
  input  logic        mtm_sgate,
  input  logic        mtm_cnrst,
  input  logic        mtm_tcalb,
  input  logic [3:0]  lemo_in,     // 0 T, 1 G, 2 R, 3 C
  output logic [3:0]  lemo_out,    // 0 T, 1 G, 2 R, 3 C
  output logic        out_sgate,
  output logic        out_cnrst,
  output logic        out_tcalb,
  output logic        trig_in,     // synchronised T input, to interrupter input 0
  output logic        mux_sgate,
  output logic        mux_cnrst,
  output logic        mux_tcalb,
  output logic        daq_mode
);
  localparam int unsigned PW = SLOW_SHIFT + 4;
  localparam int unsigned GW_W = $clog2(127 * GATE_STEP + 1);

  typedef enum logic [1:0] {Q_IDLE, Q_CNRST, Q_GATE} seq_e;

  logic [15:0] ts, gw, tp, gr;
  logic [1:0]  ms_s, mc_s, mt_s;
  logic [1:0]  li_s [4];
  logic        ms_q, mc_q, mt_q, t_q;
  logic        sw_gate, sw_cnrst, sw_tcalb, st_pulse;
  logic [27:0] tcount, gtime;
  logic [PW-1:0] pcnt;
  seq_e        seq;
  logic [GW_W-1:0] gcnt;
  logic        seq_sgate, seq_cnrst, seq_tcalb;

  logic m_mtm, m_int, m_ext;
  assign m_mtm    = ts[15:12] == 4'h8;
  assign m_int    = ts[15:12] == 4'h4;
  assign m_ext    = ts[15:12] == 4'h2;
  assign daq_mode = !(m_mtm || m_int || m_ext);

  logic wr_ts, wr_gw, wr_tp, wr_st, wr_sp, wr_gs_on, wr_gs_off, wr_crn, wr_single, wr_gr;
  assign wr_ts     = req.wr && req.addr == 16'hC010;
  assign wr_gw     = req.wr && req.addr == 16'hC020;
  assign wr_tp     = req.wr && req.addr == 16'hC030;
  assign wr_st     = req.wr && req.addr == 16'hC040 && req.wdata == CMD_PULSE;
  assign wr_sp     = req.wr && req.addr == 16'hC050 && req.wdata == CMD_PULSE;
  assign wr_gs_on  = req.wr && req.addr == 16'hC060 && req.wdata == 16'h0401;
  assign wr_gs_off = req.wr && req.addr == 16'hC060 && req.wdata == 16'h0402;
  assign wr_crn    = req.wr && req.addr == 16'hC080 && req.wdata == CMD_CHRESET;
  assign wr_single = req.wr && req.addr == 16'hC080 && req.wdata == 16'h0808;
  assign wr_gr     = req.wr && req.addr == 16'hC0A0;

  // periodic rate
  logic [PW-1:0] period;
  always_comb begin
    if (ts[11:8] != 4'h0) period = PW'(ts[11:8]) << SLOW_SHIFT;
    else                  period = PW'(ts[7:0])  << FAST_SHIFT;
  end
  logic tick;
  assign tick = (ts[11:0] != 12'h0) && pcnt >= period - 1'b1;

  logic t_rise, mt_rise, seq_start;
  assign trig_in  = li_s[0][1];
  assign t_rise   = trig_in && !t_q;
  assign mt_rise  = mt_s[1] && !mt_q;
  assign seq_start = seq == Q_IDLE && (
      (m_int && (tick || (wr_single && ts[11:0] == 12'h0))) ||
      (m_mtm && (mt_rise || t_rise || (wr_single && ts[11:0] == 12'h0))));

  assign seq_cnrst = seq == Q_CNRST;
  assign seq_sgate = seq == Q_GATE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= '0; gw <= '0; tp <= '0; gr <= '0;
      ms_s <= '0; mc_s <= '0; mt_s <= '0; ms_q <= 1'b0; mc_q <= 1'b0; mt_q <= 1'b0; t_q <= 1'b0;
      for (int i = 0; i < 4; i++) li_s[i] <= '0;
      sw_gate <= 1'b0; sw_cnrst <= 1'b0; sw_tcalb <= 1'b0; st_pulse <= 1'b0;
      tcount <= '0; gtime <= '0; pcnt <= '0; seq <= Q_IDLE; gcnt <= '0; seq_tcalb <= 1'b0;
    end else begin
      ms_s <= {ms_s[0], mtm_sgate}; mc_s <= {mc_s[0], mtm_cnrst}; mt_s <= {mt_s[0], mtm_tcalb};
      ms_q <= ms_s[1]; mc_q <= mc_s[1]; mt_q <= mt_s[1]; t_q <= trig_in;
      for (int i = 0; i < 4; i++) li_s[i] <= {li_s[i][0], lemo_in[i]};
      if (wr_ts) ts <= req.wdata;
      if (wr_gw) gw <= req.wdata & 16'h807F;
      if (wr_tp) tp <= req.wdata & 16'h03FF;
      if (wr_gr) gr <= req.wdata;
      // software pulses
      st_pulse <= wr_st;
      sw_cnrst <= wr_crn && m_ext;
      sw_tcalb <= wr_sp && m_ext;
      if (wr_gs_on && m_ext) sw_gate <= 1'b1;
      if (wr_gs_off || !m_ext) sw_gate <= 1'b0;
      // gate time counter
      if (mc_s[1] && !mc_q) tcount <= '0;
      else                  tcount <= tcount + 1'b1;
      if (ms_s[1] && !ms_q) gtime <= tcount;
      // repetition timer
      if (tick || wr_ts) pcnt <= '0;
      else               pcnt <= pcnt + 1'b1;
      // sequencer
      seq_tcalb <= 1'b0;
      case (seq)
        Q_IDLE:  if (seq_start) seq <= Q_CNRST;
        Q_CNRST: begin
          seq  <= Q_GATE;
          gcnt <= '0;
        end
        Q_GATE: begin
          gcnt <= gcnt + 1'b1;
          if (gw[15] && gcnt == GW_W'(tp[9:0])) seq_tcalb <= 1'b1;
          if (gcnt + 1'b1 >= GW_W'(gw[6:0]) * GW_W'(GATE_STEP)) seq <= Q_IDLE;
        end
        default: seq <= Q_IDLE;
      endcase
      if (daq_mode) seq <= Q_IDLE;
    end
  end

  // signal multiplexer
  always_comb begin
    mux_sgate = 1'b0; mux_cnrst = 1'b0; mux_tcalb = 1'b0;
    out_sgate = 1'b0; out_cnrst = 1'b0; out_tcalb = 1'b0;
    if (m_mtm || m_int) begin
      mux_sgate = seq_sgate; mux_cnrst = seq_cnrst; mux_tcalb = seq_tcalb;
      out_sgate = seq_sgate; out_cnrst = seq_cnrst; out_tcalb = m_int && seq_tcalb;
    end else if (m_ext) begin
      mux_sgate = li_s[1][1] || sw_gate;
      mux_cnrst = li_s[2][1] || sw_cnrst;
      mux_tcalb = li_s[3][1] || sw_tcalb;
      out_sgate = mux_sgate; out_cnrst = mux_cnrst; out_tcalb = mux_tcalb;
    end
    lemo_out[0] = st_pulse || seq_cnrst || (m_mtm && trig_in);
    lemo_out[1] = mux_sgate;
    lemo_out[2] = mux_cnrst;
    lemo_out[3] = mux_tcalb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= 16'h0;
    else if (req.rd) begin
      unique case (req.addr)
        16'hC010: rdata <= ts;
        16'hC020: rdata <= gw;
        16'hC030: rdata <= tp;
        16'hC0A0: rdata <= gr;
        16'hC0B0: rdata <= gtime[15:0];
        16'hC0C0: rdata <= {4'h0, gtime[27:16]};
        default:  rdata <= 16'h0;
      endcase
    end else rdata <= 16'h0;
  end
endmodule
