// gta_host_if: processor-side register interface of the GPS Tracker ASIC
// (GTA), as seen by the tracking processor (TP).
//
// The GTA occupies 0x1D30.0000-0x1D37.FFFF (base BA); registers are 16 bits
// wide and selected by word index idx = address bits [8:1]. Higher address
// bits of the window are not decoded (rollover). There are 206 registers:
//   idx 0-13 (BA..BA+26): 14 control/status registers. At idx 0-4 a write
//       goes to a control register (ant_tracker_sela/selb, ch_code_select,
//       nco_carr_clear, nco_code_clear) and a read returns a status value
//       (mic_div_reg, pps_mic_off_lower/upper, tr_dat_lrch, ant0_agc).
//       idx 5 corr_config and idx 6 timing_config are write-only, idx 7 is
//       unused, idx 8-13 (pps_div_lower/upper, aux_decode1-4) read back what
//       was written.
//   idx 16x .. 16x+15 for channel x = 1..12 (channel base BA + 32x): writes
//       set the carrier and code NCO phase increments, the C/A code SV phase
//       and the epoch accumulate count; reads return NCO phases, code phase,
//       epoch and cycle counts and the six I/Q early/prompt/late accumulators.
//       Entries 12-15 of each channel are unassigned.
// Register widths are those of the GTA map; unused upper bits read 0.
//
// Interrupts: aic_evt, mic_evt and pps_evt are one-clock event pulses from
// the tracking core (accumulator interval clock, measurement interval clock,
// steered 1PPS). Each sets a flag that drives the TP interrupt (AIC INT[2],
// MIC INT[4], 1PPS INT[5-1]) until the TP writes timing_config with bit 2
// (AIC), 3 (MIC) or 4 (1PPS) set. An event in the same clock as its
// acknowledge wins (this design's choice).
//
// clr, held high, returns every register and flag to 0 at the next clock
// edge, as rst_n does at once.
//
// Timing: writes take effect at the clock edge of the request; read data is
// valid one clock after the request. The tracking core itself (NCOs,
// correlators, accumulators, interval clocks) is specified elsewhere and is
// not part of this module: its register values come in on ctrl_rd/ch_rd and
// its settings go out on ctrl_wr/ch_wr. Channel x of the map is array entry
// x-1.
module gta_host_if
  import gns_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,      // synchronous reset (GTA reset flip-flop)
  // TP register bus
  input  logic         en,
  input  logic         we,
  input  logic [7:0]   idx,
  input  logic [15:0]  wdata,
  output logic [15:0]  rdata,
  // tracking core side
  output gta_ctrl_wr_t ctrl_wr,
  input  gta_ctrl_rd_t ctrl_rd,
  output gta_ch_wr_t   ch_wr [GTA_CHANNELS],
  input  gta_ch_rd_t   ch_rd [GTA_CHANNELS],
  input  logic         aic_evt,
  input  logic         mic_evt,
  input  logic         pps_evt,
  output logic         aic_int,
  output logic         mic_int,
  output logic         pps_int
);
  logic       wr;
  logic [3:0] ch_sel;   // 1..12 for a channel register, else out of range
  logic [3:0] reg_sel;
  logic       is_ch;
  logic       ack_wr;

  assign wr      = en && we;
  assign ch_sel  = idx[7:4];
  assign reg_sel = idx[3:0];
  assign is_ch   = (ch_sel >= 4'd1) && (ch_sel <= 4'(GTA_CHANNELS));
  assign ack_wr  = wr && (idx == 8'(GTA_TIMING_CONFIG));

  // ----------------------------------------------------- control registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_wr <= '0;
    end else if (clr) begin
      ctrl_wr <= '0;
    end else if (wr && idx < 8'(GTA_CTRL_REGS)) begin
      case (idx[3:0])
        4'd0:  ctrl_wr.ant_tracker_sela <= wdata[11:0];
        4'd1:  ctrl_wr.ant_tracker_selb <= wdata[11:0];
        4'd2:  ctrl_wr.ch_code_select   <= wdata[11:0];
        4'd3:  ctrl_wr.nco_carr_clear   <= wdata[11:0];
        4'd4:  ctrl_wr.nco_code_clear   <= wdata[11:0];
        4'd5:  ctrl_wr.corr_config      <= wdata[8:0];
        4'd6:  ctrl_wr.timing_config    <= wdata[5:0];
        4'd7:  ;  // unused
        4'd8:  ctrl_wr.pps_div_lower    <= wdata;
        4'd9:  ctrl_wr.pps_div_upper    <= wdata[8:0];
        4'd10: ctrl_wr.aux_decode1      <= wdata;
        4'd11: ctrl_wr.aux_decode2      <= wdata;
        4'd12: ctrl_wr.aux_decode3      <= wdata;
        4'd13: ctrl_wr.aux_decode4      <= wdata;
        default: ;
      endcase
    end
  end

  // ----------------------------------------------------- channel registers
  for (genvar c = 0; c < GTA_CHANNELS; c++) begin : g_ch
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ch_wr[c] <= '0;
      end else if (clr) begin
        ch_wr[c] <= '0;
      end else if (wr && is_ch && ch_sel == 4'(c + 1)) begin
        case (reg_sel)
          4'd0: ch_wr[c].carnco_phincr_upper <= wdata;
          4'd1: ch_wr[c].carnco_phincr_lower <= wdata[7:0];
          4'd2: ch_wr[c].code_phincr_upper   <= wdata;
          4'd3: ch_wr[c].code_phincr_lower   <= wdata[7:0];
          4'd4: ch_wr[c].cacode_svphs        <= wdata[9:0];
          4'd5: ch_wr[c].epochaccum          <= wdata[4:0];
          default: ;  // read-only or unassigned
        endcase
      end
    end
  end

  // ------------------------------------------------------------ read path
  logic [15:0] rd_mux;
  gta_ch_rd_t  ch_r;

  always_comb begin
    ch_r   = is_ch ? ch_rd[ch_sel - 4'd1] : '0;
    rd_mux = '0;
    if (idx < 8'(GTA_CTRL_REGS)) begin
      case (idx[3:0])
        4'd0:  rd_mux = 16'(ctrl_rd.mic_div_reg);
        4'd1:  rd_mux = ctrl_rd.pps_mic_off_lower;
        4'd2:  rd_mux = 16'(ctrl_rd.pps_mic_off_upper);
        4'd3:  rd_mux = 16'(ctrl_rd.tr_dat_lrch);
        4'd4:  rd_mux = 16'(ctrl_rd.ant0_agc);
        4'd8:  rd_mux = ctrl_wr.pps_div_lower;
        4'd9:  rd_mux = 16'(ctrl_wr.pps_div_upper);
        4'd10: rd_mux = ctrl_wr.aux_decode1;
        4'd11: rd_mux = ctrl_wr.aux_decode2;
        4'd12: rd_mux = ctrl_wr.aux_decode3;
        4'd13: rd_mux = ctrl_wr.aux_decode4;
        default: rd_mux = '0;
      endcase
    end else if (is_ch) begin
      case (reg_sel)
        4'd0:  rd_mux = ch_r.carnco_phase;
        4'd1:  rd_mux = ch_r.codenco_phase;
        4'd2:  rd_mux = 16'(ch_r.cacode_phase);
        4'd3:  rd_mux = 16'(ch_r.epoch_cnt);
        4'd4:  rd_mux = ch_r.cyc_cnt_upper;
        4'd5:  rd_mux = ch_r.cyc_cnt_lower;
        4'd6:  rd_mux = ch_r.accum_ie;
        4'd7:  rd_mux = ch_r.accum_ip;
        4'd8:  rd_mux = ch_r.accum_il;
        4'd9:  rd_mux = ch_r.accum_qe;
        4'd10: rd_mux = ch_r.accum_qp;
        4'd11: rd_mux = ch_r.accum_ql;
        default: rd_mux = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            rdata <= '0;
    else if (clr)          rdata <= '0;
    else if (en && !we)    rdata <= rd_mux;
  end

  // ------------------------------------------------------ interrupt flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aic_int <= 1'b0;
      mic_int <= 1'b0;
      pps_int <= 1'b0;
    end else if (clr) begin
      aic_int <= 1'b0;
      mic_int <= 1'b0;
      pps_int <= 1'b0;
    end else begin
      if (aic_evt)                                    aic_int <= 1'b1;
      else if (ack_wr && wdata[GTA_ACK_AIC_BIT])      aic_int <= 1'b0;
      if (mic_evt)                                    mic_int <= 1'b1;
      else if (ack_wr && wdata[GTA_ACK_MIC_BIT])      mic_int <= 1'b0;
      if (pps_evt)                                    pps_int <= 1'b1;
      else if (ack_wr && wdata[GTA_ACK_PPS_BIT])      pps_int <= 1'b0;
    end
  end
endmodule
