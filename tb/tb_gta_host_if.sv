// tb_gta_host_if: self-checking test of the GTA register interface.
// Writes every processor-written register (14 control, 6 per channel for 12
// channels) with random data and checks the value and width that reaches the
// tracking-core side; loads random core values and reads back every readable
// register by its map address; checks the unassigned entries read 0, that
// writes to read-only entries change nothing, and that AIC, MIC and 1PPS
// interrupts are held until timing_config is written with bit 2, 3 or 4.
module tb_gta_host_if;
  import gns_pkg::*;
  logic         clk = 0, rst_n = 1, clr = 0;
  logic         en = 0, we = 0;
  logic [7:0]   idx = '0;
  logic [15:0]  wdata = '0, rdata;
  gta_ctrl_wr_t ctrl_wr;
  gta_ctrl_rd_t ctrl_rd;
  gta_ch_wr_t   ch_wr [GTA_CHANNELS];
  gta_ch_rd_t   ch_rd [GTA_CHANNELS];
  logic         aic_evt = 0, mic_evt = 0, pps_evt = 0;
  logic         aic_int, mic_int, pps_int;
  int checks = 0, failures = 0;

  gta_host_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  // byte offset from BA, as in the map
  task automatic wr(input int byte_off, input logic [15:0] d);
    @(negedge clk); en = 1; we = 1; idx = 8'(byte_off / 2); wdata = d;
    @(negedge clk); en = 0; we = 0;
  endtask
  task automatic rd(input int byte_off, output logic [15:0] d);
    @(negedge clk); en = 1; we = 0; idx = 8'(byte_off / 2);
    @(negedge clk); en = 0; d = rdata;
  endtask

  logic [15:0] v [14];
  logic [15:0] cv [GTA_CHANNELS][6];
  logic [15:0] d;
  int ta;

  initial begin
    ctrl_rd = '0;
    foreach (ch_rd[c]) ch_rd[c] = '0;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    chk(ctrl_wr == '0 && !aic_int && !mic_int && !pps_int, "registers and flags clear after reset");

    // ------------------------------------------------ control registers
    foreach (v[i]) v[i] = 16'($urandom) & ~16'h001C;  // keep ack bits clear
    for (int i = 0; i < 14; i++) wr(2 * i, v[i]);
    chk(ctrl_wr.ant_tracker_sela == v[0][11:0], "ant_tracker_sela at BA");
    chk(ctrl_wr.ant_tracker_selb == v[1][11:0], "ant_tracker_selb at BA+2");
    chk(ctrl_wr.ch_code_select   == v[2][11:0], "ch_code_select at BA+4");
    chk(ctrl_wr.nco_carr_clear   == v[3][11:0], "nco_carr_clear at BA+6");
    chk(ctrl_wr.nco_code_clear   == v[4][11:0], "nco_code_clear at BA+8");
    chk(ctrl_wr.corr_config      == v[5][8:0],  "corr_config at BA+10");
    chk(ctrl_wr.timing_config    == v[6][5:0],  "timing_config at BA+12");
    chk(ctrl_wr.pps_div_lower    == v[8],       "pps_div_lower at BA+16");
    chk(ctrl_wr.pps_div_upper    == v[9][8:0],  "pps_div_upper at BA+18");
    chk(ctrl_wr.aux_decode1      == v[10],      "aux_decode1 at BA+20");
    chk(ctrl_wr.aux_decode2      == v[11],      "aux_decode2 at BA+22");
    chk(ctrl_wr.aux_decode3      == v[12],      "aux_decode3 at BA+24");
    chk(ctrl_wr.aux_decode4      == v[13],      "aux_decode4 at BA+26");
    ctrl_rd.mic_div_reg       = 14'($urandom);
    ctrl_rd.pps_mic_off_lower = 16'($urandom);
    ctrl_rd.pps_mic_off_upper = 11'($urandom);
    ctrl_rd.tr_dat_lrch       = 12'($urandom);
    ctrl_rd.ant0_agc          = 12'($urandom);
    rd(0,  d); chk(d == 16'(ctrl_rd.mic_div_reg),       "read mic_div_reg");
    rd(2,  d); chk(d == ctrl_rd.pps_mic_off_lower,      "read pps_mic_off_lower");
    rd(4,  d); chk(d == 16'(ctrl_rd.pps_mic_off_upper), "read pps_mic_off_upper");
    rd(6,  d); chk(d == 16'(ctrl_rd.tr_dat_lrch),       "read tr_dat_lrch");
    rd(8,  d); chk(d == 16'(ctrl_rd.ant0_agc),          "read ant0_agc");
    rd(10, d); chk(d == 16'h0, "corr_config is write-only");
    rd(14, d); chk(d == 16'h0, "BA+14 unused");
    rd(16, d); chk(d == v[8],  "read back pps_div_lower");
    rd(18, d); chk(d == 16'(v[9][8:0]), "read back pps_div_upper");
    rd(20, d); chk(d == v[10], "read back aux_decode1");
    rd(26, d); chk(d == v[13], "read back aux_decode4");

    // ------------------------------------------------ channel registers
    for (int c = 0; c < GTA_CHANNELS; c++) begin
      ta = 32 * (c + 1);
      for (int j = 0; j < 6; j++) begin
        cv[c][j] = 16'($urandom);
        wr(ta + 2 * j, cv[c][j]);
      end
      // writes to read-only entries must not disturb anything
      wr(ta + 12, 16'hFFFF);
      wr(ta + 30, 16'hFFFF);
    end
    for (int c = 0; c < GTA_CHANNELS; c++) begin
      chk(ch_wr[c].carnco_phincr_upper == cv[c][0],       $sformatf("ch%0d carnco_phincr_upper", c + 1));
      chk(ch_wr[c].carnco_phincr_lower == cv[c][1][7:0],  $sformatf("ch%0d carnco_phincr_lower", c + 1));
      chk(ch_wr[c].code_phincr_upper   == cv[c][2],       $sformatf("ch%0d code_phincr_upper", c + 1));
      chk(ch_wr[c].code_phincr_lower   == cv[c][3][7:0],  $sformatf("ch%0d code_phincr_lower", c + 1));
      chk(ch_wr[c].cacode_svphs        == cv[c][4][9:0],  $sformatf("ch%0d cacode_svphs", c + 1));
      chk(ch_wr[c].epochaccum          == cv[c][5][4:0],  $sformatf("ch%0d epochaccum", c + 1));
    end
    chk(ctrl_wr.aux_decode4 == v[13], "channel writes leave the control registers");
    for (int c = 0; c < GTA_CHANNELS; c++) begin
      ch_rd[c].carnco_phase  = 16'($urandom);
      ch_rd[c].codenco_phase = 16'($urandom);
      ch_rd[c].cacode_phase  = 10'($urandom);
      ch_rd[c].epoch_cnt     = 10'($urandom);
      ch_rd[c].cyc_cnt_upper = 16'($urandom);
      ch_rd[c].cyc_cnt_lower = 16'($urandom);
      ch_rd[c].accum_ie      = 16'($urandom);
      ch_rd[c].accum_ip      = 16'($urandom);
      ch_rd[c].accum_il      = 16'($urandom);
      ch_rd[c].accum_qe      = 16'($urandom);
      ch_rd[c].accum_qp      = 16'($urandom);
      ch_rd[c].accum_ql      = 16'($urandom);
    end
    for (int c = 0; c < GTA_CHANNELS; c++) begin
      ta = 32 * (c + 1);
      rd(ta + 0,  d); chk(d == ch_rd[c].carnco_phase,       $sformatf("ch%0d carnco_phase", c + 1));
      rd(ta + 2,  d); chk(d == ch_rd[c].codenco_phase,      $sformatf("ch%0d codenco_phase", c + 1));
      rd(ta + 4,  d); chk(d == 16'(ch_rd[c].cacode_phase),  $sformatf("ch%0d cacode_phase", c + 1));
      rd(ta + 6,  d); chk(d == 16'(ch_rd[c].epoch_cnt),     $sformatf("ch%0d epoch_cnt", c + 1));
      rd(ta + 8,  d); chk(d == ch_rd[c].cyc_cnt_upper,      $sformatf("ch%0d cyc_cnt_upper", c + 1));
      rd(ta + 10, d); chk(d == ch_rd[c].cyc_cnt_lower,      $sformatf("ch%0d cyc_cnt_lower", c + 1));
      rd(ta + 12, d); chk(d == ch_rd[c].accum_ie,           $sformatf("ch%0d accum_ie", c + 1));
      rd(ta + 14, d); chk(d == ch_rd[c].accum_ip,           $sformatf("ch%0d accum_ip", c + 1));
      rd(ta + 16, d); chk(d == ch_rd[c].accum_il,           $sformatf("ch%0d accum_il", c + 1));
      rd(ta + 18, d); chk(d == ch_rd[c].accum_qe,           $sformatf("ch%0d accum_qe", c + 1));
      rd(ta + 20, d); chk(d == ch_rd[c].accum_qp,           $sformatf("ch%0d accum_qp", c + 1));
      rd(ta + 22, d); chk(d == ch_rd[c].accum_ql,           $sformatf("ch%0d accum_ql", c + 1));
      rd(ta + 24, d); chk(d == 16'h0,                       $sformatf("ch%0d TA+24 unassigned", c + 1));
    end
    rd(32 * 13, d); chk(d == 16'h0, "no channel 13");

    // ------------------------------------------------ interrupts
    @(negedge clk) aic_evt = 1; mic_evt = 1; pps_evt = 1;
    @(negedge clk) aic_evt = 0; mic_evt = 0; pps_evt = 0;
    chk(aic_int && mic_int && pps_int, "events set all three flags");
    wr(12, 16'h0004);
    chk(!aic_int && mic_int && pps_int, "timing_config bit 2 acknowledges AIC only");
    wr(12, 16'h0008);
    chk(!mic_int && pps_int, "timing_config bit 3 acknowledges MIC");
    wr(10, 16'h001C);
    chk(pps_int, "the same bits at BA+10 acknowledge nothing");
    wr(12, 16'h0010);
    chk(!pps_int, "timing_config bit 4 acknowledges 1PPS");
    // a run of AIC events, each acknowledged before the next
    for (int k = 0; k < 20; k++) begin
      @(negedge clk) aic_evt = 1; @(negedge clk) aic_evt = 0;
      chk(aic_int, "AIC event");
      wr(12, 16'h0004);
      chk(!aic_int, "AIC acknowledged");
    end
    // clr returns everything to reset values
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    chk(ctrl_wr == '0 && ch_wr[5] == '0, "clr resets the registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
