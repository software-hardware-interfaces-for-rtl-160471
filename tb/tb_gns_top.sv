// tb_gns_top: end-to-end test of the GNS custom hardware at its default
// parameters. Two bus drivers stand in for the navigation processor (NP) and
// the tracking processor (TP); a third stands in for the C&DH on the PCI
// buffer port; the tracking core's interval clocks and the steered 1PPS are
// driven directly. Flash and SRAM are modelled by a formula (word = address
// with a fixed pattern) so that no memory is needed.
//
// One pass goes through a simulated second of the system's life, compressed:
// power-on and master reset, NP loading the TP boot image into the lower half
// of the NP/TP buffer and the TP reading it at its reset vector window, NP
// enabling GTA I/O, TP programming the 12 channels, AIC and MIC interrupts,
// the TP passing raw tracking data up through the buffer with the MIC-delayed
// interrupt, the NP-to-TP interrupt, the steered 1PPS seen by both
// processors, the C&DH writing attitude and its 1PPS word and reading an
// output packet, Flash busy/done, GTA I/O disable by each processor and by a
// TP DRAM access or a TP EDAC double error, the GTA reset flip-flop, the
// Flash reset and test-point flip-flops, NP resets (software, DRAM access,
// EDAC double error, GNS reset, console reset, watchdog) and TP reset.
// Each of these mechanisms is counted and one that never happened counts as
// a failure. The watchdog is starved for its full default period at the end.
module tb_gns_top;
  import gns_pkg::*;

  logic         clk = 0, por_n = 1;
  logic         master_rst = 0, gns_rst = 0, console_rst = 0, console_en = 0;
  logic         np_edac_derr = 0, tp_edac_derr = 0, flash_busy = 0, iem_id = 1;
  bus_req_t     np_req = '0, tp_req = '0;
  logic [31:0]  np_rdata, tp_rdata, np_ext_rdata = '0, tp_ext_rdata = '0;
  logic         np_rvalid, tp_rvalid, np_flash_cs, np_sram_cs, tp_sram_cs;
  logic         cdh_en = 0, cdh_we = 0;
  logic [11:0]  cdh_addr = '0;
  logic [15:0]  cdh_wdata = '0, cdh_rdata;
  gta_ctrl_wr_t gta_ctrl_wr;
  gta_ctrl_rd_t gta_ctrl_rd;
  gta_ch_wr_t   gta_ch_wr [GTA_CHANNELS];
  gta_ch_rd_t   gta_ch_rd [GTA_CHANNELS];
  logic         gta_aic_evt = 0, gta_mic_evt = 0, gta_pps = 0, gns_1pps;
  logic         np_rst, tp_rst, gta_rst, gta_io_en, flash_wr_en, flash_rst;
  logic [1:0]   np_test_pt, tp_test_pt;
  logic [15:0]  reset_cause;
  logic         tp_wr_refused;
  logic [5:0]   np_int, tp_int;
  logic [31:0]  np_int_exp, tp_int_exp;

  gns_top dut (.*);

  always #5 clk = ~clk;

  // external memories: the word at an address is a fixed function of it
  function automatic logic [31:0] np_mem(input logic [31:0] a); return a ^ 32'h5A5A_0000; endfunction
  function automatic logic [31:0] tp_mem(input logic [31:0] a); return a ^ 32'h0000_C3C3; endfunction
  always @(posedge clk) begin
    if (np_flash_cs || np_sram_cs) np_ext_rdata <= np_mem(np_req.addr);
    if (tp_sram_cs)                tp_ext_rdata <= tp_mem(tp_req.addr);
  end

  int checks = 0, failures = 0;
  typedef enum int {
    M_BOOT_LOAD, M_GTA_EN, M_CH_PROG, M_AIC, M_MIC, M_MIC_DELAYED, M_NP2TP,
    M_TP_WR_REFUSED, M_PPS, M_CDH_1PPS, M_PCI_PACKET, M_FLASH_DONE,
    M_GTA_DIS_NP, M_GTA_DIS_TP, M_GTA_DIS_DRAM, M_GTA_BLOCKED, M_NP_RESET_SW,
    M_NP_RESET_DRAM, M_WATCHDOG, M_TP_RESET, M_EXT_MEM, M_MASTER, M_GTA_RST,
    M_GTA_DIS_EDAC, M_NP_RESET_EDAC, M_GNS_RST, M_CONSOLE_RST, M_FLASH_RST,
    M_TEST_PT, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic np_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); np_req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk); np_req = '0;
  endtask
  task automatic np_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); np_req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0};
    @(negedge clk); np_req = '0;
    chk(np_rvalid, "NP read data valid one clock after the request");
    d = np_rdata;
  endtask
  task automatic tp_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); tp_req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk); tp_req = '0;
  endtask
  task automatic tp_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); tp_req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0};
    @(negedge clk); tp_req = '0;
    chk(tp_rvalid, "TP read data valid one clock after the request");
    d = tp_rdata;
  endtask
  task automatic cdh_write(input logic [11:0] w, input logic [15:0] d);
    @(negedge clk); cdh_en = 1; cdh_we = 1; cdh_addr = w; cdh_wdata = d;
    @(negedge clk); cdh_en = 0; cdh_we = 0;
  endtask
  task automatic cdh_read(input logic [11:0] w, output logic [15:0] d);
    @(negedge clk); cdh_en = 1; cdh_we = 0; cdh_addr = w;
    @(negedge clk); cdh_en = 0; d = cdh_rdata;
  endtask
  task automatic kick();
    np_write(32'h1C10_794C, 32'h0);
  endtask
  task automatic wait_np_out_of_reset();
    while (np_rst) @(negedge clk);
  endtask

  localparam logic [31:0] NP_RA    = 32'h1C10_0000;
  localparam logic [31:0] TP_RA    = 32'h1C20_0000;
  localparam logic [31:0] NP_PCIA  = 32'h1C18_0000;
  localparam logic [31:0] NP_PCIB  = 32'h1D20_0000;
  localparam logic [31:0] NP_NPTP  = 32'h1D28_0000;
  localparam logic [31:0] TP_NPTP  = 32'h1FC0_0000;
  localparam logic [31:0] TP_GTA   = 32'h1D30_0000;

  logic [31:0] d;
  logic [15:0] d16;
  logic [15:0] boot [64];
  logic [15:0] raw  [32];
  logic [15:0] att  [17];
  logic [15:0] pkt  [131];
  int          n;

  initial begin
    gta_ctrl_rd = '0;
    foreach (gta_ch_rd[c]) gta_ch_rd[c] = '0;
    #1 por_n = 0;
    repeat (2) @(negedge clk);
    por_n = 1;

    // ------------------------------------------------ IEM master reset
    @(negedge clk) master_rst = 1;
    repeat (4) @(negedge clk);
    chk(np_rst && tp_rst, "master reset holds both processors");
    master_rst = 0; @(negedge clk);
    np_read(NP_RA, d);
    chk(d[15:0] == 16'h0090, $sformatf("cause %h after master reset (bits 4, 7)", d[15:0]));
    chk(np_int[4], "INT[4]: GTA I/O disabled after master reset");
    if (d[4] && d[7]) mech[M_MASTER]++;
    np_write(NP_RA | 32'hB464, 0);
    np_write(NP_RA | 32'hB46E, 0);

    // ------------------------------------------------ external Flash and SRAM
    np_read(32'hBFC0_0000, d);   // NP reset vector, in Flash via rollover
    chk(d == np_mem(32'hBFC0_0000), "NP boot fetch from Flash");
    np_read(32'h1000_0100, d);
    chk(d == np_mem(32'h1000_0100), "NP SRAM read");
    tp_read(32'h1000_0200, d);
    chk(d == tp_mem(32'h1000_0200), "TP SRAM read");
    mech[M_EXT_MEM]++;

    // ------------------------------------------------ TP boot image
    for (int i = 0; i < 64; i++) begin
      boot[i] = 16'($urandom);
      np_write(NP_NPTP + 32'(2 * i), 32'(boot[i]));
    end
    np_write(NP_RA | 32'hB468, 0);         // reset the TP to boot it
    chk(tp_rst && !np_rst, "NP resets the TP");
    while (tp_rst) @(negedge clk);
    mech[M_TP_RESET]++;
    n = 0;
    for (int i = 0; i < 64; i++) begin
      tp_read(32'hBFC0_0000 + 32'(2 * i), d);  // TP reset vector window
      if (d[15:0] == boot[i]) n++;
    end
    chk(n == 64, $sformatf("TP read %0d of 64 boot words", n));
    if (n == 64) mech[M_BOOT_LOAD]++;
    tp_write(TP_NPTP + 32'h10, 32'hDEAD);   // lower half is read-only to the TP
    if (tp_wr_refused) mech[M_TP_WR_REFUSED]++;
    tp_read(TP_NPTP + 32'h10, d);
    chk(d[15:0] == boot[8], "TP write to the lower half was refused");

    // ------------------------------------------------ GTA I/O and channels
    kick();
    tp_write(TP_GTA + 32'd16, 32'h1234);   // while disabled: dropped
    np_write(NP_RA | 32'hCB40, 0);
    chk(gta_io_en && !np_int[4], "NP enables GTA I/O, INT[4] drops");
    if (gta_io_en) mech[M_GTA_EN]++;
    chk(gta_ctrl_wr.pps_div_lower == 16'h0, "GTA write while disabled was dropped");
    if (gta_ctrl_wr.pps_div_lower == 16'h0) mech[M_GTA_BLOCKED]++;
    for (int c = 1; c <= GTA_CHANNELS; c++) begin
      tp_write(TP_GTA + 32'(32 * c) + 0, 32'(16'h1000 + c));  // carrier phase increment
      tp_write(TP_GTA + 32'(32 * c) + 4, 32'(16'h2000 + c));  // code phase increment
      tp_write(TP_GTA + 32'(32 * c) + 8, 32'(c * 37));        // C/A code SV phase
    end
    n = 0;
    for (int c = 0; c < GTA_CHANNELS; c++)
      if (gta_ch_wr[c].carnco_phincr_upper == 16'h1000 + 16'(c + 1) &&
          gta_ch_wr[c].code_phincr_upper == 16'h2000 + 16'(c + 1) &&
          gta_ch_wr[c].cacode_svphs == 10'((c + 1) * 37)) n++;
    chk(n == GTA_CHANNELS, $sformatf("%0d of 12 channels programmed", n));
    if (n == GTA_CHANNELS) mech[M_CH_PROG]++;

    // ------------------------------------------------ AIC and MIC cycle
    kick();
    for (int k = 0; k < 3; k++) begin
      @(negedge clk) gta_aic_evt = 1; @(negedge clk) gta_aic_evt = 0;
      chk(tp_int[2], "AIC interrupt at TP INT[2]");
      for (int c = 0; c < GTA_CHANNELS; c++) gta_ch_rd[c].accum_ip = 16'(k * 100 + c);
      tp_read(TP_GTA + 32'(32 * 5) + 14, d);   // channel 5 accum_ip
      chk(d[15:0] == 16'(k * 100 + 4), "TP reads channel 5 prompt I accumulator");
      tp_write(TP_GTA + 12, 32'h0004);
      chk(!tp_int[2], "TP acknowledges AIC");
      if (!tp_int[2]) mech[M_AIC]++;
    end
    @(negedge clk) gta_mic_evt = 1; @(negedge clk) gta_mic_evt = 0;
    chk(tp_int[4], "MIC interrupt at TP INT[4]");
    tp_write(TP_GTA + 12, 32'h0008);
    chk(!tp_int[4], "TP acknowledges MIC");
    mech[M_MIC]++;
    for (int i = 0; i < 32; i++) begin
      raw[i] = 16'($urandom);
      tp_write(TP_NPTP + 32'h1000 + 32'(2 * i), 32'(raw[i]));
    end
    tp_write(TP_RA | 32'h0004, 0);          // MIC-delayed interrupt to the NP
    chk(np_int_exp[7], "NP INT[5-7] MIC-delayed");
    n = 0;
    for (int i = 0; i < 32; i++) begin
      np_read(NP_NPTP + 32'h1000 + 32'(2 * i), d);
      if (d[15:0] == raw[i]) n++;
    end
    chk(n == 32, "NP reads the raw tracking data");
    np_write(NP_RA | 32'hB46A, 0);
    chk(!np_int_exp[7], "NP acknowledges MIC-delayed");
    if (n == 32) mech[M_MIC_DELAYED]++;

    // ------------------------------------------------ NP to TP
    kick();
    np_write(NP_NPTP + 32'h200, 32'hBEEF);  // data for the TP in the lower half
    np_write(NP_RA | 32'hB46C, 0);
    chk(tp_int_exp[0], "TP INT[5-0] from the NP");
    tp_read(TP_NPTP + 32'h200, d);
    chk(d[15:0] == 16'hBEEF, "TP reads the NP's data");
    tp_write(TP_RA | 32'h0000, 0);
    chk(!tp_int_exp[0], "TP acknowledges the NP interrupt");
    if (d[15:0] == 16'hBEEF) mech[M_NP2TP]++;

    // ------------------------------------------------ steered 1PPS
    @(negedge clk) gta_pps = 1;
    @(negedge clk);
    chk(gns_1pps, "1PPS output to the C&DH");
    chk(np_int[2] && tp_int_exp[1], "1PPS at NP INT[2] and TP INT[5-1]");
    repeat (3) @(negedge clk);
    gta_pps = 0;
    np_write(NP_PCIA | 32'hA, 0);
    tp_write(TP_GTA + 12, 32'h0010);
    chk(!np_int[2] && !tp_int_exp[1], "both processors acknowledge 1PPS");
    mech[M_PPS]++;

    // ------------------------------------------------ C&DH traffic (Figure 2 order)
    kick();
    for (int i = 0; i < 17; i++) begin att[i] = 16'($urandom); cdh_write(12'(i), att[i]); end
    chk(!np_int_exp[2], "no INT[5-2] before the C&DH 1PPS word");
    cdh_write(12'hFFF, 16'h0001);
    @(negedge clk);
    chk(np_int_exp[2], "INT[5-2] after C&DH writes word 0x0FFF");
    n = 0;
    for (int i = 0; i < 17; i++) begin
      np_read(NP_PCIB + 32'(2 * i), d);
      if (d[15:0] == att[i]) n++;
    end
    chk(n == 17, "NP reads spacecraft attitude");
    np_write(NP_PCIA | 32'h8, 0);
    chk(!np_int_exp[2], "NP acknowledges INT[5-2]");
    if (n == 17) mech[M_CDH_1PPS]++;
    kick();
    for (int i = 0; i < 131; i++) begin
      pkt[i] = 16'($urandom);
      np_write(NP_PCIB + 32'h08CE + 32'(2 * i), 32'(pkt[i]));   // packet #1, buffer 0
    end
    n = 0;
    for (int i = 0; i < 131; i++) begin
      cdh_read(12'(16'h08CE / 2 + i), d16);
      if (d16 == pkt[i]) n++;
    end
    chk(n == 131, $sformatf("C&DH reads %0d of 131 packet words", n));
    if (n == 131) mech[M_PCI_PACKET]++;

    // ------------------------------------------------ PCI Actel status, Flash
    kick();
    flash_busy = 1;
    np_read(NP_PCIA | 32'h6, d);
    chk(d[15:0] == 16'h0060, $sformatf("transaction status %h (busy, IEM B)", d[15:0]));
    np_write(NP_RA | 32'hCB4A, 0);
    chk(flash_wr_en, "Flash write enabled");
    repeat (5) @(negedge clk);
    flash_busy = 0; repeat (2) @(negedge clk);
    chk(np_int_exp[8], "Flash-done INT[5-8]");
    if (np_int_exp[8]) mech[M_FLASH_DONE]++;
    np_write(NP_RA | 32'hCB48, 0);
    chk(!flash_wr_en, "Flash write disabled");

    // ------------------------------------------------ GTA I/O disables
    kick();
    tp_write(TP_RA | 32'h0002, 0);
    chk(!gta_io_en && np_int[4], "TP disables GTA I/O, NP INT[4]");
    tp_write(TP_GTA + 16, 32'h7777);
    tp_read(TP_GTA + 16, d);
    chk(d == 0 && gta_ctrl_wr.pps_div_lower == 16'h0, "GTA blocked while disabled");
    np_read(NP_RA, d);
    chk(d[8], "cause bit 8: TP GTA disable");
    if (d[8]) mech[M_GTA_DIS_TP]++;
    np_write(NP_RA | 32'hCB40, 0);
    np_write(NP_RA | 32'hCB42, 0);
    np_read(NP_RA, d);
    chk(!gta_io_en && d[9], "NP disables GTA I/O, cause bit 9");
    if (d[9]) mech[M_GTA_DIS_NP]++;
    np_write(NP_RA | 32'hCB40, 0);
    tp_read(32'h0000_1000, d);             // TP touches the DRAM range
    np_read(NP_RA, d);
    chk(!gta_io_en && d[10], "TP DRAM access disables GTA I/O, cause bit 10");
    if (d[10]) mech[M_GTA_DIS_DRAM]++;
    np_write(NP_RA | 32'hB46E, 0);

    tp_edac_derr = 1; @(negedge clk); tp_edac_derr = 0;
    np_read(NP_RA, d);
    chk(!gta_io_en && d[11], "TP EDAC double error disables GTA I/O, cause bit 11");
    if (d[11]) mech[M_GTA_DIS_EDAC]++;
    np_write(NP_RA | 32'hB46E, 0);
    np_read(NP_RA, d);
    chk(d[11:7] == 5'b0, "TP section of the cause register cleared");

    // ------------------------------------------------ GTA reset flip-flop
    kick();
    chk(gta_ch_wr[3].carnco_phincr_upper == 16'h1004, "channel 4 still programmed");
    np_write(NP_RA | 32'h7876, 0);
    chk(gta_rst, "GTA reset flip-flop set");
    @(negedge clk);                        // the GTA clears one clock later
    chk(gta_ch_wr[3].carnco_phincr_upper == 16'h0 && gta_ctrl_wr == '0,
        "GTA reset clears the GTA registers");
    np_write(NP_RA | 32'h7874, 0);
    chk(!gta_rst, "GTA reset flip-flop cleared");
    if (!gta_rst && gta_ch_wr[3] == '0) mech[M_GTA_RST]++;

    // ------------------------------------------------ Flash reset, test points
    np_write(NP_RA | 32'hCB4E, 0);
    chk(flash_rst, "Flash reset on");
    np_write(NP_RA | 32'hCB4C, 0);
    chk(!flash_rst, "Flash reset off");
    mech[M_FLASH_RST]++;
    np_write(NP_RA | 32'h787A, 0);
    np_write(NP_RA | 32'h787E, 0);
    tp_write(TP_RA | 32'h000E, 0);
    chk(np_test_pt == 2'b11 && tp_test_pt == 2'b10, "test points set");
    np_write(NP_RA | 32'h7878, 0);
    tp_write(TP_RA | 32'h000A, 0);
    tp_write(TP_RA | 32'h000C, 0);
    chk(np_test_pt == 2'b10 && tp_test_pt == 2'b01, "test points set and cleared");
    if (np_test_pt == 2'b10 && tp_test_pt == 2'b01) mech[M_TEST_PT]++;

    // ------------------------------------------------ NP resets
    kick();
    np_edac_derr = 1; @(negedge clk); np_edac_derr = 0;
    chk(np_rst && !tp_rst, "EDAC double error resets the NP only");
    wait_np_out_of_reset();
    np_read(NP_RA, d);
    chk(d[5], "cause bit 5");
    if (d[5]) mech[M_NP_RESET_EDAC]++;
    @(negedge clk) gns_rst = 1;
    repeat (40) @(negedge clk);
    chk(np_rst && reset_cause[13] && reset_cause[1], "GNS reset held: bits 13 and 1");
    gns_rst = 0; @(negedge clk);
    chk(!np_rst && !reset_cause[13], "NP leaves reset when the GNS reset is released");
    if (reset_cause[1]) mech[M_GNS_RST]++;
    console_en = 1;
    @(negedge clk) console_rst = 1;
    repeat (3) @(negedge clk);
    chk(np_rst && reset_cause[6] && reset_cause[14], "console reset: bits 6 and 14");
    console_rst = 0; @(negedge clk);
    np_read(NP_RA, d);
    chk(d[15:0] == 16'h4062, $sformatf("cause %h: EDAC, GNS, console, console enabled", d[15:0]));
    if (d[6]) mech[M_CONSOLE_RST]++;
    np_write(NP_RA | 32'hB464, 0);
    console_en = 0;
    kick();
    np_write(NP_RA | 32'hB466, 0);
    chk(np_rst, "NP initiated reset");
    wait_np_out_of_reset();
    np_read(NP_RA, d);
    chk(d[3], "cause bit 3");
    if (d[3]) mech[M_NP_RESET_SW]++;
    np_read(32'h0000_0040, d);             // NP touches the DRAM range
    chk(np_rst, "DRAM access resets the NP");
    wait_np_out_of_reset();
    np_read(NP_RA, d);
    chk(d[0], "cause bit 0");
    if (d[0]) mech[M_NP_RESET_DRAM]++;
    np_write(NP_RA | 32'hB464, 0);

    // ------------------------------------------------ watchdog, full period
    kick();
    n = 0;
    while (!np_rst && n < 1_100_000) begin @(negedge clk); n++; end
    chk(np_rst, "starved watchdog resets the NP");
    chk(n >= 999_990 && n <= 1_000_010, $sformatf("watchdog period %0d clocks", n));
    wait_np_out_of_reset();
    np_read(NP_RA, d);
    chk(d[2], "cause bit 2");
    if (d[2]) mech[M_WATCHDOG]++;

    // ------------------------------------------------ mechanism coverage
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-16s %0d", me.name(), mech[m]);
      chk(mech[m] > 0, $sformatf("mechanism %s never happened", me.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
