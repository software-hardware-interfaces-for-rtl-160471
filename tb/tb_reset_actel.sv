// tb_reset_actel: directed self-checking test of the Reset Actel.
// Every write-strobe address of both pages is exercised and its effect
// compared with the register map: GTA I/O enable/disable from each source
// with its cause bit, NP reset causes with the length of the reset pulse,
// the watchdog (kicked, then starved), TP reset, both inter-processor
// interrupts, the Flash-done interrupt, the set/clear flip-flops and the
// Reset Cause Register read over the bus. The expected cause register is
// kept by the test itself. A final random phase drives every strobe address,
// error input and external reset at random and compares all outputs in
// every clock with a reference model of the Actel written separately below.
// Runs with short pulse and watchdog periods.
module tb_reset_actel;
  import gns_pkg::*;
  localparam int unsigned PULSE = 4;
  localparam int unsigned WDT   = 100;

  logic        clk = 0, por_n = 1;
  logic        master_rst = 0, gns_rst = 0, console_rst = 0, console_en = 0;
  logic        np_edac_derr = 0, np_dram_err = 0, tp_edac_derr = 0, tp_dram_err = 0;
  logic        flash_busy = 0;
  logic        np_wr = 0, np_rd = 0, tp_wr = 0;
  logic [15:0] np_off = '0, tp_off = '0, np_rdata;
  logic        np_rst, tp_rst, gta_rst, gta_io_en;
  logic        np_int_gta_dis, np_int_micd, np_int_flash, tp_int_np;
  logic        flash_wr_en, flash_rst;
  logic [1:0]  np_test_pt, tp_test_pt;
  logic [15:0] cause;

  int checks = 0, failures = 0;
  logic [15:0] exp_cause = '0;

  reset_actel #(.RST_PULSE_CYCLES(PULSE), .WDT_CYCLES(WDT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic np_w(input logic [15:0] off);
    @(negedge clk); np_wr = 1; np_off = off;
    @(negedge clk); np_wr = 0;
  endtask
  task automatic kick();
    np_w(RA_NP_WATCHDOG);
  endtask
  task automatic tp_w(input logic [15:0] off);
    @(negedge clk); tp_wr = 1; tp_off = off;
    @(negedge clk); tp_wr = 0;
  endtask
  task automatic np_r(input logic [15:0] off, output logic [15:0] d);
    @(negedge clk); np_rd = 1; np_off = off;
    @(negedge clk); np_rd = 0; d = np_rdata;
  endtask
  task automatic check_cause(input string where);
    logic [15:0] d;
    np_r(RA_NP_CAUSE_RD, d);
    chk(d === exp_cause, $sformatf("%s: cause read %h expected %h", where, d, exp_cause));
  endtask
  // pulse an input for one clock
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  // count how long np_rst stays high, starting now
  task automatic measure_np_rst(output int n);
    n = 0;
    while (np_rst) begin @(negedge clk); n++; end
  endtask

  int n;
  logic [15:0] d;

  // ------------------------------------------------------ reference model
  // State after each clock edge, from the inputs sampled at that edge.
  bit          m_on = 0;
  logic [11:0] m_flags;
  logic        m_gta_en, m_tp_int, m_micd, m_flash_int, m_busy_q;
  logic        m_gta_rst, m_fwe, m_frst;
  logic [1:0]  m_npt, m_tpt;
  int          m_np_cnt, m_tp_cnt;
  logic [15:0] m_rdata;

  function automatic bit m_np_rst();
    return master_rst || gns_rst || console_rst || m_np_cnt != 0;
  endfunction
  function automatic logic [15:0] m_cause();
    return {1'b0, console_en, m_np_rst(), 1'b0, m_flags};
  endfunction

  always @(posedge clk) if (m_on) begin
    bit nw, tw;
    bit dis;
    logic [11:0] set;
    nw = np_wr; tw = tp_wr;
    m_rdata <= np_rd ? (np_off == 16'h0000 ? m_cause() : 16'h0) : m_rdata;
    m_np_cnt <= (np_edac_derr || np_dram_err || (nw && np_off == 16'hB466)) ? PULSE :
                (m_np_cnt > 0 ? m_np_cnt - 1 : 0);
    m_tp_cnt <= (nw && np_off == 16'hB468) ? PULSE : (m_tp_cnt > 0 ? m_tp_cnt - 1 : 0);
    set = {tp_edac_derr, tp_dram_err, nw && np_off == 16'hCB42, tw && tp_off == 16'h0002,
           master_rst, console_rst, np_edac_derr, master_rst, nw && np_off == 16'hB466,
           1'b0, gns_rst, np_dram_err};
    m_flags <= (m_flags & ~{{5{nw && np_off == 16'hB46E}}, {7{nw && np_off == 16'hB464}}}) | set;
    dis = master_rst || set[11] || set[10] || set[9] || set[8];
    if (dis) m_gta_en <= 0;
    else if (nw && np_off == 16'hCB40) m_gta_en <= 1;
    m_busy_q <= flash_busy;
    if (master_rst) begin
      {m_tp_int, m_micd, m_flash_int, m_gta_rst, m_fwe, m_frst} <= '0;
      m_npt <= '0; m_tpt <= '0;
    end else begin
      if (nw && np_off == 16'hB46C) m_tp_int <= 1; else if (tw && tp_off == 16'h0000) m_tp_int <= 0;
      if (tw && tp_off == 16'h0004) m_micd <= 1; else if (nw && np_off == 16'hB46A) m_micd <= 0;
      if (m_busy_q && !flash_busy) m_flash_int <= 1; else if (!m_busy_q && flash_busy) m_flash_int <= 0;
      if (nw && np_off == 16'h7876) m_gta_rst <= 1; else if (nw && np_off == 16'h7874) m_gta_rst <= 0;
      if (nw && np_off == 16'hCB4A) m_fwe <= 1; else if (nw && np_off == 16'hCB48) m_fwe <= 0;
      if (nw && np_off == 16'hCB4E) m_frst <= 1; else if (nw && np_off == 16'hCB4C) m_frst <= 0;
      if (nw && np_off == 16'h787A) m_npt[0] <= 1; else if (nw && np_off == 16'h7878) m_npt[0] <= 0;
      if (nw && np_off == 16'h787E) m_npt[1] <= 1; else if (nw && np_off == 16'h787C) m_npt[1] <= 0;
      if (tw && tp_off == 16'h000A) m_tpt[0] <= 1; else if (tw && tp_off == 16'h0008) m_tpt[0] <= 0;
      if (tw && tp_off == 16'h000E) m_tpt[1] <= 1; else if (tw && tp_off == 16'h000C) m_tpt[1] <= 0;
    end
  end

  localparam logic [15:0] NP_OFFS [20] = '{
    16'h0000, 16'h794C, 16'h7874, 16'h7876, 16'h7878, 16'h787A, 16'h787C, 16'h787E,
    16'hB464, 16'hB466, 16'hB468, 16'hB46A, 16'hB46C, 16'hB46E, 16'hCB40, 16'hCB42,
    16'hCB48, 16'hCB4A, 16'hCB4C, 16'hCB4E};
  localparam logic [15:0] TP_OFFS [8] = '{
    16'h0000, 16'h0002, 16'h0004, 16'h0006, 16'h0008, 16'h000A, 16'h000C, 16'h000E};

  function automatic bit rare(int one_in);
    return ($urandom % one_in) == 0;
  endfunction

  task automatic random_phase(input int cycles);
    int bad;
    bad = 0;
    // start the model from the state the directed part left behind
    @(negedge clk);
    m_flags = cause[11:0]; m_gta_en = gta_io_en; m_tp_int = tp_int_np; m_micd = np_int_micd;
    m_flash_int = np_int_flash; m_busy_q = flash_busy; m_gta_rst = gta_rst; m_fwe = flash_wr_en;
    m_frst = flash_rst; m_npt = np_test_pt; m_tpt = tp_test_pt; m_np_cnt = 0; m_tp_cnt = 0;
    m_rdata = np_rdata;
    m_on = 1;
    for (int i = 0; i < cycles; i++) begin
      // drive this cycle's inputs
      {master_rst, gns_rst, console_rst} = {rare(300), rare(150), rare(150)};
      {np_edac_derr, np_dram_err, tp_edac_derr, tp_dram_err} =
          {rare(120), rare(120), rare(60), rare(60)};
      if (rare(40)) flash_busy = !flash_busy;
      if (rare(500)) console_en = !console_en;
      np_wr = 0; np_rd = 0; tp_wr = 0;
      if (i % 40 == 0) begin np_wr = 1; np_off = RA_NP_WATCHDOG; end
      else if (rare(2)) begin
        np_off = NP_OFFS[$urandom % 20];
        if (rare(4)) np_rd = 1; else np_wr = 1;
      end
      if (rare(3)) begin tp_wr = 1; tp_off = TP_OFFS[$urandom % 8]; end
      @(negedge clk);
      checks++;
      if (gta_io_en !== m_gta_en || cause !== m_cause() || np_rdata !== m_rdata ||
          np_rst !== m_np_rst() || tp_rst !== (master_rst || m_tp_cnt != 0) ||
          np_int_gta_dis !== !m_gta_en || tp_int_np !== m_tp_int || np_int_micd !== m_micd ||
          np_int_flash !== m_flash_int || gta_rst !== m_gta_rst || flash_wr_en !== m_fwe ||
          flash_rst !== m_frst || np_test_pt !== m_npt || tp_test_pt !== m_tpt) begin
        failures++; bad++;
        if (bad <= 5)
          $display("FAIL random phase cycle %0d: cause %h/%h gta %b/%b np_rst %b/%b tp_rst %b/%b",
                   i, cause, m_cause(), gta_io_en, m_gta_en, np_rst, m_np_rst(),
                   tp_rst, master_rst || m_tp_cnt != 0);
      end
    end
    {master_rst, gns_rst, console_rst, np_edac_derr, np_dram_err, tp_edac_derr, tp_dram_err} = '0;
    np_wr = 0; np_rd = 0; tp_wr = 0;
    m_on = 0;
  endtask

  initial begin
    #1 por_n = 0;
    repeat (2) @(negedge clk);
    por_n = 1;
    // ---------------------------------------------------- after power-on
    chk(!gta_io_en && np_int_gta_dis, "GTA I/O disabled after power-on");
    chk(!np_rst && !tp_rst, "no reset after power-on");
    check_cause("power-on");

    // ---------------------------------------------------- GTA I/O control
    np_w(RA_NP_GTA_EN);
    chk(gta_io_en && !np_int_gta_dis, "NP enables GTA I/O, INT[4] drops");
    np_w(RA_NP_GTA_DIS);
    chk(!gta_io_en && np_int_gta_dis, "NP disables GTA I/O, INT[4] rises");
    exp_cause[RC_NP_GTA_DIS] = 1;
    check_cause("NP GTA disable");
    np_w(RA_NP_GTA_EN);
    tp_w(RA_TP_GTA_DIS);
    chk(!gta_io_en, "TP disables GTA I/O");
    exp_cause[RC_TP_GTA_DIS] = 1;
    np_w(RA_NP_GTA_EN);
    pulse(tp_dram_err);
    chk(!gta_io_en, "TP DRAM access disables GTA I/O");
    exp_cause[RC_TP_DRAM_GTA_DIS] = 1;
    np_w(RA_NP_GTA_EN);
    pulse(tp_edac_derr);
    chk(!gta_io_en, "TP EDAC double error disables GTA I/O");
    exp_cause[RC_TP_EDAC_GTA_DIS] = 1;
    chk(!np_rst && !tp_rst, "GTA disables reset nobody");
    check_cause("all GTA disable causes");
    // TP cannot enable: its page has no enable address
    tp_w(16'hCB40);
    chk(!gta_io_en, "TP write of the NP enable offset does nothing");
    np_w(RA_NP_CLR_TP_CAUSE);
    exp_cause[11:7] = '0;
    check_cause("clear TP section");

    // ---------------------------------------------------- NP reset causes
    kick();
    np_w(RA_NP_RESET_NP);
    chk(np_rst && cause[RC_NP_IN_RESET], "NP initiated reset asserts np_rst and bit 13");
    measure_np_rst(n);
    chk(n == PULSE, $sformatf("NP reset pulse %0d clocks, expected %0d", n, PULSE));
    chk(!tp_rst, "NP reset does not reset the TP by itself");
    exp_cause[RC_NP_INIT_RST] = 1;
    check_cause("NP initiated reset");

    pulse(np_edac_derr);
    chk(np_rst, "EDAC double error resets the NP");
    measure_np_rst(n);
    exp_cause[RC_EDAC_RST] = 1;
    pulse(np_dram_err);
    chk(np_rst, "DRAM access resets the NP");
    measure_np_rst(n);
    exp_cause[RC_DRAM_ERR_RST] = 1;
    check_cause("EDAC and DRAM resets");

    @(negedge clk) gns_rst = 1;
    repeat (10) @(negedge clk);
    chk(np_rst, "NP held in reset while GNS reset is held");
    gns_rst = 0; @(negedge clk);
    chk(!np_rst, "NP released with GNS reset");
    exp_cause[RC_GNS_RST] = 1;
    pulse(console_rst);
    exp_cause[RC_CONSOLE_RST] = 1;
    console_en = 1;
    exp_cause[RC_CONSOLE_EN] = 1;
    check_cause("GNS and console resets, console enabled");
    np_w(RA_NP_CLR_NP_CAUSE);
    exp_cause[6:0] = '0;
    check_cause("clear NP section");

    // ---------------------------------------------------- watchdog
    for (int i = 0; i < 10; i++) begin
      repeat (WDT / 2) @(negedge clk);
      kick();
    end
    chk(!np_rst && !cause[RC_WATCHDOG_RST], "watchdog kicked in time stays quiet");
    n = 0;
    while (!np_rst && n < 2 * WDT) begin @(negedge clk); n++; end
    chk(np_rst, "starved watchdog resets the NP");
    chk(n >= WDT - 4 && n <= WDT + 2, $sformatf("watchdog fired after %0d clocks, period %0d", n, WDT));
    measure_np_rst(n);
    exp_cause[RC_WATCHDOG_RST] = 1;
    check_cause("watchdog reset");
    np_w(RA_NP_CLR_NP_CAUSE);
    exp_cause[6:0] = '0;

    // ---------------------------------------------------- TP reset
    kick();
    np_w(RA_NP_RESET_TP);
    chk(tp_rst && !np_rst, "NP write resets the TP only");
    n = 0;
    while (tp_rst) begin @(negedge clk); n++; end
    chk(n == PULSE, $sformatf("TP reset pulse %0d clocks", n));

    // ---------------------------------------------------- interrupts
    np_w(RA_NP_NP2TP_INT);
    chk(tp_int_np, "NP to TP interrupt set");
    repeat (5) @(negedge clk);
    chk(tp_int_np, "NP to TP interrupt held until acknowledged");
    tp_w(RA_TP_NP2TP_ACK);
    chk(!tp_int_np, "TP acknowledges NP interrupt");
    tp_w(RA_TP_MICD_INT);
    chk(np_int_micd, "MIC-delayed interrupt set by TP");
    np_w(RA_NP_MICD_ACK);
    chk(!np_int_micd, "NP acknowledges MIC-delayed interrupt");
    kick();
    // Flash done: busy falls -> interrupt, busy rises -> interrupt cleared
    @(negedge clk) flash_busy = 1;
    repeat (3) @(negedge clk);
    chk(!np_int_flash, "no Flash interrupt while busy");
    flash_busy = 0; repeat (2) @(negedge clk);
    chk(np_int_flash, "Flash interrupt when operation completes");
    repeat (5) @(negedge clk);
    chk(np_int_flash, "Flash interrupt stays (no acknowledge)");
    flash_busy = 1; repeat (2) @(negedge clk);
    chk(!np_int_flash, "Flash interrupt drops when next operation starts");
    flash_busy = 0; repeat (2) @(negedge clk);

    // ---------------------------------------------------- flip-flops
    kick();
    np_w(RA_NP_GTA_RST_SET);   chk(gta_rst, "GTA reset set");
    np_w(RA_NP_GTA_RST_CLR);   chk(!gta_rst, "GTA reset cleared");
    np_w(RA_NP_FLASH_WR_EN);   chk(flash_wr_en, "Flash write enabled");
    np_w(RA_NP_FLASH_WR_DIS);  chk(!flash_wr_en, "Flash write disabled");
    np_w(RA_NP_FLASH_RST_EN);  chk(flash_rst, "Flash reset enabled");
    np_w(RA_NP_FLASH_RST_DIS); chk(!flash_rst, "Flash reset disabled");
    kick();
    np_w(RA_NP_TP1_SET); chk(np_test_pt == 2'b01, "NP test point 1 set");
    np_w(RA_NP_TP2_SET); chk(np_test_pt == 2'b11, "NP test point 2 set");
    np_w(RA_NP_TP1_CLR); chk(np_test_pt == 2'b10, "NP test point 1 cleared");
    np_w(RA_NP_TP2_CLR); chk(np_test_pt == 2'b00, "NP test point 2 cleared");
    tp_w(RA_TP_TP1_SET); chk(tp_test_pt == 2'b01, "TP test point 1 set");
    tp_w(RA_TP_TP2_SET); chk(tp_test_pt == 2'b11, "TP test point 2 set");
    tp_w(RA_TP_TP1_CLR); chk(tp_test_pt == 2'b10, "TP test point 1 cleared");
    tp_w(RA_TP_TP2_CLR); chk(tp_test_pt == 2'b00, "TP test point 2 cleared");
    np_r(16'h0002, d);
    chk(d == 16'h0000, "other offsets read 0");

    // ---------------------------------------------------- master reset
    kick();
    np_w(RA_NP_GTA_EN);
    np_w(RA_NP_FLASH_WR_EN);
    np_w(RA_NP_NP2TP_INT);
    @(negedge clk) master_rst = 1;
    repeat (3) @(negedge clk);
    chk(np_rst && tp_rst, "master reset resets both processors");
    chk(!gta_io_en && !flash_wr_en && !tp_int_np, "master reset clears GTA enable, Flash write, interrupts");
    master_rst = 0; @(negedge clk);
    chk(!np_rst && !tp_rst, "released after master reset");
    exp_cause[RC_MASTER_RST] = 1;
    exp_cause[RC_MASTER_GTA_DIS] = 1;
    check_cause("master reset");

    // ---------------------------------------------------- random traffic
    kick();
    random_phase(12000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
