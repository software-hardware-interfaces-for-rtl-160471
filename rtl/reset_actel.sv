// reset_actel: the Reset Actel, the discrete-I/O FPGA shared by the
// navigation processor (NP) and the tracking processor (TP).
//
// Almost every function is a write strobe: a processor writes any data to a
// fixed address and a flip-flop is set, cleared or pulsed. The NP reaches it
// at 0x1C10.xxxx (np_off = address bits [15:0]), the TP at 0x1C20.xxxx
// (tp_off). The only readable register is the Reset Cause Register at NP
// offset 0x0000; reads return it one clock after the request, other offsets
// read 0.
//
// Resets. An NP reset follows an IEM master reset, a GNS reset from the C&DH,
// a console reset from the ground support equipment (these three for as long
// as they are held), or one of four internal causes that each start a reset
// pulse of RST_PULSE_CYCLES clocks: watchdog time-out, EDAC double error,
// an NP access to the DRAM range, or an NP write to 0x1C10.B466. The TP is
// reset by the master reset and by an NP write to 0x1C10.B468 (a pulse of
// RST_PULSE_CYCLES). Each NP reset cause sets its Reset Cause Register bit.
//
// GTA I/O access. One flip-flop (gta_io_en) gates the TP's access to the GPS
// Tracker ASIC registers. Only the NP can set it (write 0x1C10.CB40). It is
// cleared by a master reset, a TP write to 0x1C20.0002, an NP write to
// 0x1C10.CB42, a TP DRAM-range access or a TP EDAC double error, and each of
// these sets its cause bit (7-11). While access is disabled the NP's
// interrupt INT[4] (np_int_gta_dis) is asserted.
//
// Interrupts between processors. NP write 0x1C10.B46C raises the TP's
// INT[5-0]; TP write 0x1C20.0000 acknowledges it. TP write 0x1C20.0004 raises
// the NP's MIC-delayed INT[5-7]; NP write 0x1C10.B46A acknowledges it.
// The Flash interrupt INT[5-8] rises when the Flash busy line falls (an erase
// or program finished) and falls when busy rises again (next operation).
//
// Flip-flops with set/clear addresses: GTA reset, Flash write enable, Flash
// reset, two NP test points and two TP test points.
//
// This design's choices, where the hardware description is silent: pulse
// lengths and the watchdog period are parameters; the Actel's own state is
// cleared by its power-on reset (por_n) and, except for the cause flags, also
// by the master reset; a set in the same clock as a clear wins for the
// interrupts, a disable wins over an enable for GTA I/O; everything is
// synchronous to one clock and all inputs are already synchronous to it.
module reset_actel
  import gns_pkg::*;
#(
  parameter int unsigned RST_PULSE_CYCLES = 16,
  parameter int unsigned WDT_CYCLES       = 1_000_000
) (
  input  logic        clk,
  input  logic        por_n,
  // external reset sources and status inputs (active high)
  input  logic        master_rst,
  input  logic        gns_rst,
  input  logic        console_rst,
  input  logic        console_en,
  input  logic        np_edac_derr,
  input  logic        np_dram_err,
  input  logic        tp_edac_derr,
  input  logic        tp_dram_err,
  input  logic        flash_busy,
  // NP page 0x1C10.xxxx
  input  logic        np_wr,
  input  logic        np_rd,
  input  logic [15:0] np_off,
  output logic [15:0] np_rdata,
  // TP page 0x1C20.xxxx
  input  logic        tp_wr,
  input  logic [15:0] tp_off,
  // resets out (active high)
  output logic        np_rst,
  output logic        tp_rst,
  output logic        gta_rst,
  // GTA I/O access
  output logic        gta_io_en,
  // interrupts
  output logic        np_int_gta_dis,   // NP INT[4]
  output logic        np_int_micd,      // NP INT[5-7]
  output logic        np_int_flash,     // NP INT[5-8]
  output logic        tp_int_np,        // TP INT[5-0]
  // discrete outputs
  output logic        flash_wr_en,
  output logic        flash_rst,
  output logic [1:0]  np_test_pt,
  output logic [1:0]  tp_test_pt,
  output logic [15:0] cause
);
  localparam int unsigned PW = $clog2(RST_PULSE_CYCLES + 1);

  // ---------------------------------------------------------------- strobes
  function automatic logic np_w(input logic [15:0] a);
    return np_wr && (np_off == a);
  endfunction
  function automatic logic tp_w(input logic [15:0] a);
    return tp_wr && (tp_off == a);
  endfunction

  // ------------------------------------------------------------- NP resets
  logic          wdt_expire;
  logic          np_pulse_req, tp_pulse_req;
  logic [PW-1:0] np_pulse_cnt, tp_pulse_cnt;

  assign np_pulse_req = wdt_expire || np_edac_derr || np_dram_err || np_w(RA_NP_RESET_NP);
  assign tp_pulse_req = np_w(RA_NP_RESET_TP);

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      np_pulse_cnt <= '0;
      tp_pulse_cnt <= '0;
    end else begin
      if (np_pulse_req)           np_pulse_cnt <= PW'(RST_PULSE_CYCLES);
      else if (np_pulse_cnt != 0) np_pulse_cnt <= np_pulse_cnt - 1'b1;
      if (tp_pulse_req)           tp_pulse_cnt <= PW'(RST_PULSE_CYCLES);
      else if (tp_pulse_cnt != 0) tp_pulse_cnt <= tp_pulse_cnt - 1'b1;
    end
  end

  assign np_rst = master_rst || gns_rst || console_rst || (np_pulse_cnt != 0);
  assign tp_rst = master_rst || (tp_pulse_cnt != 0);

  watchdog_timer #(.TIMEOUT_CYCLES(WDT_CYCLES)) u_wdt (
    .clk,
    .rst_n (por_n),
    .hold  (np_rst),
    .kick  (np_w(RA_NP_WATCHDOG)),
    .expire(wdt_expire)
  );

  // -------------------------------------------------------- GTA I/O access
  logic gta_dis_np, gta_dis_tp, gta_dis_any;
  assign gta_dis_np  = np_w(RA_NP_GTA_DIS);
  assign gta_dis_tp  = tp_w(RA_TP_GTA_DIS);
  assign gta_dis_any = master_rst || gta_dis_np || gta_dis_tp || tp_dram_err || tp_edac_derr;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)                     gta_io_en <= 1'b0;
    else if (gta_dis_any)           gta_io_en <= 1'b0;
    else if (np_w(RA_NP_GTA_EN))    gta_io_en <= 1'b1;
  end
  assign np_int_gta_dis = !gta_io_en;

  // ------------------------------------------------------ cause register
  logic [11:0] cause_set;
  always_comb begin
    cause_set = '0;
    cause_set[RC_DRAM_ERR_RST]    = np_dram_err;
    cause_set[RC_GNS_RST]         = gns_rst;
    cause_set[RC_WATCHDOG_RST]    = wdt_expire;
    cause_set[RC_NP_INIT_RST]     = np_w(RA_NP_RESET_NP);
    cause_set[RC_MASTER_RST]      = master_rst;
    cause_set[RC_EDAC_RST]        = np_edac_derr;
    cause_set[RC_CONSOLE_RST]     = console_rst;
    cause_set[RC_MASTER_GTA_DIS]  = master_rst;
    cause_set[RC_TP_GTA_DIS]      = gta_dis_tp;
    cause_set[RC_NP_GTA_DIS]      = gta_dis_np;
    cause_set[RC_TP_DRAM_GTA_DIS] = tp_dram_err;
    cause_set[RC_TP_EDAC_GTA_DIS] = tp_edac_derr;
  end

  reset_cause_reg u_cause (
    .clk,
    .rst_n      (por_n),
    .set        (cause_set),
    .clr_np     (np_w(RA_NP_CLR_NP_CAUSE)),
    .clr_tp     (np_w(RA_NP_CLR_TP_CAUSE)),
    .np_in_reset(np_rst),
    .console_en (console_en),
    .value      (cause)
  );

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)     np_rdata <= '0;
    else if (np_rd) np_rdata <= (np_off == RA_NP_CAUSE_RD) ? cause : 16'h0000;
  end

  // ------------------------------------------- interrupts and flip-flops
  logic flash_busy_q;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      tp_int_np    <= 1'b0;
      np_int_micd  <= 1'b0;
      np_int_flash <= 1'b0;
      flash_busy_q <= 1'b0;
      gta_rst      <= 1'b0;
      flash_wr_en  <= 1'b0;
      flash_rst    <= 1'b0;
      np_test_pt   <= '0;
      tp_test_pt   <= '0;
    end else if (master_rst) begin
      tp_int_np    <= 1'b0;
      np_int_micd  <= 1'b0;
      np_int_flash <= 1'b0;
      flash_busy_q <= flash_busy;
      gta_rst      <= 1'b0;
      flash_wr_en  <= 1'b0;
      flash_rst    <= 1'b0;
      np_test_pt   <= '0;
      tp_test_pt   <= '0;
    end else begin
      flash_busy_q <= flash_busy;

      if (np_w(RA_NP_NP2TP_INT))      tp_int_np <= 1'b1;
      else if (tp_w(RA_TP_NP2TP_ACK)) tp_int_np <= 1'b0;

      if (tp_w(RA_TP_MICD_INT))       np_int_micd <= 1'b1;
      else if (np_w(RA_NP_MICD_ACK))  np_int_micd <= 1'b0;

      if (flash_busy_q && !flash_busy)      np_int_flash <= 1'b1;
      else if (!flash_busy_q && flash_busy) np_int_flash <= 1'b0;

      if (np_w(RA_NP_GTA_RST_SET))        gta_rst <= 1'b1;
      else if (np_w(RA_NP_GTA_RST_CLR))   gta_rst <= 1'b0;
      if (np_w(RA_NP_FLASH_WR_EN))        flash_wr_en <= 1'b1;
      else if (np_w(RA_NP_FLASH_WR_DIS))  flash_wr_en <= 1'b0;
      if (np_w(RA_NP_FLASH_RST_EN))       flash_rst <= 1'b1;
      else if (np_w(RA_NP_FLASH_RST_DIS)) flash_rst <= 1'b0;
      if (np_w(RA_NP_TP1_SET))            np_test_pt[0] <= 1'b1;
      else if (np_w(RA_NP_TP1_CLR))       np_test_pt[0] <= 1'b0;
      if (np_w(RA_NP_TP2_SET))            np_test_pt[1] <= 1'b1;
      else if (np_w(RA_NP_TP2_CLR))       np_test_pt[1] <= 1'b0;
      if (tp_w(RA_TP_TP1_SET))            tp_test_pt[0] <= 1'b1;
      else if (tp_w(RA_TP_TP1_CLR))       tp_test_pt[0] <= 1'b0;
      if (tp_w(RA_TP_TP2_SET))            tp_test_pt[1] <= 1'b1;
      else if (tp_w(RA_TP_TP2_CLR))       tp_test_pt[1] <= 1'b0;
    end
  end

  // The GTA enable cannot be set while a disable cause is active.
  a_gta_dis_wins: assert property (@(posedge clk) gta_dis_any |=> !gta_io_en);
endmodule
