// gns_top: custom hardware of the GPS Navigation Subsystem (GNS).
//
// The GNS has two Mongoose V processors: the navigation processor (NP) and
// the tracking processor (TP). This module is everything between them and
// around them that is not a processor or a memory chip:
//   - np_addr_decode / tp_addr_decode: one address decoder per processor bus;
//   - reset_actel: resets, reset causes, watchdog, GTA I/O access control,
//     NP<->TP interrupts, Flash control and test-point flip-flops;
//   - pci_actel: NP status register and the 1PPS and PCI buffer interrupts;
//   - pci_buffer: 8 KB dual-port RAM shared by the NP and the C&DH;
//   - np_tp_buffer: 8 KB dual-port RAM shared by the NP and the TP, whose
//     lower half the TP can only read;
//   - gta_host_if: the GPS Tracker ASIC's register interface on the TP bus.
// The processors, their Flash and SRAM, the GTA tracking core and the PCI
// target logic towards the C&DH are outside: their signals are ports.
//
// Bus timing (this design's own abstraction of the processor bus): a request
// is one clock with np_req.valid / tp_req.valid high. Writes take effect at
// that clock edge. Read data appears on np_rdata / tp_rdata one clock later,
// with np_rvalid / tp_rvalid high. For the external Flash and SRAM the chip
// select is combinational from the request and the memory must return its
// word on np_ext_rdata / tp_ext_rdata in the following clock. 16-bit devices
// use data bits [15:0] and read with bits [31:16] = 0. A request to an
// undecoded address is ignored and reads 0; one into the DRAM range resets
// the NP (NP bus) or disables GTA I/O (TP bus). While GTA I/O access is
// disabled, TP requests to the GTA are dropped and read 0.
//
// Interrupt outputs follow the processors' numbering: np_int[i] is INT[i],
// np_int_exp[j] is the expansion interrupt INT[5-j]. Only the lines driven
// by this hardware appear; the processor-internal sources (timers, FPU,
// UARTs, EDAC, access violations) and the funnelling of the expansion
// interrupts into INT[5] are inside the processors, so np_int/tp_int bits
// 0, 1, 3, 5 and the other expansion bits are 0 here.
module gns_top
  import gns_pkg::*;
#(
  parameter int unsigned RST_PULSE_CYCLES = 16,
  parameter int unsigned WDT_CYCLES       = 1_000_000
) (
  input  logic         clk,
  input  logic         por_n,
  // external resets and status (active high)
  input  logic         master_rst,
  input  logic         gns_rst,
  input  logic         console_rst,
  input  logic         console_en,
  input  logic         np_edac_derr,
  input  logic         tp_edac_derr,
  input  logic         flash_busy,
  input  logic         iem_id,
  // navigation processor bus
  input  bus_req_t     np_req,
  output logic [31:0]  np_rdata,
  output logic         np_rvalid,
  output logic         np_flash_cs,
  output logic         np_sram_cs,
  input  logic [31:0]  np_ext_rdata,
  // tracking processor bus
  input  bus_req_t     tp_req,
  output logic [31:0]  tp_rdata,
  output logic         tp_rvalid,
  output logic         tp_sram_cs,
  input  logic [31:0]  tp_ext_rdata,
  // C&DH port of the PCI buffer
  input  logic         cdh_en,
  input  logic         cdh_we,
  input  logic [11:0]  cdh_addr,
  input  logic [15:0]  cdh_wdata,
  output logic [15:0]  cdh_rdata,
  // GTA tracking core
  output gta_ctrl_wr_t gta_ctrl_wr,
  input  gta_ctrl_rd_t gta_ctrl_rd,
  output gta_ch_wr_t   gta_ch_wr [GTA_CHANNELS],
  input  gta_ch_rd_t   gta_ch_rd [GTA_CHANNELS],
  input  logic         gta_aic_evt,
  input  logic         gta_mic_evt,
  input  logic         gta_pps,
  output logic         gns_1pps,
  // resets and discrete outputs
  output logic         np_rst,
  output logic         tp_rst,
  output logic         gta_rst,
  output logic         gta_io_en,
  output logic         flash_wr_en,
  output logic         flash_rst,
  output logic [1:0]   np_test_pt,
  output logic [1:0]   tp_test_pt,
  output logic [15:0]  reset_cause,
  output logic         tp_wr_refused,
  // interrupts
  output logic [5:0]   np_int,
  output logic [31:0]  np_int_exp,
  output logic [5:0]   tp_int,
  output logic [31:0]  tp_int_exp
);
  // ------------------------------------------------------------ decoding
  dev_e np_dev, tp_dev, np_dev_q, tp_dev_q;
  logic np_dram_err, tp_dram_err;

  np_addr_decode u_np_dec (.addr(np_req.addr), .valid(np_req.valid), .dev(np_dev), .dram_err(np_dram_err));
  tp_addr_decode u_tp_dec (.addr(tp_req.addr), .valid(tp_req.valid), .dev(tp_dev), .dram_err(tp_dram_err));

  logic np_rd, np_wr, tp_rd, tp_wr;
  assign np_rd = np_req.valid && !np_req.we;
  assign np_wr = np_req.valid &&  np_req.we;
  assign tp_rd = tp_req.valid && !tp_req.we;
  assign tp_wr = tp_req.valid &&  tp_req.we;

  assign np_flash_cs = np_req.valid && np_dev == DEV_FLASH;
  assign np_sram_cs  = np_req.valid && np_dev == DEV_SRAM;
  assign tp_sram_cs  = tp_req.valid && tp_dev == DEV_SRAM;

  // ---------------------------------------------------------- Reset Actel
  logic [15:0] ra_rdata;
  logic        np_int_gta_dis, np_int_micd, np_int_flash, tp_int_np;

  reset_actel #(.RST_PULSE_CYCLES(RST_PULSE_CYCLES), .WDT_CYCLES(WDT_CYCLES)) u_reset_actel (
    .clk, .por_n, .master_rst, .gns_rst, .console_rst, .console_en,
    .np_edac_derr, .np_dram_err, .tp_edac_derr, .tp_dram_err, .flash_busy,
    .np_wr   (np_wr && np_dev == DEV_RST_ACTEL),
    .np_rd   (np_rd && np_dev == DEV_RST_ACTEL),
    .np_off  (np_req.addr[15:0]),
    .np_rdata(ra_rdata),
    .tp_wr   (tp_wr && tp_dev == DEV_RST_ACTEL),
    .tp_off  (tp_req.addr[15:0]),
    .np_rst, .tp_rst, .gta_rst, .gta_io_en,
    .np_int_gta_dis, .np_int_micd, .np_int_flash, .tp_int_np,
    .flash_wr_en, .flash_rst, .np_test_pt, .tp_test_pt,
    .cause   (reset_cause)
  );

  // ------------------------------------------------------------ PCI Actel
  logic [15:0] pa_rdata;
  logic        pcibuf_evt, np_int_pps, np_int_pcibuf;

  pci_actel u_pci_actel (
    .clk, .por_n, .master_rst,
    .np_wr   (np_wr && np_dev == DEV_PCI_ACTEL),
    .np_rd   (np_rd && np_dev == DEV_PCI_ACTEL),
    .np_off  (np_req.addr[3:0]),
    .np_rdata(pa_rdata),
    .flash_busy, .iem_id, .gta_pps, .pcibuf_evt, .np_int_pps, .np_int_pcibuf
  );

  // ------------------------------------------------------------ PCI buffer
  logic [15:0] pb_rdata;

  pci_buffer u_pci_buffer (
    .clk, .rst_n(por_n),
    .np_en   (np_req.valid && np_dev == DEV_PCI_BUF),
    .np_we   (np_req.we),
    .np_addr (np_req.addr[12:1]),
    .np_wdata(np_req.wdata[15:0]),
    .np_rdata(pb_rdata),
    .cdh_en, .cdh_we, .cdh_addr, .cdh_wdata, .cdh_rdata,
    .cdh_int_evt(pcibuf_evt)
  );

  // ---------------------------------------------------------- NP/TP buffer
  logic [15:0] nb_np_rdata, nb_tp_rdata;

  np_tp_buffer u_np_tp_buffer (
    .clk, .rst_n(por_n),
    .np_en   (np_req.valid && np_dev == DEV_NPTP_BUF),
    .np_we   (np_req.we),
    .np_addr (np_req.addr[12:1]),
    .np_wdata(np_req.wdata[15:0]),
    .np_rdata(nb_np_rdata),
    .tp_en   (tp_req.valid && tp_dev == DEV_NPTP_BUF),
    .tp_we   (tp_req.we),
    .tp_addr (tp_req.addr[12:1]),
    .tp_wdata(tp_req.wdata[15:0]),
    .tp_rdata(nb_tp_rdata),
    .tp_wr_refused
  );

  // ------------------------------------------------------------------ GTA
  logic [15:0] gta_rdata;
  logic        gta_pps_q, gta_aic_int, gta_mic_int, gta_pps_int;
  logic        gta_access;

  // The Reset Actel's enable gates every TP access to the GTA registers.
  assign gta_access = tp_req.valid && tp_dev == DEV_GTA && gta_io_en;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) gta_pps_q <= 1'b0;
    else        gta_pps_q <= gta_pps;
  end

  gta_host_if u_gta_host_if (
    .clk, .rst_n(por_n), .clr(gta_rst || master_rst),
    .en     (gta_access),
    .we     (tp_req.we),
    .idx    (tp_req.addr[8:1]),
    .wdata  (tp_req.wdata[15:0]),
    .rdata  (gta_rdata),
    .ctrl_wr(gta_ctrl_wr), .ctrl_rd(gta_ctrl_rd),
    .ch_wr  (gta_ch_wr),   .ch_rd  (gta_ch_rd),
    .aic_evt(gta_aic_evt), .mic_evt(gta_mic_evt),
    .pps_evt(gta_pps && !gta_pps_q),
    .aic_int(gta_aic_int), .mic_int(gta_mic_int), .pps_int(gta_pps_int)
  );

  assign gns_1pps = gta_pps;

  // ------------------------------------------------------------ read path
  logic tp_gta_ok_q;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      np_dev_q    <= DEV_NONE;
      tp_dev_q    <= DEV_NONE;
      np_rvalid   <= 1'b0;
      tp_rvalid   <= 1'b0;
      tp_gta_ok_q <= 1'b0;
    end else begin
      np_dev_q    <= np_dev;
      tp_dev_q    <= tp_dev;
      np_rvalid   <= np_rd;
      tp_rvalid   <= tp_rd;
      tp_gta_ok_q <= gta_io_en;
    end
  end

  always_comb begin
    unique case (np_dev_q)
      DEV_FLASH, DEV_SRAM: np_rdata = np_ext_rdata;
      DEV_RST_ACTEL:       np_rdata = {16'h0, ra_rdata};
      DEV_PCI_ACTEL:       np_rdata = {16'h0, pa_rdata};
      DEV_PCI_BUF:         np_rdata = {16'h0, pb_rdata};
      DEV_NPTP_BUF:        np_rdata = {16'h0, nb_np_rdata};
      default:             np_rdata = '0;
    endcase
    unique case (tp_dev_q)
      DEV_SRAM:            tp_rdata = tp_ext_rdata;
      DEV_NPTP_BUF:        tp_rdata = {16'h0, nb_tp_rdata};
      DEV_GTA:             tp_rdata = tp_gta_ok_q ? {16'h0, gta_rdata} : '0;
      default:             tp_rdata = '0;
    endcase
  end

  // ----------------------------------------------------------- interrupts
  always_comb begin
    np_int        = '0;
    np_int[2]     = np_int_pps;       // GTA steered 1PPS (via PCI Actel)
    np_int[4]     = np_int_gta_dis;   // GTA I/O disabled
    np_int_exp    = '0;
    np_int_exp[2] = np_int_pcibuf;    // C&DH wrote PCI buffer word 0x0FFF
    np_int_exp[7] = np_int_micd;      // MIC-delayed, from the TP
    np_int_exp[8] = np_int_flash;     // Flash erase/program done
    tp_int        = '0;
    tp_int[2]     = gta_aic_int;      // GTA AIC
    tp_int[4]     = gta_mic_int;      // GTA MIC
    tp_int_exp    = '0;
    tp_int_exp[0] = tp_int_np;        // from the NP
    tp_int_exp[1] = gta_pps_int;      // GTA steered 1PPS
  end
endmodule
