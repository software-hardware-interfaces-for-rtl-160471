// gns_pkg: shared types and address constants of the GNS custom hardware.
//
// Both Mongoose V processors reach the custom logic through a simple
// synchronous bus request (bus_req_t): one cycle with valid high carries a
// read or a write; read data comes back one clock later. The processors'
// own bus cycle and wait-state segments (SPEC0..SPEC3) are outside this
// design, so this single-cycle request is this design's own abstraction.
//
// Addresses are 32-bit physical addresses. The three most significant bits
// (user/kernel, cached/uncached) are ignored everywhere, as the memory map
// prescribes, so decoding uses bits [28:0]. The constants below are the
// register and buffer addresses of the memory maps (Reset Actel page,
// PCI Actel, GTA), written as offsets inside their decoded windows.
package gns_pkg;

  typedef struct packed {
    logic        valid;   // one-cycle request strobe
    logic        we;      // 1 = write, 0 = read
    logic [31:0] addr;    // byte address
    logic [31:0] wdata;   // 16-bit devices use wdata[15:0]
  } bus_req_t;

  // Device selected by an address decoder.
  typedef enum logic [3:0] {
    DEV_NONE      = 4'd0,  // undecoded: no device answers, reads return 0
    DEV_DRAM      = 4'd1,  // reserved DRAM range: an error, no device
    DEV_FLASH     = 4'd2,
    DEV_SRAM      = 4'd3,
    DEV_RST_ACTEL = 4'd4,
    DEV_PCI_ACTEL = 4'd5,
    DEV_PCI_BUF   = 4'd6,
    DEV_NPTP_BUF  = 4'd7,
    DEV_GTA       = 4'd8
  } dev_e;

  // ---------------- Reset Actel, navigation processor page 0x1C10.xxxx
  localparam logic [15:0] RA_NP_CAUSE_RD     = 16'h0000; // read Reset Cause Register
  localparam logic [15:0] RA_NP_WATCHDOG     = 16'h794C; // reset watchdog
  localparam logic [15:0] RA_NP_GTA_RST_CLR  = 16'h7874; // clear GTA reset flip-flop
  localparam logic [15:0] RA_NP_GTA_RST_SET  = 16'h7876; // set GTA reset flip-flop
  localparam logic [15:0] RA_NP_TP1_CLR      = 16'h7878; // NP test point #1
  localparam logic [15:0] RA_NP_TP1_SET      = 16'h787A;
  localparam logic [15:0] RA_NP_TP2_CLR      = 16'h787C; // NP test point #2
  localparam logic [15:0] RA_NP_TP2_SET      = 16'h787E;
  localparam logic [15:0] RA_NP_CLR_NP_CAUSE = 16'hB464; // clear cause bits [6:0]
  localparam logic [15:0] RA_NP_RESET_NP     = 16'hB466; // NP initiated NP reset
  localparam logic [15:0] RA_NP_RESET_TP     = 16'hB468; // reset tracking processor
  localparam logic [15:0] RA_NP_MICD_ACK     = 16'hB46A; // MIC-delayed interrupt ack
  localparam logic [15:0] RA_NP_NP2TP_INT    = 16'hB46C; // NP to TP interrupt
  localparam logic [15:0] RA_NP_CLR_TP_CAUSE = 16'hB46E; // clear cause bits [11:7]
  localparam logic [15:0] RA_NP_GTA_EN       = 16'hCB40; // enable GTA I/O access
  localparam logic [15:0] RA_NP_GTA_DIS      = 16'hCB42; // disable GTA I/O access
  localparam logic [15:0] RA_NP_FLASH_WR_DIS = 16'hCB48;
  localparam logic [15:0] RA_NP_FLASH_WR_EN  = 16'hCB4A;
  localparam logic [15:0] RA_NP_FLASH_RST_DIS = 16'hCB4C;
  localparam logic [15:0] RA_NP_FLASH_RST_EN = 16'hCB4E;

  // ---------------- Reset Actel, tracking processor page 0x1C20.xxxx
  localparam logic [15:0] RA_TP_NP2TP_ACK    = 16'h0000; // NP->TP interrupt ack
  localparam logic [15:0] RA_TP_GTA_DIS      = 16'h0002; // TP disables GTA I/O
  localparam logic [15:0] RA_TP_MICD_INT     = 16'h0004; // MIC-delayed interrupt to NP
  localparam logic [15:0] RA_TP_TP1_CLR      = 16'h0008; // TP test point #1
  localparam logic [15:0] RA_TP_TP1_SET      = 16'h000A;
  localparam logic [15:0] RA_TP_TP2_CLR      = 16'h000C; // TP test point #2
  localparam logic [15:0] RA_TP_TP2_SET      = 16'h000E;

  // ---------------- Reset Cause Register bit positions
  localparam int RC_DRAM_ERR_RST   = 0;
  localparam int RC_GNS_RST        = 1;
  localparam int RC_WATCHDOG_RST   = 2;
  localparam int RC_NP_INIT_RST    = 3;
  localparam int RC_MASTER_RST     = 4;
  localparam int RC_EDAC_RST       = 5;
  localparam int RC_CONSOLE_RST    = 6;
  localparam int RC_MASTER_GTA_DIS = 7;
  localparam int RC_TP_GTA_DIS     = 8;
  localparam int RC_NP_GTA_DIS     = 9;
  localparam int RC_TP_DRAM_GTA_DIS = 10;
  localparam int RC_TP_EDAC_GTA_DIS = 11;
  localparam int RC_NP_IN_RESET    = 13;
  localparam int RC_CONSOLE_EN     = 14;

  // ---------------- PCI Actel register offsets (0x1C18.0000 .. 0x1C18.000F)
  localparam logic [3:0] PA_TRANS_STATUS = 4'h6;
  localparam logic [3:0] PA_PCIBUF_ACK   = 4'h8;
  localparam logic [3:0] PA_PPS_ACK      = 4'hA;
  localparam int PA_FLASH_BUSY_BIT = 5;
  localparam int PA_IEM_ID_BIT     = 6;

  // ---------------- PCI buffer: word written by the C&DH once per second
  localparam logic [11:0] PCIBUF_INT_WORD = 12'hFFF;  // byte offset 0x1FFE

  // ---------------- GTA (base address BA = 0x1D30.0000)
  localparam int GTA_CHANNELS      = 12;  // tracking channels x = 1..12
  localparam int GTA_CTRL_REGS     = 14;  // control/status registers BA..BA+26
  localparam int GTA_REGS_PER_CH   = 16;  // registers per channel
  localparam int GTA_TIMING_CONFIG = 6;   // word index of timing_config (BA+12)
  localparam int GTA_ACK_AIC_BIT   = 2;
  localparam int GTA_ACK_MIC_BIT   = 3;
  localparam int GTA_ACK_PPS_BIT   = 4;

  // Registers the processor writes into the GTA ("input" in the GTA map).
  typedef struct packed {
    logic [11:0] ant_tracker_sela;
    logic [11:0] ant_tracker_selb;
    logic [11:0] ch_code_select;
    logic [11:0] nco_carr_clear;
    logic [11:0] nco_code_clear;
    logic [8:0]  corr_config;
    logic [5:0]  timing_config;
    logic [15:0] pps_div_lower;
    logic [8:0]  pps_div_upper;
    logic [15:0] aux_decode1;
    logic [15:0] aux_decode2;
    logic [15:0] aux_decode3;
    logic [15:0] aux_decode4;
  } gta_ctrl_wr_t;

  // Registers the processor reads from the GTA ("output" in the GTA map).
  typedef struct packed {
    logic [13:0] mic_div_reg;
    logic [15:0] pps_mic_off_lower;
    logic [10:0] pps_mic_off_upper;
    logic [11:0] tr_dat_lrch;
    logic [11:0] ant0_agc;
  } gta_ctrl_rd_t;

  typedef struct packed {
    logic [15:0] carnco_phincr_upper;
    logic [7:0]  carnco_phincr_lower;
    logic [15:0] code_phincr_upper;
    logic [7:0]  code_phincr_lower;
    logic [9:0]  cacode_svphs;
    logic [4:0]  epochaccum;
  } gta_ch_wr_t;

  typedef struct packed {
    logic [15:0] carnco_phase;
    logic [15:0] codenco_phase;
    logic [9:0]  cacode_phase;
    logic [9:0]  epoch_cnt;
    logic [15:0] cyc_cnt_upper;
    logic [15:0] cyc_cnt_lower;
    logic [15:0] accum_ie;
    logic [15:0] accum_ip;
    logic [15:0] accum_il;
    logic [15:0] accum_qe;
    logic [15:0] accum_qp;
    logic [15:0] accum_ql;
  } gta_ch_rd_t;

endpackage
