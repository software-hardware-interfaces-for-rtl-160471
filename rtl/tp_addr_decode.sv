// tp_addr_decode: address decoder of the tracking processor (TP) bus.
//
// Combinational, on address bits [28:0] (the top three bits are ignored).
// Windows, from the TP memory map:
//   DRAM         0x0000.0000-0x0FFF.FFFF  no DRAM fitted: an access is an error
//   SRAM         0x1000.0000-0x101F.FFFF  bits 21-26 not decoded (rollover)
//   Reset Actel  0x1C20.0000-0x1C20.FFFF  TP page of the Reset Actel
//   GTA          0x1D30.0000-0x1D37.FFFF
//   NP/TP buffer 0x1FC0.0000-0x1FC0.1FFF  (SPEC0, holds the TP boot code)
// The DRAM window is taken to be the same as the NP's; the 64 KB size of the
// Reset Actel TP page is this design's choice. Anything else is DEV_NONE.
// dram_err is high for a valid request into the DRAM range: the Reset Actel
// turns it into a GTA I/O access disable with cause bit 10.
module tp_addr_decode
  import gns_pkg::*;
(
  input  logic [31:0] addr,
  input  logic        valid,
  output dev_e        dev,
  output logic        dram_err
);
  logic [28:0] a;
  assign a = addr[28:0];

  always_comb begin
    dev = DEV_NONE;
    if (a[28] == 1'b0)                          dev = DEV_DRAM;
    else if (a[28:27] == 2'b10)                 dev = DEV_SRAM;
    else if (a[28:16] == 13'h1C20)              dev = DEV_RST_ACTEL;
    else if (a[28:19] == 10'h3A6)               dev = DEV_GTA;
    else if (a[28:13] == 16'hFE00)              dev = DEV_NPTP_BUF;
  end

  assign dram_err = valid && (dev == DEV_DRAM);
endmodule
