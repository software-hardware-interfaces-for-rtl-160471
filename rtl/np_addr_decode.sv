// np_addr_decode: address decoder of the navigation processor (NP) bus.
//
// Combinational. Looks at address bits [28:0] (the three most significant
// bits select user/kernel and cached space and are ignored) and names the
// device a request goes to. Windows, from the NP memory map:
//   DRAM        0x0000.0000-0x0FFF.FFFF  no DRAM fitted: an access is an error
//   SRAM        0x1000.0000-0x101F.FFFF  bits 21-26 not decoded (rollover)
//   Reset Actel 0x1C10.0000-0x1C10.FFFF
//   PCI Actel   0x1C18.0000-0x1C18.000F
//   PCI buffer  0x1D20.0000-0x1D20.1FFF
//   NP/TP buffer 0x1D28.0000-0x1D28.1FFF
//   Flash       0x1F00.0000-0x1F3F.FFFF  bits 22-23 not decoded (rollover)
// Anything else selects DEV_NONE; that fallback is this design's choice.
// dram_err is high for a valid request into the DRAM range: the Reset Actel
// turns it into an NP reset with cause bit 0.
module np_addr_decode
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
    else if (a[28:16] == 13'h1C10)              dev = DEV_RST_ACTEL;
    else if (a[28:4] == 25'h1C1_8000)           dev = DEV_PCI_ACTEL;
    else if (a[28:13] == 16'hE900)              dev = DEV_PCI_BUF;
    else if (a[28:13] == 16'hE940)              dev = DEV_NPTP_BUF;
    else if (a[28:24] == 5'h1F)                 dev = DEV_FLASH;
  end

  assign dram_err = valid && (dev == DEV_DRAM);
endmodule
