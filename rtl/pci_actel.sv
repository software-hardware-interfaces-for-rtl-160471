// pci_actel: the navigation processor's view of the PCI Actel.
//
// Eight 16-bit registers at 0x1C18.0000-0x1C18.000F (np_off = address bits
// [3:0]); three of them are used by the navigation processor (NP):
//   0x6 Transaction Status (read): bit 5 Flash busy, bit 6 IEM ID (0 = IEM A,
//       1 = IEM B). The other bits belong to the PCI master and read 0 here.
//   0x8 write (data ignored): acknowledge the PCI buffer interrupt INT[5-2].
//   0xA write (data ignored): acknowledge the GTA steered 1PPS interrupt INT[2].
// INT[2] is set on each rising edge of the GTA's steered 1PPS; INT[5-2] is
// set by the PCI buffer's pulse when the C&DH writes buffer word 0x0FFF.
// Each stays high until its acknowledge; a set in the same clock as its
// acknowledge wins (this design's choice). The five registers meant for the
// PCI master are not built and read 0. Reads return data one clock after the
// request. The register map names register 0x8 for the PCI buffer and 0xA
// for the 1PPS acknowledge; that assignment is the one used here.
module pci_actel
  import gns_pkg::*;
(
  input  logic        clk,
  input  logic        por_n,
  input  logic        master_rst,
  input  logic        np_wr,
  input  logic        np_rd,
  input  logic [3:0]  np_off,
  output logic [15:0] np_rdata,
  input  logic        flash_busy,
  input  logic        iem_id,
  input  logic        gta_pps,
  input  logic        pcibuf_evt,
  output logic        np_int_pps,     // NP INT[2]
  output logic        np_int_pcibuf   // NP INT[5-2]
);
  logic pps_q;
  logic [15:0] status;

  always_comb begin
    status = '0;
    status[PA_FLASH_BUSY_BIT] = flash_busy;
    status[PA_IEM_ID_BIT]     = iem_id;
  end

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      pps_q         <= 1'b0;
      np_int_pps    <= 1'b0;
      np_int_pcibuf <= 1'b0;
      np_rdata      <= '0;
    end else begin
      pps_q <= gta_pps;
      if (master_rst) begin
        np_int_pps    <= 1'b0;
        np_int_pcibuf <= 1'b0;
      end else begin
        if (gta_pps && !pps_q)                      np_int_pps <= 1'b1;
        else if (np_wr && np_off == PA_PPS_ACK)     np_int_pps <= 1'b0;
        if (pcibuf_evt)                             np_int_pcibuf <= 1'b1;
        else if (np_wr && np_off == PA_PCIBUF_ACK)  np_int_pcibuf <= 1'b0;
      end
      if (np_rd) np_rdata <= (np_off == PA_TRANS_STATUS) ? status : 16'h0000;
    end
  end
endmodule
