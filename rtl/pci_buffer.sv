// pci_buffer: 8 KB PCI dual-port RAM between the navigation processor (NP)
// and the C&DH subsystem, with the once-per-second C&DH write interrupt.
//
// 4096 words of 16 bits. The NP port is addressed by word (byte offset
// bits [12:1] of the 0x1D20.0000 window). The C&DH port is a plain
// synchronous word port: the PCI target logic that would drive it is not
// part of this design. Reads return data one clock after the request.
// When the C&DH writes word 0x0FFF (byte offset 0x1FFE, "C&DH 1PPS" in the
// buffer map) cdh_int_evt pulses for one clock, one clock after the write;
// the PCI Actel latches it into interrupt INT[5-2]. Writes to the other
// three interrupt words (0x0FFC-0x0FFE) raise nothing, as the map marks
// them unused. If both sides write the same word in one cycle the NP wins
// (this design's choice).
module pci_buffer #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // navigation processor side
  input  logic        np_en,
  input  logic        np_we,
  input  logic [11:0] np_addr,
  input  logic [15:0] np_wdata,
  output logic [15:0] np_rdata,
  // C&DH side
  input  logic        cdh_en,
  input  logic        cdh_we,
  input  logic [11:0] cdh_addr,
  input  logic [15:0] cdh_wdata,
  output logic [15:0] cdh_rdata,
  output logic        cdh_int_evt
);
  localparam int unsigned AW = $clog2(WORDS);

  dpram #(.WORDS(WORDS), .WIDTH(16)) u_ram (
    .clk,
    .a_en(np_en),   .a_we(np_we),   .a_addr(np_addr[AW-1:0]),  .a_wdata(np_wdata),  .a_rdata(np_rdata),
    .b_en(cdh_en),  .b_we(cdh_we),  .b_addr(cdh_addr[AW-1:0]), .b_wdata(cdh_wdata), .b_rdata(cdh_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cdh_int_evt <= 1'b0;
    else        cdh_int_evt <= cdh_en && cdh_we && (cdh_addr == gns_pkg::PCIBUF_INT_WORD);
  end
endmodule
