// np_tp_buffer: 8 KB dual-port RAM between the navigation processor (NP)
// and the tracking processor (TP).
//
// 4096 words of 16 bits in two 4 KB halves. The NP may read and write all of
// it. The TP may read all of it but write only the upper half (words
// 0x800-0xFFF, byte offsets 0x1000-0x1FFF): the lower half is the TP's
// "pseudo non-volatile" memory, loaded by the NP with the TP boot code and
// application. A TP write into the lower half leaves the RAM unchanged and
// pulses tp_wr_refused for one clock; that flag is this design's addition.
// Both ports are addressed by word (byte offset bits [12:1]); reads return
// data one clock after the request. The NP wins a same-word write collision.
module np_tp_buffer #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        np_en,
  input  logic        np_we,
  input  logic [11:0] np_addr,
  input  logic [15:0] np_wdata,
  output logic [15:0] np_rdata,
  input  logic        tp_en,
  input  logic        tp_we,
  input  logic [11:0] tp_addr,
  input  logic [15:0] tp_wdata,
  output logic [15:0] tp_rdata,
  output logic        tp_wr_refused
);
  localparam int unsigned AW = $clog2(WORDS);

  logic tp_upper, tp_we_ok;
  assign tp_upper = tp_addr[AW-1];
  assign tp_we_ok = tp_we && tp_upper;

  dpram #(.WORDS(WORDS), .WIDTH(16)) u_ram (
    .clk,
    .a_en(np_en), .a_we(np_we),    .a_addr(np_addr[AW-1:0]), .a_wdata(np_wdata), .a_rdata(np_rdata),
    .b_en(tp_en), .b_we(tp_we_ok), .b_addr(tp_addr[AW-1:0]), .b_wdata(tp_wdata), .b_rdata(tp_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tp_wr_refused <= 1'b0;
    else        tp_wr_refused <= tp_en && tp_we && !tp_upper;
  end
endmodule
