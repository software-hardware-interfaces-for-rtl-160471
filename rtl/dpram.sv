// dpram: true dual-port synchronous RAM, the storage of both GNS buffers.
//
// Two independent ports A and B on one clock. Each port writes wdata at addr
// when we is high, and returns the word at addr one clock after the request
// (read-first: a read of the word being written returns the old contents).
// If both ports write the same word in one cycle, port A wins; the buffers
// treat port A as the navigation processor side. Contents are not reset.
module dpram #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
    if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
  end
endmodule
