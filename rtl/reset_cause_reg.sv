// reset_cause_reg: the Reset Actel's 16-bit Reset Cause Register.
//
// Bits [6:0] record why the navigation processor (NP) was reset: DRAM access
// error, GNS reset, watchdog, NP initiated, IEM master reset, EDAC double
// error, console reset. Bits [11:7] record why GTA I/O access was disabled:
// master reset, TP software, NP software, TP DRAM access error, TP EDAC
// double error. These twelve flags are sticky: set[i] high for a clock sets
// bit i, and it stays set until software clears its section (clr_np clears
// [6:0], clr_tp clears [11:7]). Bit 13 shows live whether the NP is being
// held in reset, bit 14 whether the ground support console is enabled.
// Bits 12 and 15 are reserved and read 0.
// This design's choices: a set in the same clock as a clear wins, so no cause
// is lost; only the Actel's own power-on reset (rst_n) clears the flags, so
// they survive the processor resets they record.
module reset_cause_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] set,
  input  logic        clr_np,
  input  logic        clr_tp,
  input  logic        np_in_reset,
  input  logic        console_en,
  output logic [15:0] value
);
  logic [11:0] flags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
    end else begin
      flags <= (flags & ~{{5{clr_tp}}, {7{clr_np}}}) | set;
    end
  end

  always_comb begin
    value = '0;
    value[11:0] = flags;
    value[gns_pkg::RC_NP_IN_RESET] = np_in_reset;
    value[gns_pkg::RC_CONSOLE_EN]  = console_en;
  end
endmodule
