// watchdog_timer: navigation processor watchdog of the Reset Actel.
//
// The NP must write the watchdog address (0x1C10.794C, data ignored) more
// often than once every TIMEOUT_CYCLES clocks. Each write (kick) restarts
// the count; if the count reaches TIMEOUT_CYCLES, expire pulses for one
// clock and the count starts again from zero. While the NP is held in reset
// (hold) the count stays at zero, so a fresh full period follows every reset.
// The required write rate is not given for this hardware; TIMEOUT_CYCLES is
// this design's choice and should be set from the real clock and period.
module watchdog_timer #(
  parameter int unsigned TIMEOUT_CYCLES = 1_000_000,
  localparam int unsigned CW = $clog2(TIMEOUT_CYCLES + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hold,
  input  logic kick,
  output logic expire
);
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      expire <= 1'b0;
    end else begin
      expire <= 1'b0;
      if (hold || kick) begin
        count <= '0;
      end else if (count == CW'(TIMEOUT_CYCLES - 1)) begin
        count  <= '0;
        expire <= 1'b1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
