// tb_reset_cause_reg: drives random set and clear pulses into the Reset Cause
// Register and compares every clock with a reference model: bits [6:0] and
// [11:7] sticky, cleared by their own section's clear, set winning over a
// clear in the same clock; bits 13/14 live; bits 12 and 15 always 0.
module tb_reset_cause_reg;
  logic        clk = 0, rst_n = 1;
  logic [11:0] set = '0;
  logic        clr_np = 0, clr_tp = 0, np_in_reset = 0, console_en = 0;
  logic [15:0] value;
  logic [11:0] model;
  int checks = 0, failures = 0;

  reset_cause_reg dut (.clk, .rst_n, .set, .clr_np, .clr_tp, .np_in_reset, .console_en, .value);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    model = '0;
    checks++;
    if (value !== 16'h0000) begin failures++; $display("FAIL after reset %h", value); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // sparse random events
      set         = 12'($urandom) & 12'($urandom) & 12'($urandom);
      clr_np      = ($urandom % 6) == 0;
      clr_tp      = ($urandom % 6) == 0;
      np_in_reset = $urandom;
      console_en  = $urandom;
      @(posedge clk);
      if (clr_np) model[6:0]  = '0;
      if (clr_tp) model[11:7] = '0;
      model |= set;
      #1;
      checks++;
      if (value !== {1'b0, console_en, np_in_reset, 1'b0, model}) begin
        failures++;
        $display("FAIL i=%0d value=%h expected %h", i, value, {1'b0, console_en, np_in_reset, 1'b0, model});
      end
    end
    // the two sections clear independently
    @(negedge clk); set = 12'hFFF; clr_np = 0; clr_tp = 0;
    @(negedge clk); set = '0; clr_np = 1;
    @(negedge clk); clr_np = 0;
    checks++;
    if (value[11:0] !== 12'hF80) begin failures++; $display("FAIL NP clear %h", value); end
    clr_tp = 1; @(negedge clk); clr_tp = 0;
    checks++;
    if (value[11:0] !== 12'h000) begin failures++; $display("FAIL TP clear %h", value); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
