// tb_watchdog_timer: checks that the watchdog fires exactly TIMEOUT_CYCLES
// clocks after the last kick (expire registered, so it is high in the clock
// that follows the T-th edge), that kicks and hold restart it, and that it
// keeps firing once per period when never kicked. A final random phase
// drives kick and hold at random and compares expire in every clock with a
// reference that counts the quiet clocks since the last restart.
module tb_watchdog_timer;
  localparam int unsigned T = 20;
  logic clk = 0, rst_n = 1, hold = 0, kick = 0, expire;
  int checks = 0, failures = 0;
  int cyc = 0, last_fire = -1, fires = 0;

  watchdog_timer #(.TIMEOUT_CYCLES(T)) dut (.clk, .rst_n, .hold, .kick, .expire);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && expire) begin fires++; last_fire = cyc; end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cyc=%0d)", msg, cyc); end
  endtask

  int start;
  // reference: a restart (kick or hold) clears the quiet count; the T-th
  // quiet clock raises expire for one clock and starts a new period.
  int quiet;
  bit model_on = 0, exp_expire = 0;
  always @(posedge clk) if (model_on) begin
    exp_expire <= 0;
    if (hold || kick) quiet <= 0;
    else if (quiet + 1 == T) begin quiet <= 0; exp_expire <= 1; end
    else quiet <= quiet + 1;
  end
  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // kicked every 15 clocks: never fires
    for (int i = 0; i < 10; i++) begin
      repeat (14) @(negedge clk);
      kick = 1; @(negedge clk); kick = 0;
    end
    chk(fires == 0, "fired while kicked in time");
    // stop kicking: first expire exactly T clocks after the kick
    kick = 1; @(negedge clk); kick = 0; start = cyc;
    wait (fires == 1); @(negedge clk);
    // expire is registered: it goes high at the T-th edge after the kick and
    // is sampled by the monitor at the next one.
    chk(last_fire - start == T + 1, $sformatf("period %0d expected %0d", last_fire - start, T + 1));
    // free running: next one T later
    wait (fires == 2); @(negedge clk);
    chk(last_fire - start == 2 * T + 1, "second expire not one period later");
    // hold for many clocks: no expire; then T clocks after release
    hold = 1; repeat (3 * T) @(negedge clk);
    chk(fires == 2, "fired while held");
    hold = 0; start = cyc;
    wait (fires == 3); @(negedge clk);
    chk(last_fire - start == T + 1, "period after hold");
    chk(expire == 0, "expire is one clock long");
    // random kicks and holds against the reference, one check per clock
    quiet = 0; model_on = 1; fires = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(expire == exp_expire, $sformatf("random phase: expire %0b, expected %0b", expire, exp_expire));
      kick = ($urandom % (T + 4)) == 0;
      hold = ($urandom % 97) == 0;
    end
    kick = 0; hold = 0;
    chk(fires > 10, $sformatf("random phase fired only %0d times", fires));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
