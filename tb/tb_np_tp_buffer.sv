// tb_np_tp_buffer: self-checking test of the NP/TP dual-port buffer.
// The NP loads a boot image into the lower half; random NP and TP traffic
// follows, with every read compared to a reference array. TP writes to the
// lower half must leave it unchanged and raise tp_wr_refused; TP writes to
// the upper half must land and be seen by the NP.
module tb_np_tp_buffer;
  localparam int WORDS = 4096;
  logic        clk = 0, rst_n = 1;
  logic        np_en = 0, np_we = 0, tp_en = 0, tp_we = 0;
  logic [11:0] np_addr = '0, tp_addr = '0;
  logic [15:0] np_wdata = '0, tp_wdata = '0, np_rdata, tp_rdata;
  logic        tp_wr_refused;
  logic [15:0] model [WORDS];
  int checks = 0, failures = 0, refused = 0, exp_refused = 0, tp_upper_writes = 0;

  np_tp_buffer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && tp_wr_refused) refused++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  logic        np_rd_q, tp_rd_q;
  logic [11:0] np_a_q, tp_a_q;
  logic [15:0] np_exp_q, tp_exp_q;

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); np_en = 1; np_we = 1; np_addr = 12'(i); np_wdata = 16'(i * 7 + 3);
      model[i] = np_wdata;
    end
    @(negedge clk); np_en = 0;
    np_rd_q = 0; tp_rd_q = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (np_rd_q) chk(np_rdata == np_exp_q, $sformatf("NP read %h", np_a_q));
      if (tp_rd_q) chk(tp_rdata == tp_exp_q, $sformatf("TP read %h", tp_a_q));
      np_en = ($urandom % 4) == 0; np_we = $urandom; np_addr = 12'($urandom); np_wdata = 16'($urandom);
      tp_en = $urandom; tp_we = $urandom; tp_addr = 12'($urandom); tp_wdata = 16'($urandom);
      if (np_en && np_we && tp_en && tp_we && np_addr == tp_addr) tp_we = 0;
      np_rd_q = np_en && !np_we; np_a_q = np_addr; np_exp_q = model[np_addr];
      tp_rd_q = tp_en && !tp_we; tp_a_q = tp_addr; tp_exp_q = model[tp_addr];
      // reads return the old contents (read-first): expected values were
      // taken above, before the model is updated with this cycle's writes
      @(posedge clk);
      if (np_en && np_we) model[np_addr] = np_wdata;
      if (tp_en && tp_we) begin
        if (tp_addr >= 12'h800) begin model[tp_addr] = tp_wdata; tp_upper_writes++; end
        else exp_refused++;
      end
    end
    @(negedge clk); np_en = 0; tp_en = 0;
    repeat (2) @(negedge clk);
    chk(refused == exp_refused, $sformatf("%0d refused TP writes, expected %0d", refused, exp_refused));
    chk(exp_refused > 100 && tp_upper_writes > 100, "both halves written by the TP");
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); np_en = 1; np_we = 0; np_addr = 12'(i);
      @(negedge clk); np_en = 0;
      chk(np_rdata == model[i], $sformatf("readback %h", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
