// tb_pci_buffer: self-checking test of the PCI dual-port buffer.
// Random reads and writes from both the NP and the C&DH ports, every word of
// the 4096 checked against a reference array; the interrupt event must
// appear exactly once per C&DH write to word 0x0FFF, never for an NP write
// there or for C&DH writes to the unused interrupt words 0x0FFC-0x0FFE, and
// read data must arrive one clock after the request.
module tb_pci_buffer;
  localparam int WORDS = 4096;
  logic        clk = 0, rst_n = 1;
  logic        np_en = 0, np_we = 0, cdh_en = 0, cdh_we = 0;
  logic [11:0] np_addr = '0, cdh_addr = '0;
  logic [15:0] np_wdata = '0, cdh_wdata = '0, np_rdata, cdh_rdata;
  logic        cdh_int_evt;
  logic [15:0] model [WORDS];
  int checks = 0, failures = 0, evts = 0, exp_evts = 0;

  pci_buffer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cdh_int_evt) evts++;

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

  logic        np_rd_q, cdh_rd_q, evt_q = 0;
  logic [11:0] np_a_q, cdh_a_q;
  logic [15:0] np_exp_q, cdh_exp_q;

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    // fill from both sides: even words by the NP, odd by the C&DH
    for (int i = 0; i < WORDS; i += 2) begin
      @(negedge clk);
      np_en = 1; np_we = 1; np_addr = 12'(i); np_wdata = 16'($urandom);
      cdh_en = 1; cdh_we = 1; cdh_addr = 12'(i + 1); cdh_wdata = 16'($urandom);
      model[i] = np_wdata; model[i + 1] = cdh_wdata;
      if (i + 1 == 12'hFFF) exp_evts++;
    end
    @(negedge clk); np_en = 0; cdh_en = 0;
    // random traffic, reads checked one clock later
    np_rd_q = 0; cdh_rd_q = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (np_rd_q) chk(np_rdata == np_exp_q, $sformatf("NP read %h", np_a_q));
      if (cdh_rd_q) chk(cdh_rdata == cdh_exp_q, $sformatf("C&DH read %h", cdh_a_q));
      chk(cdh_int_evt == evt_q, $sformatf("interrupt event %b, expected %b", cdh_int_evt, evt_q));
      np_en = $urandom; np_we = $urandom; np_addr = 12'($urandom); np_wdata = 16'($urandom);
      cdh_en = $urandom; cdh_we = $urandom; cdh_addr = 12'($urandom); cdh_wdata = 16'($urandom);
      if (i % 97 == 0) cdh_addr = 12'hFFC + 12'($urandom % 4);
      if (np_en && np_we && cdh_en && cdh_we && np_addr == cdh_addr) cdh_we = 0;
      evt_q = cdh_en && cdh_we && cdh_addr == 12'hFFF;
      np_rd_q = np_en && !np_we; np_a_q = np_addr; np_exp_q = model[np_addr];
      cdh_rd_q = cdh_en && !cdh_we; cdh_a_q = cdh_addr; cdh_exp_q = model[cdh_addr];
      // reads return the old contents (read-first): expected values were
      // taken above, before the model is updated with this cycle's writes
      @(posedge clk);
      if (np_en && np_we) model[np_addr] = np_wdata;
      if (cdh_en && cdh_we) model[cdh_addr] = cdh_wdata;
      if (cdh_en && cdh_we && cdh_addr == 12'hFFF) exp_evts++;
    end
    @(negedge clk);
    if (np_rd_q) chk(np_rdata == np_exp_q, "last NP read");
    if (cdh_rd_q) chk(cdh_rdata == cdh_exp_q, "last C&DH read");
    np_en = 0; cdh_en = 0;
    // NP write to 0x0FFF raises nothing
    @(negedge clk); np_en = 1; np_we = 1; np_addr = 12'hFFF; model[12'hFFF] = np_wdata;
    @(negedge clk); np_en = 0;
    // a C&DH write to 0x0FFF gives a one-clock event, one clock later
    @(negedge clk); cdh_en = 1; cdh_we = 1; cdh_addr = 12'hFFF; exp_evts++; model[12'hFFF] = cdh_wdata;
    @(negedge clk); cdh_en = 0;
    chk(cdh_int_evt, "event one clock after the C&DH write");
    @(negedge clk);
    chk(!cdh_int_evt, "event lasts one clock");
    repeat (2) @(negedge clk);
    chk(evts == exp_evts, $sformatf("%0d interrupt events, expected %0d", evts, exp_evts));
    chk(exp_evts > 2, "enough interrupt writes exercised");
    // full readback through the NP port
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); np_en = 1; np_we = 0; np_addr = 12'(i);
      @(negedge clk); np_en = 0;
      chk(np_rdata == model[i], $sformatf("readback %h", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
